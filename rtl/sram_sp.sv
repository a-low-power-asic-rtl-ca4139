// Single-port synchronous RAM, DEPTH words of W bits. This stands for the
// stage-1 accumulation SRAM macro (2560 slot-boundary hypotheses). One access
// per clock: a write when we is set, otherwise a read when re is set, with
// the read data registered and valid on the next clock.
// The memory size follows the design; the port protocol is this
// implementation's choice.
module sram_sp #(
  parameter int W     = 15,
  parameter int DEPTH = 2560
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    else if (re) rdata <= mem[addr];
  end
endmodule
