// Pointer-based FIFO delay line: the low-power replacement for a shift
// register used as a delay element. Instead of moving every field on each
// step, DEPTH words sit in a small memory and only the word under a
// circulating pointer is read and rewritten, so one field changes per step.
// Interface: on each cycle with en, din is stored and dout presents the word
// stored DEPTH enables earlier (combinational read of the current slot).
// Until the buffer has been filled once dout reads zero, so the memory needs
// no reset. The idea of replacing delay shift registers by a pointer-based
// FIFO follows the design; the fill flag is this implementation's choice.
module ptr_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;
  logic          full;

  assign dout = full ? mem[ptr] : '0;

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0; full <= 1'b0;
    end else if (en) begin
      if (ptr == AW'(DEPTH-1)) begin
        ptr <= '0; full <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end
endmodule
