// Checks the single-port RAM: random writes and reads over all 2560 words
// against a reference array; read data appears one clock after the read.
module tb_sram_sp;
  localparam int W = 15, DEPTH = 2560;
  logic clk = 0, re = 0, we = 0;
  logic [11:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_mem [DEPTH];
  bit written [DEPTH];
  sram_sp #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; re = 0; addr = 12'(i); wdata = W'($urandom); ref_mem[i] = wdata; written[i] = 1;
    end
    for (int t = 0; t < 10000; t++) begin
      int a;
      a = int'($urandom % DEPTH);
      @(negedge clk);
      if ($urandom % 3 == 0) begin we = 1; re = 0; addr = 12'(a); wdata = W'($urandom); ref_mem[a] = wdata; end
      else begin
        we = 0; re = 1; addr = 12'(a);
        @(negedge clk); re = 0;
        checks++;
        if (rdata != ref_mem[a]) begin failures++; $display("FAIL addr %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
