// Checks the pointer-based FIFO delay line: with random enables, dout must
// equal the word written DEPTH enables earlier, and zero before that.
module tb_ptr_fifo;
  localparam int W = 8, DEPTH = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];
  ptr_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int s = 0; s < 2000; s++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      en <= ($urandom % 3 != 0); din <= v;
      @(negedge clk);
      if (en) begin
        checks++;
        if (dout != ((hist.size() >= DEPTH) ? hist[hist.size()-DEPTH] : '0)) begin
          failures++; $display("FAIL s=%0d", s);
        end
        hist.push_back(v);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
