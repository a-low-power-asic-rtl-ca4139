// Checks the CFRS codebook ROM against its construction, recomputed here
// with GF(16) log/antilog tables (generator 2, x^4+x+1): symbol i of word g
// is m1*x + m2*x^2 + i (addition in GF(16)) with x = 2^i, m1 = g mod 15 + 1,
// m2 = g div 15 + 1. Also checks the comma-free property the decoder relies
// on: any two different (word, cyclic shift) pairs differ in >= 10 symbols.
module tb_cfrs_rom;
  logic [5:0] g;
  logic [59:0] word;
  int checks = 0, failures = 0;
  int expv [64][15];
  int lg [16], alog [15];
  cfrs_rom dut (.*);
  function automatic int gmul(input int a, input int b);
    if (a == 0 || b == 0) return 0;
    return alog[(lg[a] + lg[b]) % 15];
  endfunction
  initial begin
    int v;
    v = 1;
    for (int i = 0; i < 15; i++) begin
      alog[i] = v; lg[v] = i;
      v = v << 1; if (v & 16) v = (v ^ 16) ^ 3;
    end
    for (int gg = 0; gg < 64; gg++) begin
      g = 6'(gg); #1;
      for (int i = 0; i < 15; i++) begin
        int x;
        x = alog[i];
        expv[gg][i] = gmul(gg % 15 + 1, x) ^ gmul(gg / 15 + 1, gmul(x, x)) ^ i;
        checks++;
        if (int'(word[4*i +: 4]) != expv[gg][i]) begin failures++; $display("FAIL g=%0d i=%0d", gg, i); end
      end
    end
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++)
        for (int s = 0; s < 15; s++) begin
          int d;
          if (a == b && s == 0) continue;
          d = 0;
          for (int i = 0; i < 15; i++) if (expv[a][i] != expv[b][(i + s) % 15]) d++;
          checks++; if (d < 10) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
