// CFRS decoder. Compares the 15 detected SSC symbols with every code word of
// the codebook in every cyclic shift and keeps the (group, shift) with the
// most matching symbols. Shift s means x[i] = word[(i+s) mod 15], i.e. the
// first collected slot is slot s of the frame, which gives frame timing.
// One (group, shift) pair is tried per clock with 15 symbol comparators:
// 64 x 15 = 960 clocks per decode.
// Interface: start latches nothing, x must stay stable until done; done
// pulses with g_hat, s_hat and the number of n_match.
// Hard-decision maximum-match decoding is this implementation's choice for
// a decoder whose insides the design does not detail.
module cfrs_decoder
  import cs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  x [SLOTS],
  output logic        done,
  output logic [5:0]  g_hat,
  output slot_idx_t   s_hat,
  output logic [3:0]  n_match
);
  logic        busy;
  logic [5:0]  g;
  slot_idx_t   s;
  logic [59:0] word;
  logic [3:0]  cnt, best;

  cfrs_rom u_rom (.g, .word);

  always_comb begin
    cnt = '0;
    for (int i = 0; i < SLOTS; i++) begin
      int j;
      j = (i + int'(s)) % SLOTS;
      if (x[i] == word[4*j +: 4]) cnt = cnt + 4'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; g <= '0; s <= '0; best <= '0;
      done <= 1'b0; g_hat <= '0; s_hat <= '0; n_match <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; g <= '0; s <= '0; best <= '0;
      end else if (busy) begin
        if (cnt > best || (g == '0 && s == '0)) begin
          best <= cnt; g_hat <= g; s_hat <= s;
        end
        if (s == slot_idx_t'(SLOTS-1)) begin
          s <= '0;
          g <= g + 6'd1;
          if (g == 6'(NGROUP-1)) begin
            busy <= 1'b0; done <= 1'b1;
            n_match <= (cnt > best) ? cnt : best;
          end
        end else begin
          s <= s + 1'b1;
        end
      end
    end
  end
endmodule
