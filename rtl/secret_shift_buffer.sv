// secret_shift_buffer: whole secret polynomial held in registers (256 x 4 bits).
//
// Loaded one 64-bit memory word (16 coefficients) at a time: word w holds
// coefficients 16w..16w+15, coefficient 16w+t in bits 4t+3..4t. During the
// multiplication each shift_en multiplies the held polynomial by x^SHIFT
// modulo x^256 + 1 (negacyclic shift): every coefficient moves up SHIFT
// places and the SHIFT coefficients that wrap around are negated (sign bit
// flipped). SHIFT = 1 serves the 256-MAC multiplier, SHIFT = 2 the
// multipliers that perform two outer-loop iterations per cycle.
// Timing: load and shift take effect at the next clock edge; load has
// priority. The contents are not reset (they are always loaded before use).
// The whole-polynomial register with negacyclic shift and the 16-per-word
// packing are the architecture's; the nibble order within a word is this
// design's choice.
module secret_shift_buffer
  import saber_pkg::*;
#(
  parameter int unsigned SHIFT = 1
) (
  input  logic                 clk,
  input  logic                 load_en,
  input  logic [3:0]           load_idx,   // word index 0..15
  input  word_t                load_word,
  input  logic                 shift_en,
  output scoeff_t [N-1:0]      s           // s[j]: coefficient of x^j
);
  scoeff_t [N-1:0] s_q;
  assign s = s_q;

  always_ff @(posedge clk) begin
    if (load_en) begin
      for (int t = 0; t < int'(SEC_PER_WORD); t++)
        s_q[SEC_PER_WORD*load_idx + t] <= load_word[SW*t +: SW];
    end else if (shift_en) begin
      for (int j = 0; j < int'(N); j++) begin
        if (j >= int'(SHIFT)) s_q[j] <= s_q[j-SHIFT];
        else                  s_q[j] <= {~s_q[N-SHIFT+j][SW-1], s_q[N-SHIFT+j][SW-2:0]};
      end
    end
  end
endmodule
