// multiple_gen: centralized shift-and-add multiplier.
//
// Computes once, for one public coefficient a, the five multiples
// 0*a, 1*a, 2*a, 3*a = a + 2a and 4*a, all modulo 2^13, using only shifts and
// one adder. In the high-speed and lightweight multipliers a single instance
// (per public coefficient consumed per cycle) feeds every MAC unit, so each
// MAC reduces to a multiplexer plus an accumulator adder. Purely
// combinational. The set of multiples and the shift/add recipe follow the
// coefficient-wise shift-and-add multiplier; centralizing it is the
// architecture's area optimization.
module multiple_gen
  import saber_pkg::*;
(
  input  coeff_t     a,     // public coefficient
  output multiples_t mult   // mult[k] = k * a mod 2^13, k = 0..4
);
  always_comb begin
    mult[0] = '0;
    mult[1] = a;
    mult[2] = coeff_t'(a << 1);
    mult[3] = coeff_t'(a + coeff_t'(a << 1));
    mult[4] = coeff_t'(a << 2);
  end
endmodule
