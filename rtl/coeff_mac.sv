// coeff_mac: select-and-accumulate MAC unit.
//
// Given the precomputed multiples {0..4}*a of a public coefficient and one
// secret coefficient s (sign-magnitude: bit 3 sign, bits 2:0 magnitude),
// selects the multiple named by |s| and adds it to (s >= 0) or subtracts it
// from (s < 0) the accumulator coefficient, modulo 2^13. The secret-dependent
// selection stays inside the MAC; only the public multiples are shared.
// Combinational: acc_out = acc_in + s * a mod 2^13. A magnitude above 4
// (not produced by Saber) selects 0. The select-and-add MAC is the
// architecture's; subtracting for negative secrets follows from this
// design's sign-magnitude encoding.
module coeff_mac
  import saber_pkg::*;
(
  input  multiples_t mult,
  input  scoeff_t    s,
  input  coeff_t     acc_in,
  output coeff_t     acc_out
);
  coeff_t sel;
  always_comb begin
    sel = (sec_mag(s) <= 3'd4) ? mult[sec_mag(s)] : '0;
    acc_out = sec_neg(s) ? coeff_t'(acc_in - sel) : coeff_t'(acc_in + sel);
  end
endmodule
