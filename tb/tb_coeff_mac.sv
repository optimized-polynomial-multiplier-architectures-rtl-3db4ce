// tb_coeff_mac: checks acc_out = acc_in + s*a mod 2^13 for every secret value
// -4..4 (both encodings of zero) and random a and acc_in. The multiples are
// computed here, not by multiple_gen.
module tb_coeff_mac;
  import saber_pkg::*;
  multiples_t mult;
  scoeff_t s;
  coeff_t acc_in, acc_out;
  int checks = 0, failures = 0;

  coeff_mac dut (.mult, .s, .acc_in, .acc_out);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int a, sv, exp;
      a  = int'($urandom_range(8191));
      sv = int'($urandom_range(8)) - 4;
      for (int k = 0; k <= 4; k++) mult[k] = coeff_t'(k * a);
      s = (sv < 0 || (sv == 0 && n[0])) ? {1'b1, 3'(-sv)} : {1'b0, 3'(sv)};
      acc_in = coeff_t'($urandom);
      #1;
      exp = (int'(acc_in) + sv * a) & 8191;
      checks++;
      if (int'(acc_out) != exp) begin
        failures++;
        if (failures < 5) $display("mismatch a=%0d s=%0d acc=%0d got %0d exp %0d", a, sv, acc_in, acc_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
