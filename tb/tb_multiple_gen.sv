// tb_multiple_gen: checks that multiple_gen returns k*a mod 2^13 for k = 0..4
// over random and corner-case public coefficients.
module tb_multiple_gen;
  import saber_pkg::*;
  coeff_t a;
  multiples_t mult;
  int checks = 0, failures = 0;

  multiple_gen dut (.a, .mult);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = (n < 4) ? coeff_t'(n * 8191 / 3) : coeff_t'($urandom);
      #1;
      for (int k = 0; k <= 4; k++) begin
        checks++;
        if (int'(mult[k]) != ((k * int'(a)) & 8191)) begin
          failures++;
          if (failures < 5) $display("mismatch a=%0d k=%0d got %0d", a, k, mult[k]);
        end
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
