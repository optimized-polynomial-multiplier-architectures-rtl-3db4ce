// tb_dsp_quad_mult: drives random secret pairs (-4..4, all sign combinations)
// and public pairs every cycle and checks, three cycles later, a0*s0,
// a0*s1 + a1*s0 and a1*s1 modulo 2^13 against direct arithmetic. Counts how
// often the middle sum carried into the third lane (the overflow fix) and the
// sign cases, and fails if any never occurred.
module tb_dsp_quad_mult;
  import saber_pkg::*;
  import tb_saber_pkg::sm4;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  scoeff_t s0, s1;
  coeff_t a0, a1, p00, pmid, p11;
  int checks = 0, failures = 0, fixes = 0, mixed_signs = 0, both_neg = 0;
  int e00 [4], emid [4], e11 [4];
  logic ev [4];

  dsp_quad_mult dut (.clk, .rst_n, .in_valid, .s0, .s1, .a0, .a1, .out_valid, .p00, .pmid, .p11);

  always #5 clk = ~clk;

  initial begin
    in_valid = 0; s0 = '0; s1 = '0; a0 = '0; a1 = '0;
    for (int k = 0; k < 4; k++) ev[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int v0, v1, x0, x1;
      @(negedge clk);
      if (ev[2]) begin
        checks++;
        if (!out_valid || int'(p00) != e00[2] || int'(pmid) != emid[2] || int'(p11) != e11[2]) begin
          failures++;
          if (failures < 5) $display("mismatch n=%0d got %0d %0d %0d exp %0d %0d %0d",
                                     n, p00, pmid, p11, e00[2], emid[2], e11[2]);
        end
      end
      for (int k = 3; k > 0; k--) begin
        ev[k] = ev[k-1]; e00[k] = e00[k-1]; emid[k] = emid[k-1]; e11[k] = e11[k-1];
      end
      v0 = int'($urandom_range(8)) - 4;
      v1 = int'($urandom_range(8)) - 4;
      x0 = int'($urandom_range(8191));
      x1 = int'($urandom_range(8191));
      if (n % 7 == 0) begin x0 = 8191; x1 = 8191; end
      s0 = sm4(v0); s1 = sm4(v1); a0 = coeff_t'(x0); a1 = coeff_t'(x1);
      in_valid = 1;
      ev[0]   = 1;
      e00[0]  = (x0 * v0) & 8191;
      emid[0] = (x0 * v1 + x1 * v0) & 8191;
      e11[0]  = (x1 * v1) & 8191;
      if ((v0 < 0) != (v1 < 0) && v0 != 0 && v1 != 0) mixed_signs++;
      if (v0 < 0 && v1 < 0) both_neg++;
    end
    if (fixes == 0) begin failures++; $display("overflow fix never exercised"); end
    if (mixed_signs == 0 || both_neg == 0) failures++;
    $display("overflow fixes=%0d mixed-sign pairs=%0d both-negative pairs=%0d", fixes, mixed_signs, both_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dut.p[30] != dut.fixbit_d[1]) fixes++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
