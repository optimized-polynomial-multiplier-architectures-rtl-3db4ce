// tb_secret_shift_buffer: loads a random secret polynomial word by word into
// buffers with SHIFT = 1 and SHIFT = 2, then shifts them repeatedly and
// compares every coefficient with s * x^k mod (x^256 + 1) computed here.
module tb_secret_shift_buffer;
  import saber_pkg::*;
  import tb_saber_pkg::*;
  logic clk = 0;
  logic load_en, shift1, shift2;
  logic [3:0] load_idx;
  saber_pkg::word_t load_word;
  scoeff_t [255:0] q1, q2;
  poly_t s;
  int checks = 0, failures = 0;

  secret_shift_buffer #(.SHIFT(1)) dut1 (.clk, .load_en, .load_idx, .load_word, .shift_en(shift1), .s(q1));
  secret_shift_buffer #(.SHIFT(2)) dut2 (.clk, .load_en, .load_idx, .load_word, .shift_en(shift2), .s(q2));

  always #5 clk = ~clk;

  function automatic int val(scoeff_t c);
    return c[3] ? -int'(c[2:0]) : int'(c[2:0]);
  endfunction

  task automatic compare(int k1, int k2);
    for (int j = 0; j < 256; j++) begin
      int e1, e2, i1, i2;
      i1 = j - k1; e1 = 1;
      while (i1 < 0) begin i1 += 256; e1 = -e1; end
      i2 = j - k2; e2 = 1;
      while (i2 < 0) begin i2 += 256; e2 = -e2; end
      checks += 2;
      if (val(q1[j]) != e1 * s[i1]) begin
        failures++;
        if (failures < 5) $display("SHIFT1 k=%0d j=%0d got %0d exp %0d", k1, j, val(q1[j]), e1 * s[i1]);
      end
      if (val(q2[j]) != e2 * s[i2]) begin
        failures++;
        if (failures < 5) $display("SHIFT2 k=%0d j=%0d got %0d exp %0d", k2, j, val(q2[j]), e2 * s[i2]);
      end
    end
  endtask

  initial begin
    load_en = 0; shift1 = 0; shift2 = 0; load_idx = '0; load_word = '0;
    rand_secret(s);
    for (int w = 0; w < 16; w++) begin
      @(negedge clk); load_en = 1; load_idx = 4'(w); load_word = secret_word(s, w);
    end
    @(negedge clk); load_en = 0;
    compare(0, 0);
    for (int k = 1; k <= 300; k++) begin
      shift1 = 1; shift2 = 1;
      @(negedge clk);
      shift1 = 0; shift2 = 0;
      if (k % 13 == 0 || k == 256 || k == 300) compare(k, 2 * k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
