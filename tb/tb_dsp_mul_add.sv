// tb_dsp_mul_add: random a (26 bits), b (17 bits), c (48 bits) every cycle;
// checks p = a*b + c mod 2^48 exactly two cycles later.
module tb_dsp_mul_add;
  logic clk = 0;
  logic [25:0] a;
  logic [16:0] b;
  logic [47:0] c, p;
  logic [47:0] exp_q [3];
  int checks = 0, failures = 0;

  dsp_mul_add dut (.clk, .a, .b, .c, .p);

  always #5 clk = ~clk;

  initial begin
    a = '0; b = '0; c = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n >= 3) begin
        checks++;
        if (p != exp_q[1]) begin
          failures++;
          if (failures < 5) $display("mismatch at %0d: got %h exp %h", n, p, exp_q[1]);
        end
      end
      a = 26'($urandom); b = 17'($urandom); c = {16'($urandom), 32'($urandom)};
      if (n < 3) begin a = '1; b = '1; c = '1; end
      exp_q[1] = exp_q[0];
      exp_q[0] = 48'(64'(a) * 64'(b) + 64'(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
