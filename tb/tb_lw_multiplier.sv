// tb_lw_multiplier: runs the lightweight multiplier on a memory model with
// one read and one write port. OP_MUL with extreme operands (all a = 8191,
// s = +-4), OP_MUL with a random operand pair, then
// OP_MAC with a second pair, and the result region (64 words, 4 coefficients
// per word in 16-bit lanes) is compared after each with the negacyclic
// schoolbook product computed here. Also checked: exactly 16 x 1024 = 16384
// cycles issue MAC work, the whole multiplication stays within the
// 19,471 cycles quoted for this architecture, public and secret reads pause
// the computation, and negated secret blocks are loaded for the wrap.
module tb_lw_multiplier;
  import saber_pkg::*;
  import tb_saber_pkg::*;

  localparam int SEC = 0, PUB = 16, RES = 128;

  logic clk = 0, rst_n = 0;
  logic start, busy, done, rd_en, wr_en;
  op_e  op;
  addr_t rd_addr, wr_addr;
  saber_pkg::word_t rd_data, wr_data;
  saber_pkg::word_t mem [256];
  int checks = 0, failures = 0;
  int mac_cycles, busy_cycles, pub_pauses, sec_loads, neg_loads;

  lw_multiplier dut (.clk, .rst_n, .start, .op,
    .sec_base(addr_t'(SEC)), .pub_base(addr_t'(PUB)), .res_base(addr_t'(RES)),
    .busy, .done, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr[7:0]];
    if (wr_en) mem[wr_addr[7:0]] <= wr_data;
    if (dut.compute) mac_cycles++;
    if (busy) busy_cycles++;
    if (dut.p_grant) pub_pauses++;
    if (dut.l_issue) begin sec_loads++; if (dut.lblk < 0) neg_loads++; end
  end

  task automatic load_operands(input poly_t a, input poly_t s);
    for (int w = 0; w < 16; w++) mem[SEC + w] = secret_word(s, w);
    for (int w = 0; w < 52; w++) mem[PUB + w] = public_word(a, w);
  endtask

  task automatic run(op_e o);
    mac_cycles = 0; busy_cycles = 0; pub_pauses = 0; sec_loads = 0; neg_loads = 0;
    @(negedge clk); start = 1; op = o;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    @(negedge clk);
    $display("op %0d: %0d busy cycles, %0d MAC cycles, %0d public reads, %0d secret block reads (%0d negated)",
             o, busy_cycles, mac_cycles, pub_pauses, sec_loads, neg_loads);
    checks++;
    if (mac_cycles != 16384) begin failures++; $display("MAC cycles %0d", mac_cycles); end
    checks++;
    if (busy_cycles > 19471) begin failures++; $display("too slow: %0d", busy_cycles); end
    checks++;
    if (pub_pauses != 16 * 52 || sec_loads != 16 * 16 || neg_loads != 16 * 17 / 2) begin
      failures++;
      $display("unexpected memory traffic");
    end
  endtask

  task automatic check_result(input poly_t e, string what);
    for (int k = 0; k < 256; k++) begin
      int got;
      got = int'(mem[RES + k / 4][16 * (k % 4) +: 16]);
      checks++;
      if (got != e[k]) begin
        failures++;
        if (failures < 8) $display("%s coeff %0d: got %0d exp %0d", what, k, got, e[k]);
      end
    end
  endtask

  initial begin
    poly_t a, s, a2, s2, c, c2;
    start = 0; op = OP_MUL;
    for (int w = 0; w < 256; w++) mem[w] = '1;   // stale result must be ignored
    repeat (3) @(negedge clk);
    rst_n = 1;
    // extreme operands first: every a = 8191, secrets alternating +4 / -4
    for (int j = 0; j < 256; j++) begin a[j] = 8191; s[j] = (j % 2 == 1) ? -4 : 4; end
    load_operands(a, s);
    run(OP_MUL);
    ref_mul(a, s, c);
    check_result(c, "extreme");
    rand_public(a); rand_secret(s);
    load_operands(a, s);
    run(OP_MUL);
    ref_mul(a, s, c);
    check_result(c, "mul");
    rand_public(a2); rand_secret(s2);
    load_operands(a2, s2);
    run(OP_MAC);
    ref_mul(a2, s2, c2);
    for (int j = 0; j < 256; j++) c2[j] = (c2[j] + c[j]) & 8191;
    check_result(c2, "mac");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
