// tb_saber_poly_mult_top: end-to-end test of the top level at its default
// parameters (High Speed I with 256 and with 512 MACs, High Speed II,
// lightweight). For each of the four units it writes a secret and a public polynomial
// through the host port, runs OP_MUL, reads the result back through the host
// port (after OP_STORE for the high-speed units) and compares it with the
// negacyclic schoolbook product computed here; then it repeats with a second
// operand pair and OP_MAC, checking the accumulated sum. It counts how often
// each mechanism of the design occurred and fails if one never did: the
// negacyclic wrap of the secret register, waiting for public words, the DSP
// lane overflow fix, the DSP pipeline drain, pauses of the lightweight unit
// for public and secret reads, negated secret blocks, first-touch clearing of
// the in-memory accumulator, and accumulation (OP_MAC).
module tb_saber_poly_mult_top;
  import saber_pkg::*;
  import tb_saber_pkg::*;

  localparam int SEC = 0, PUB = 16, RES = 128;

  logic clk = 0, rst_n = 0;
  localparam int UNITS = 4;
  host_req_t req [UNITS];
  host_rsp_t rsp [UNITS];
  int checks = 0, failures = 0;

  saber_poly_mult_top dut (.clk, .rst_n,
    .hs1_256_req(req[0]), .hs1_256_rsp(rsp[0]),
    .hs1_512_req(req[1]), .hs1_512_rsp(rsp[1]),
    .hs2_req(req[2]), .hs2_rsp(rsp[2]),
    .lw_req(req[3]),  .lw_rsp(rsp[3]));

  always #5 clk = ~clk;

  // mechanism counters
  int n_wrap, n_wrap2, n_pub_wait, n_fix, n_drain, n_lw_pub, n_lw_sec, n_lw_neg, n_lw_clear, n_mac;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_hs1_256.g_hs1.u_mult.s_shift && dut.u_hs1_256.g_hs1.u_mult.s[255][2:0] != 3'd0) n_wrap++;
    if (dut.u_hs1_256.g_hs1.u_mult.state_q == dut.u_hs1_256.g_hs1.u_mult.S_COMPUTE &&
        !dut.u_hs1_256.g_hs1.u_mult.p_avail) n_pub_wait++;
    if (dut.u_hs1_512.g_hs1.u_mult.s_shift && dut.u_hs1_512.g_hs1.u_mult.s[254][2:0] != 3'd0) n_wrap2++;
    if (dut.u_hs2.g_hs2.u_mult.g_dsp[5].u_q.v_d[1] &&
        dut.u_hs2.g_hs2.u_mult.g_dsp[5].u_q.p[30] != dut.u_hs2.g_hs2.u_mult.g_dsp[5].u_q.fixbit_d[1]) n_fix++;
    if (dut.u_hs2.g_hs2.u_mult.state_q == dut.u_hs2.g_hs2.u_mult.S_DRAIN) n_drain++;
    if (dut.u_lw.g_lw.u_mult.p_grant) n_lw_pub++;
    if (dut.u_lw.g_lw.u_mult.l_issue) begin
      n_lw_sec++;
      if (dut.u_lw.g_lw.u_mult.lblk < 0) n_lw_neg++;
    end
    if (dut.u_lw.g_lw.u_mult.v2_q && dut.u_lw.g_lw.u_mult.zero2_q) n_lw_clear++;
  end

  task automatic host_write(int u, int addr, saber_pkg::word_t data);
    @(negedge clk);
    req[u].wr_en = 1; req[u].wr_addr = addr_t'(addr); req[u].wr_data = data;
    @(negedge clk);
    req[u].wr_en = 0;
  endtask

  task automatic host_read(int u, int addr, output saber_pkg::word_t data);
    @(negedge clk);
    req[u].rd_en = 1; req[u].rd_addr = addr_t'(addr);
    @(negedge clk);
    req[u].rd_en = 0;
    data = rsp[u].rd_data;
  endtask

  task automatic command(int u, op_e o, output int cycles);
    @(negedge clk);
    req[u].start = 1; req[u].op = o;
    req[u].sec_base = addr_t'(SEC); req[u].pub_base = addr_t'(PUB); req[u].res_base = addr_t'(RES);
    @(negedge clk);
    req[u].start = 0;
    cycles = 1;
    while (!rsp[u].done) begin @(negedge clk); cycles++; end
    if (o == OP_MAC) n_mac++;
  endtask

  task automatic load(int u, input poly_t a, input poly_t s);
    for (int w = 0; w < 16; w++) host_write(u, SEC + w, secret_word(s, w));
    for (int w = 0; w < 52; w++) host_write(u, PUB + w, public_word(a, w));
  endtask

  task automatic check(int u, input poly_t e, string what);
    saber_pkg::word_t img [52];
    saber_pkg::word_t w;
    int got;
    if (u < 3) begin
      for (int i = 0; i < 52; i++) host_read(u, RES + i, img[i]);
      for (int k = 0; k < 256; k++) begin
        got = packed_coeff(img, k);
        checks++;
        if (got != e[k]) begin
          failures++;
          if (failures < 8) $display("%s unit %0d coeff %0d: got %0d exp %0d", what, u, k, got, e[k]);
        end
      end
    end else begin
      for (int i = 0; i < 64; i++) begin
        host_read(u, RES + i, w);
        for (int l = 0; l < 4; l++) begin
          got = int'(w[16*l +: 16]);
          checks++;
          if (got != e[4*i + l]) begin
            failures++;
            if (failures < 8) $display("%s unit %0d coeff %0d: got %0d exp %0d", what, u, 4*i+l, got, e[4*i+l]);
          end
        end
      end
    end
  endtask

  initial begin
    poly_t a, s, a2, s2, c, c2;
    int cyc, st;
    string names [UNITS];
    names[0] = "HS-I 256"; names[1] = "HS-I 512"; names[2] = "HS-II"; names[3] = "LW";
    n_wrap = 0; n_wrap2 = 0; n_pub_wait = 0; n_fix = 0; n_drain = 0; n_lw_pub = 0;
    n_lw_sec = 0; n_lw_neg = 0; n_lw_clear = 0; n_mac = 0;
    for (int u = 0; u < UNITS; u++) req[u] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int u = 0; u < UNITS; u++) begin
      rand_public(a); rand_secret(s);
      load(u, a, s);
      command(u, OP_MUL, cyc);
      st = 0;
      if (u < 3) command(u, OP_STORE, st);
      $display("%s: multiplication %0d cycles, store %0d cycles", names[u], cyc, st);
      ref_mul(a, s, c);
      check(u, c, "mul");
      rand_public(a2); rand_secret(s2);
      load(u, a2, s2);
      command(u, OP_MAC, cyc);
      if (u < 3) command(u, OP_STORE, st);
      ref_mul(a2, s2, c2);
      for (int j = 0; j < 256; j++) c2[j] = (c2[j] + c[j]) & 8191;
      check(u, c2, "mac");
    end
    $display("events: wrap=%0d wrap2=%0d pub_wait=%0d dsp_fix=%0d dsp_drain=%0d lw_pub_pause=%0d lw_sec_pause=%0d lw_neg_block=%0d lw_clear=%0d mac_ops=%0d",
             n_wrap, n_wrap2, n_pub_wait, n_fix, n_drain, n_lw_pub, n_lw_sec, n_lw_neg, n_lw_clear, n_mac);
    if (n_wrap == 0)     begin failures++; $display("secret wrap never happened"); end
    if (n_wrap2 == 0)    begin failures++; $display("two-place secret wrap never happened"); end
    if (n_pub_wait == 0) begin failures++; $display("public wait never happened"); end
    if (n_fix == 0)      begin failures++; $display("overflow fix never happened"); end
    if (n_drain == 0)    begin failures++; $display("DSP drain never happened"); end
    if (n_lw_pub == 0)   begin failures++; $display("LW public pause never happened"); end
    if (n_lw_sec == 0)   begin failures++; $display("LW secret pause never happened"); end
    if (n_lw_neg == 0)   begin failures++; $display("LW negated block never happened"); end
    if (n_lw_clear == 0) begin failures++; $display("LW first-touch clear never happened"); end
    if (n_mac == 0)      begin failures++; $display("accumulation never happened"); end
    checks += 10;
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
