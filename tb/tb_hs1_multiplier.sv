// tb_hs1_multiplier: runs the 256-MAC (UNROLL = 1) and 512-MAC (UNROLL = 2)
// variants side by side, each on its own memory model. For several random
// operand pairs it issues OP_MUL, OP_STORE, then OP_MAC with a second pair and
// OP_STORE again, and compares the stored packed results with the
// negacyclic schoolbook product computed here. It also checks the cycle
// budget: the number of cycles spent computing must be 256 / UNROLL plus at
// most 3 cycles of waiting for the first public words, the secret load 17
// cycles and the store 52 cycles.
module tb_hs1_multiplier;
  import saber_pkg::*;
  import tb_saber_pkg::*;

  localparam int SEC = 0, PUB = 16, PUB2 = 80, RES = 160;

  logic clk = 0, rst_n = 0;
  logic start;
  op_e  op;
  logic busy [2], done [2], rd_en [2], wr_en [2];
  addr_t rd_addr [2], wr_addr [2];
  saber_pkg::word_t rd_data [2], wr_data [2];
  saber_pkg::word_t mem [2][256];
  int checks = 0, failures = 0;
  int compute_cycles [2], total_cycles [2];

  hs1_multiplier #(.UNROLL(1)) d1 (.clk, .rst_n, .start, .op,
    .sec_base(addr_t'(SEC)), .pub_base(addr_t'(PUB)), .res_base(addr_t'(RES)),
    .busy(busy[0]), .done(done[0]), .rd_en(rd_en[0]), .rd_addr(rd_addr[0]), .rd_data(rd_data[0]),
    .wr_en(wr_en[0]), .wr_addr(wr_addr[0]), .wr_data(wr_data[0]));
  hs1_multiplier #(.UNROLL(2)) d2 (.clk, .rst_n, .start, .op,
    .sec_base(addr_t'(SEC)), .pub_base(addr_t'(PUB)), .res_base(addr_t'(RES)),
    .busy(busy[1]), .done(done[1]), .rd_en(rd_en[1]), .rd_addr(rd_addr[1]), .rd_data(rd_data[1]),
    .wr_en(wr_en[1]), .wr_addr(wr_addr[1]), .wr_data(wr_data[1]));

  always #5 clk = ~clk;

  for (genvar d = 0; d < 2; d++) begin : g_mem
    always @(posedge clk) begin
      if (rd_en[d]) rd_data[d] <= mem[d][rd_addr[d][7:0]];
      if (wr_en[d]) mem[d][wr_addr[d][7:0]] <= wr_data[d];
    end
  end

  // cycles in the compute state of each variant
  always @(posedge clk) begin
    if (d1.state_q == d1.S_COMPUTE) compute_cycles[0]++;
    if (d2.state_q == d2.S_COMPUTE) compute_cycles[1]++;
    if (busy[0]) total_cycles[0]++;
    if (busy[1]) total_cycles[1]++;
  end

  task automatic load_operands(input poly_t a, input poly_t s);
    for (int d = 0; d < 2; d++) begin
      for (int w = 0; w < 16; w++) mem[d][SEC + w] = secret_word(s, w);
      for (int w = 0; w < 52; w++) mem[d][PUB + w] = public_word(a, w);
    end
  endtask

  task automatic run(op_e o);
    bit seen [2];
    seen[0] = 0; seen[1] = 0;
    for (int d = 0; d < 2; d++) begin compute_cycles[d] = 0; total_cycles[d] = 0; end
    @(negedge clk); start = 1; op = o;
    @(negedge clk); start = 0;
    while (!(seen[0] && seen[1])) begin
      @(posedge clk);
      if (done[0]) seen[0] = 1;
      if (done[1]) seen[1] = 1;
    end
    @(negedge clk);
    if (o != OP_STORE)
      for (int d = 0; d < 2; d++) begin
        checks++;
        if (compute_cycles[d] < 256 / (d + 1) || compute_cycles[d] > 256 / (d + 1) + 3) begin
          failures++;
          $display("variant %0d: %0d compute cycles", d, compute_cycles[d]);
        end
      end
    else
      for (int d = 0; d < 2; d++) begin
        checks++;
        if (total_cycles[d] != 53) begin failures++; $display("store took %0d", total_cycles[d]); end
      end
  endtask

  task automatic check_result(input poly_t e, string what);
    for (int d = 0; d < 2; d++) begin
      saber_pkg::word_t img [52];
      for (int w = 0; w < 52; w++) img[w] = mem[d][RES + w];
      for (int k = 0; k < 256; k++) begin
        checks++;
        if (packed_coeff(img, k) != e[k]) begin
          failures++;
          if (failures < 8) $display("%s variant %0d coeff %0d: got %0d exp %0d", what, d, k, packed_coeff(img, k), e[k]);
        end
      end
    end
  endtask

  initial begin
    poly_t a, s, a2, s2, c, c2;
    start = 0; op = OP_MUL;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      rand_public(a); rand_secret(s);
      if (r == 0) for (int j = 0; j < 256; j++) begin a[j] = 8191; s[j] = (j % 2 == 1) ? -4 : 4; end
      load_operands(a, s);
      run(OP_MUL);
      $display("run %0d: compute %0d / %0d cycles, busy %0d / %0d cycles", r,
               compute_cycles[0], compute_cycles[1], total_cycles[0], total_cycles[1]);
      run(OP_STORE);
      ref_mul(a, s, c);
      check_result(c, "mul");
      rand_public(a2); rand_secret(s2);
      load_operands(a2, s2);
      run(OP_MAC);
      run(OP_STORE);
      ref_mul(a2, s2, c2);
      for (int j = 0; j < 256; j++) c2[j] = (c2[j] + c[j]) & 8191;
      check_result(c2, "mac");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
