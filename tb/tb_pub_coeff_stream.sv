// tb_pub_coeff_stream: a memory model holds a random public polynomial as 52
// packed words. Three streams read it: STEP 1 with 3 slots and the read always
// granted, STEP 2 with 3 slots, and STEP 1 with 2 slots, late requests and a
// randomly withheld grant (as in the lightweight multiplier). Each consumer
// takes coefficients at random moments and checks them in order against the
// polynomial; the first two streams, consuming whenever possible, must deliver
// the whole polynomial with only the start-up wait.
module tb_pub_coeff_stream;
  import saber_pkg::*;
  import tb_saber_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  poly_t a;
  saber_pkg::word_t mem [64];
  int checks = 0, failures = 0;

  // three streams
  logic req [3], grant [3], avail [3], cons [3];
  addr_t addr [3];
  saber_pkg::word_t rdata [3];
  coeff_t [0:0] c1, c3;
  coeff_t [1:0] c2;
  int idx [3];
  int waits [3];

  pub_coeff_stream #(.STEP(1), .SLOTS(3)) d1 (.clk, .rst_n, .start, .base(addr_t'(4)),
    .rd_req(req[0]), .rd_addr(addr[0]), .rd_grant(grant[0]), .rd_data(rdata[0]),
    .avail(avail[0]), .coeff(c1), .consume(cons[0]));
  pub_coeff_stream #(.STEP(2), .SLOTS(3)) d2 (.clk, .rst_n, .start, .base(addr_t'(4)),
    .rd_req(req[1]), .rd_addr(addr[1]), .rd_grant(grant[1]), .rd_data(rdata[1]),
    .avail(avail[1]), .coeff(c2), .consume(cons[1]));
  pub_coeff_stream #(.STEP(1), .SLOTS(2), .EARLY_REQ(1'b0)) d3 (.clk, .rst_n, .start, .base(addr_t'(4)),
    .rd_req(req[2]), .rd_addr(addr[2]), .rd_grant(grant[2]), .rd_data(rdata[2]),
    .avail(avail[2]), .coeff(c3), .consume(cons[2]));

  always #5 clk = ~clk;

  // memory models: one-cycle read latency
  for (genvar d = 0; d < 3; d++) begin : g_mem
    always @(posedge clk) if (req[d] && grant[d]) rdata[d] <= mem[addr[d]];
  end

  always_comb begin
    grant[0] = 1'b1;
    grant[1] = 1'b1;
    cons[0]  = avail[0] && idx[0] < 256;
    cons[1]  = avail[1] && idx[1] < 256;
  end

  logic rnd_g, rnd_c;
  always @(negedge clk) begin rnd_g <= 1'($urandom); rnd_c <= 1'($urandom); end
  assign grant[2] = req[2] && rnd_g;
  assign cons[2]  = avail[2] && !req[2] && rnd_c && idx[2] < 256;

  always @(posedge clk) if (start) begin
    for (int d = 0; d < 3; d++) begin idx[d] <= 0; waits[d] <= 0; end
  end else if (rst_n) begin
    if (cons[0]) begin
      checks++;
      if (int'(c1[0]) != a[idx[0]]) begin failures++; if (failures < 5) $display("d1 k=%0d", idx[0]); end
      idx[0] <= idx[0] + 1;
    end else if (idx[0] < 256) waits[0] <= waits[0] + 1;
    if (cons[1]) begin
      checks++;
      if (int'(c2[0]) != a[idx[1]] || int'(c2[1]) != a[idx[1]+1]) begin
        failures++; if (failures < 5) $display("d2 k=%0d", idx[1]);
      end
      idx[1] <= idx[1] + 2;
    end else if (idx[1] < 256) waits[1] <= waits[1] + 1;
    if (cons[2]) begin
      checks++;
      if (int'(c3[0]) != a[idx[2]]) begin failures++; if (failures < 5) $display("d3 k=%0d", idx[2]); end
      idx[2] <= idx[2] + 1;
    end
  end

  initial begin
    for (int r = 0; r < 2; r++) begin
      rand_public(a);
      for (int w = 0; w < 52; w++) mem[4 + w] = public_word(a, w);
      for (int w = 56; w < 64; w++) mem[w] = '1;
      mem[0] = '1; mem[1] = '1; mem[2] = '1; mem[3] = '1;
      @(negedge clk); rst_n = 1; start = 1;
      @(negedge clk); start = 0;
      wait (idx[0] >= 256 && idx[1] >= 256 && idx[2] >= 256);
      // streaming at full rate waits only for the first two words
      checks++;
      if (waits[0] > 3 || waits[1] > 3) begin
        failures++;
        $display("streams stalled: %0d %0d cycles", waits[0], waits[1]);
      end
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
