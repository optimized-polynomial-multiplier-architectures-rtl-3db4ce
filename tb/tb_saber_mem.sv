// tb_saber_mem: writes random words, reads them back with the one-cycle read
// latency, and checks read-before-write on a same-cycle access.
module tb_saber_mem;
  import saber_pkg::*;
  logic clk = 0;
  logic rd_en, wr_en;
  addr_t rd_addr, wr_addr;
  word_t rd_data, wr_data;
  word_t model [256];
  int checks = 0, failures = 0;

  saber_mem #(.DEPTH(256)) dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int i = 0; i < 256; i++) begin
      model[i] = {$urandom, $urandom};
      @(negedge clk); wr_en = 1; wr_addr = addr_t'(i); wr_data = model[i];
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 1000; n++) begin
      int ra, wa;
      ra = int'($urandom_range(255));
      wa = int'($urandom_range(255));
      @(negedge clk);
      rd_en = 1; rd_addr = addr_t'(ra);
      wr_en = n[0]; wr_addr = addr_t'(wa); wr_data = {$urandom, $urandom};
      @(negedge clk);
      checks++;
      if (rd_data != model[ra]) begin
        failures++;
        if (failures < 5) $display("mismatch addr %0d", ra);
      end
      if (n[0]) model[wa] = wr_data;
      rd_en = 0; wr_en = 0;
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
