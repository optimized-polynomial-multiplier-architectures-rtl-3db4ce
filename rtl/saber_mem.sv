// saber_mem: the 64-bit data memory the multipliers read and write.
//
// A block RAM with one read port and one write port, both synchronous:
// a read issued with rd_en in one cycle returns the word on rd_data in the
// next cycle; a write with wr_en stores wr_data at the clock edge. A read
// and a write to the same address in the same cycle return the old word.
// Depth is this design's choice (room for a secret, a public and a result
// polynomial for each multiplier); the 64-bit width and the one-read,
// one-write organisation are those of the multiplier interface.
module saber_mem
  import saber_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic   clk,
  input  logic   rd_en,
  input  addr_t  rd_addr,
  output word_t  rd_data,
  input  logic   wr_en,
  input  addr_t  wr_addr,
  input  word_t  wr_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr[AW-1:0]];
    if (wr_en) mem[wr_addr[AW-1:0]] <= wr_data;
  end
endmodule
