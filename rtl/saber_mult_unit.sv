// saber_mult_unit: one polynomial multiplier with its 64-bit memory.
//
// ARCH selects the multiplier (hs1_multiplier, hs2_multiplier or
// lw_multiplier). The memory (saber_mem) is shared between the multiplier
// and a host port: while the multiplier is busy it owns both memory ports,
// while it is idle the host reads and writes (host reads return one cycle
// after rd_en). A command (req.start with op and the three base addresses)
// is accepted when the unit is idle; rsp.done pulses when it ends.
// The multipliers are drop-in units working on a shared 64-bit memory; the
// host port and the ownership rule are this design's choices.
module saber_mult_unit
  import saber_pkg::*;
#(
  parameter arch_e       ARCH       = ARCH_HS1,
  parameter int unsigned HS1_UNROLL = 1,
  parameter int unsigned MEM_DEPTH  = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  host_req_t req,
  output host_rsp_t rsp
);
  logic  m_busy, m_done, m_rd_en, m_wr_en;
  addr_t m_rd_addr, m_wr_addr;
  word_t m_wr_data, rd_data;

  if (ARCH == ARCH_HS1) begin : g_hs1
    hs1_multiplier #(.UNROLL(HS1_UNROLL)) u_mult (
      .clk, .rst_n, .start(req.start), .op(req.op),
      .sec_base(req.sec_base), .pub_base(req.pub_base), .res_base(req.res_base),
      .busy(m_busy), .done(m_done),
      .rd_en(m_rd_en), .rd_addr(m_rd_addr), .rd_data,
      .wr_en(m_wr_en), .wr_addr(m_wr_addr), .wr_data(m_wr_data)
    );
  end else if (ARCH == ARCH_HS2) begin : g_hs2
    hs2_multiplier u_mult (
      .clk, .rst_n, .start(req.start), .op(req.op),
      .sec_base(req.sec_base), .pub_base(req.pub_base), .res_base(req.res_base),
      .busy(m_busy), .done(m_done),
      .rd_en(m_rd_en), .rd_addr(m_rd_addr), .rd_data,
      .wr_en(m_wr_en), .wr_addr(m_wr_addr), .wr_data(m_wr_data)
    );
  end else begin : g_lw
    lw_multiplier u_mult (
      .clk, .rst_n, .start(req.start), .op(req.op),
      .sec_base(req.sec_base), .pub_base(req.pub_base), .res_base(req.res_base),
      .busy(m_busy), .done(m_done),
      .rd_en(m_rd_en), .rd_addr(m_rd_addr), .rd_data,
      .wr_en(m_wr_en), .wr_addr(m_wr_addr), .wr_data(m_wr_data)
    );
  end

  saber_mem #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk,
    .rd_en  (m_busy ? m_rd_en   : req.rd_en),
    .rd_addr(m_busy ? m_rd_addr : req.rd_addr),
    .rd_data,
    .wr_en  (m_busy ? m_wr_en   : req.wr_en),
    .wr_addr(m_busy ? m_wr_addr : req.wr_addr),
    .wr_data(m_busy ? m_wr_data : req.wr_data)
  );

  assign rsp.busy    = m_busy;
  assign rsp.done    = m_done;
  assign rsp.rd_data = rd_data;
endmodule
