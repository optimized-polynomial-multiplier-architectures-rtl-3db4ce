// pub_coeff_stream: public polynomial buffer (13-bit coefficient unpacker).
//
// The public polynomial is packed in memory as a stream of 13-bit
// coefficients across 52 consecutive 64-bit words, so most words hold a
// coefficient split over a word boundary. Instead of buffering the whole
// polynomial, this block keeps only a small window of SLOTS words. The two
// lowest words form a 128-bit window; a multiplexer extracts STEP
// consecutive coefficients starting at bit offset `off` of the lowest word
// (off = 13k mod 64 for coefficient k). When a consume moves the offset past
// bit 63, the lowest word is dropped and the window moves up one word.
// New words are requested whenever a slot will be free (EARLY_REQ = 1
// counts the slot freed by a consume in the same cycle).
//
// Memory interface: rd_req/rd_addr ask for a read; the read is issued in a
// cycle where rd_req && rd_grant, and rd_data must hold the word in the next
// cycle (one-cycle read latency). Consumer interface: when avail is high,
// coeff[0..STEP-1] are coefficients k..k+STEP-1; consume (only with avail)
// advances k by STEP at the clock edge. start (one cycle) restarts at
// coefficient 0 of the polynomial whose first word is at base.
// SLOTS = 2 gives the two-word buffer of the lightweight multiplier, which
// pauses its computation while a word is read; SLOTS = 3 adds a prefetch word
// so that the high-speed multipliers, which read while they compute, never
// wait. Window size, slot count and request rule are this design's choice.
module pub_coeff_stream
  import saber_pkg::*;
#(
  parameter int unsigned STEP  = 1,   // coefficients consumed per consume
  parameter int unsigned SLOTS = 3,   // words held (2 or 3)
  parameter bit          EARLY_REQ = 1'b1  // count the slot a consume frees this cycle
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  addr_t                base,
  // memory read side
  output logic                 rd_req,
  output addr_t                rd_addr,
  input  logic                 rd_grant,
  input  word_t                rd_data,
  // coefficient side
  output logic                 avail,
  output coeff_t [STEP-1:0]    coeff,
  input  logic                 consume
);
  localparam int unsigned CNT_W = $clog2(SLOTS + 1);

  word_t [SLOTS-1:0] slot_q, slot_n;
  logic [CNT_W-1:0]  cnt_q, cnt_n;       // valid words held
  logic              inflight_q;         // a read was issued last cycle
  logic [6:0]        words_req_q;        // words requested so far
  logic [6:0]        lo_idx_q;           // word index held in slot 0
  logic [5:0]        off_q;              // bit offset of coefficient k in slot 0
  addr_t             base_q;

  logic       shift;
  logic [6:0] off_sum;
  logic       issue;

  assign off_sum = {1'b0, off_q} + 7'(QW * STEP);
  assign shift   = consume && off_sum[6];

  // Reads: keep the slots full, counting the word in flight and the slot a
  // shift frees this cycle.
  // With EARLY_REQ = 0 rd_req does not depend on consume, for a consumer
  // that decides whether to consume from rd_req.
  assign rd_req  = (words_req_q < 7'(PUB_WORDS)) &&
                   ((CNT_W+1)'(cnt_q) + (CNT_W+1)'(inflight_q)
                    - (CNT_W+1)'(EARLY_REQ && shift) < (CNT_W+1)'(SLOTS));
  assign rd_addr = base_q + addr_t'(words_req_q);
  assign issue   = rd_req && rd_grant;

  // The last word never needs a word above it: coefficient 255 ends at bit 63.
  assign avail = (cnt_q >= CNT_W'(2)) ||
                 ((cnt_q >= CNT_W'(1)) && (lo_idx_q == 7'(PUB_WORDS - 1)));

  logic [2*WORD_W-1:0] window;
  assign window = {slot_q[1], slot_q[0]} >> off_q;
  always_comb
    for (int k = 0; k < int'(STEP); k++) coeff[k] = window[QW*k +: QW];

  always_comb begin
    slot_n = slot_q;
    cnt_n  = cnt_q;
    if (shift) begin
      for (int i = 0; i < int'(SLOTS) - 1; i++) slot_n[i] = slot_q[i+1];
      slot_n[SLOTS-1] = '0;
      cnt_n = cnt_q - CNT_W'(1);
    end
    if (inflight_q) begin
      slot_n[cnt_n] = rd_data;
      cnt_n = cnt_n + CNT_W'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q      <= '0;
      cnt_q       <= '0;
      inflight_q  <= 1'b0;
      words_req_q <= 7'(PUB_WORDS);
      lo_idx_q    <= '0;
      off_q       <= '0;
      base_q      <= '0;
    end else if (start) begin
      cnt_q       <= '0;
      inflight_q  <= 1'b0;
      words_req_q <= '0;
      lo_idx_q    <= '0;
      off_q       <= '0;
      base_q      <= base;
    end else begin
      slot_q      <= slot_n;
      cnt_q       <= cnt_n;
      inflight_q  <= issue;
      words_req_q <= words_req_q + 7'(issue);
      if (consume) off_q <= off_sum[5:0];
      if (shift)   lo_idx_q <= lo_idx_q + 7'd1;
    end
  end

  // A consumer may only take coefficients that are there.
  assert property (@(posedge clk) disable iff (!rst_n) consume |-> avail);
endmodule
