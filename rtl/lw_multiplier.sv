// lw_multiplier: lightweight schoolbook polynomial multiplier with 4 MACs.
//
// Computes r = a * s (OP_MUL) or r += a * s (OP_MAC) in
// Z_{2^13}[x]/(x^256 + 1) while holding only one 64-bit block of each
// operand, plus one more secret block. The accumulator is never buffered:
// it lives in memory and is read and written back every cycle.
//
// Schedule. The result is built in 16 passes c = 0..15, each owning the
// 16 result coefficients 16c..16c+15. The secret window U holds
// (s * x^i)[16c..16c+15] and a second block L the 16 coefficients just
// below it. Within a pass every public coefficient a_i (i = 0..255) is used
// for 4 cycles; in cycle g the 4 MACs add a_i * U[4g..4g+3] to result
// coefficients 16c+4g..16c+4g+3. After the 4th cycle U and L shift up one
// place together (U[0] takes L[15]), which multiplies the secret window by x.
// U starts as secret block c and L as block c-1; every 16 public
// coefficients L is exhausted and the next lower block is read. A block
// below block 0 wraps to block 15 and is negated as it is loaded, which
// implements the negacyclic wrap (so pass 0 starts with blocks 0 and 15).
// The public polynomial is streamed through a two-word buffer.
// Pipeline: stage 1 issues the read of the 4 result coefficients and
// registers a_i and the 4 secret coefficients; stage 2 forms the multiples
// {0..4}*a_i once (multiple_gen), lets each MAC select and add (coeff_mac)
// and writes the word back. Reading a public or secret word takes the read
// port, so the computation pauses for it.
//
// Memory map (this design's choice): secret 16 words at sec_base (16 x 4 bit
// per word); public 52 packed words at pub_base; result 64 words at
// res_base, word r holding coefficients 4r..4r+3 in 16-bit lanes (value in
// the low 13 bits of each lane). OP_STORE is not needed (results are
// already in memory) and completes at once. done pulses one cycle at the
// end, busy is high from start to done.
// The 4 MACs, the two-block secret window with negation, the two-word public
// buffer and the per-cycle accumulator read/write follow the document; the
// exact load order, pauses and layout are this design's choices.
module lw_multiplier
  import saber_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  op_e    op,
  input  addr_t  sec_base,
  input  addr_t  pub_base,
  input  addr_t  res_base,
  output logic   busy,
  output logic   done,
  output logic   rd_en,
  output addr_t  rd_addr,
  input  word_t  rd_data,
  output logic   wr_en,
  output addr_t  wr_addr,
  output word_t  wr_data
);
  // Four MACs: 4 x 13 result bits are the most one 64-bit write can carry,
  // so the count is fixed rather than a parameter.
  localparam int unsigned MACS   = 4;
  localparam int unsigned BLK    = SEC_PER_WORD;   // 16 coefficients per block
  localparam int unsigned GROUPS = BLK / MACS;     // cycles per public coefficient
  localparam int unsigned LANE   = WORD_W / MACS;  // 16-bit lanes

  typedef enum logic [2:0] {S_IDLE, S_PASS, S_RUN, S_DRAIN, S_DONE} state_e;
  state_e state_q;

  logic [3:0] c_q;          // pass
  logic [8:0] i_q;          // public coefficient
  logic [1:0] g_q;          // group within coefficient
  logic       clear_q;      // OP_MUL: first touch of a coefficient reads as 0
  addr_t      sec_base_q, pub_base_q, res_base_q;

  scoeff_t [BLK-1:0] u_q, l_q;     // secret window and block below it
  logic       u_infl_q;            // U read in flight
  logic       l_need_q, l_infl_q;  // L must be read / is in flight
  logic       l_neg_q;             // negate L when it arrives

  // ---- public coefficient buffer (two words)
  logic   p_req, p_avail, p_start, p_grant, p_consume;
  addr_t  p_addr;
  coeff_t [0:0] a;
  pub_coeff_stream #(.STEP(1), .SLOTS(2), .EARLY_REQ(1'b0)) u_pub (
    .clk, .rst_n, .start(p_start), .base(pub_base_q),
    .rd_req(p_req), .rd_addr(p_addr), .rd_grant(p_grant),
    .rd_data, .avail(p_avail), .coeff(a), .consume(p_consume)
  );

  // ---- read port arbitration in S_RUN: secret block, public word, compute
  logic l_issue, compute;
  assign l_issue   = (state_q == S_RUN) && l_need_q;
  assign p_grant   = (state_q == S_RUN) && !l_need_q && p_req;
  assign compute   = (state_q == S_RUN) && !l_need_q && !l_infl_q && !p_req && p_avail;
  assign p_consume = compute && (g_q == 2'(GROUPS - 1));
  assign p_start   = (state_q == S_PASS);

  // next lower secret block for L: c - 1 - i/16, wrapped and negated if < 0
  logic signed [5:0] lblk;
  assign lblk = $signed({2'b00, c_q}) - 6'sd1 - $signed({2'b00, i_q[7:4]});

  always_comb begin
    rd_en   = 1'b0;
    rd_addr = res_base_q + addr_t'({c_q, g_q});     // 4c + g
    if (state_q == S_PASS) begin
      rd_en   = 1'b1;
      rd_addr = sec_base_q + addr_t'(c_q);
    end else if (l_issue) begin
      rd_en   = 1'b1;
      rd_addr = sec_base_q + addr_t'(lblk[3:0]);
    end else if (p_grant) begin
      rd_en   = 1'b1;
      rd_addr = p_addr;
    end else if (compute) begin
      rd_en   = 1'b1;
    end
  end

  // ---- stage 2: MACs on the word read in stage 1
  logic               v2_q, zero2_q;
  addr_t              addr2_q;
  coeff_t             a2_q;
  scoeff_t [MACS-1:0] s2_q;
  multiples_t         mult;
  coeff_t  [MACS-1:0] acc_in, acc_out;

  multiple_gen u_mg (.a(a2_q), .mult);
  for (genvar k = 0; k < int'(MACS); k++) begin : g_mac
    assign acc_in[k] = zero2_q ? '0 : rd_data[LANE*k +: QW];
    coeff_mac u_mac (.mult, .s(s2_q[k]), .acc_in(acc_in[k]), .acc_out(acc_out[k]));
    assign wr_data[LANE*k +: LANE] = LANE'(acc_out[k]);
  end
  assign wr_en   = v2_q;
  assign wr_addr = addr2_q;

  assign busy = (state_q != S_IDLE);
  assign done = (state_q == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      c_q <= '0; i_q <= '0; g_q <= '0; clear_q <= 1'b0;
      sec_base_q <= '0; pub_base_q <= '0; res_base_q <= '0;
      u_q <= '0; l_q <= '0;
      u_infl_q <= 1'b0; l_need_q <= 1'b0; l_infl_q <= 1'b0; l_neg_q <= 1'b0;
      v2_q <= 1'b0; zero2_q <= 1'b0; addr2_q <= '0; a2_q <= '0; s2_q <= '0;
    end else begin
      // secret words arriving
      u_infl_q <= 1'b0;
      l_infl_q <= 1'b0;
      if (u_infl_q) u_q <= rd_data;
      if (l_infl_q)
        for (int t = 0; t < int'(BLK); t++)
          l_q[t] <= {rd_data[SW*t+SW-1] ^ l_neg_q, rd_data[SW*t +: SW-1]};

      // stage 1 -> stage 2
      v2_q <= compute;
      if (compute) begin
        addr2_q <= rd_addr;
        zero2_q <= clear_q && (i_q == 9'd0);
        a2_q    <= a[0];
        for (int k = 0; k < int'(MACS); k++) s2_q[k] <= u_q[MACS*g_q + k];
        g_q <= g_q + 2'd1;
        if (g_q == 2'(GROUPS - 1)) begin
          // multiply the window by x
          u_q <= {u_q[BLK-2:0], l_q[BLK-1]};
          l_q <= {l_q[BLK-2:0], scoeff_t'(0)};
          i_q <= i_q + 9'd1;
          if (i_q[3:0] == 4'hF && i_q != 9'(N - 1)) l_need_q <= 1'b1;
          if (i_q == 9'(N - 1)) state_q <= S_DRAIN;
        end
      end

      if (l_issue) begin
        l_need_q <= 1'b0;
        l_infl_q <= 1'b1;
        l_neg_q  <= lblk[5];
      end

      unique case (state_q)
        S_IDLE: if (start) begin
          sec_base_q <= sec_base;
          pub_base_q <= pub_base;
          res_base_q <= res_base;
          clear_q    <= (op == OP_MUL);
          c_q        <= '0;
          state_q    <= (op == OP_STORE) ? S_DONE : S_PASS;
        end
        S_PASS: begin       // read block c into U, restart the public stream
          u_infl_q <= 1'b1;
          i_q      <= '0;
          g_q      <= '0;
          l_need_q <= 1'b1;
          state_q  <= S_RUN;
        end
        S_RUN: ;
        S_DRAIN: begin      // last stage-2 write happens this cycle
          if (c_q == 4'(SEC_WORDS - 1)) state_q <= S_DONE;
          else begin
            c_q     <= c_q + 4'd1;
            state_q <= S_PASS;
          end
        end
        S_DONE:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The accumulator word of a group is never read while its write is pending.
  assert property (@(posedge clk) disable iff (!rst_n) (v2_q && compute) |-> (rd_addr != addr2_q));
endmodule
