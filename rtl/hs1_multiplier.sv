// hs1_multiplier: high-speed schoolbook multiplier with a centralized
// coefficient multiplier ("High Speed I").
//
// Computes acc = a * s (or acc += a * s) in Z_{2^13}[x]/(x^256 + 1), where s
// is the secret polynomial (coefficients -4..4) and a the public polynomial
// (13-bit coefficients). The whole secret polynomial sits in a negacyclic
// shift register and the whole accumulator (256 x 13 bits) in registers.
// Each cycle UNROLL public coefficients a_i .. a_{i+UNROLL-1} are taken from
// the public buffer. For each of them one multiple_gen computes the multiples
// {0,1,2,3,4}*a once, and 256 select-and-add MACs (coeff_mac) update every
// accumulator coefficient: acc[j] += a_{i+u} * (s * x^(i+u))[j]. The secret
// register then shifts by UNROLL. UNROLL = 1 gives 256 MACs and 256
// compute cycles; UNROLL = 2 gives 512 MACs and 128 cycles (the outer loop
// of the schoolbook algorithm unrolled twice).
//
// Operation (op sampled with start while idle):
//   OP_MUL / OP_MAC: read the 16 secret words at sec_base (OP_MUL also clears
//     the accumulator), then stream the 52 public words from pub_base while
//     computing; public reads overlap the computation.
//   OP_STORE: write the accumulator as 52 packed words (coefficient k at
//     stream bits 13k..13k+12) to res_base, one word per cycle.
// done pulses for one cycle at the end; busy is high from start to done.
// Memory: one read port with one-cycle latency, one write port.
// The architecture follows the document; the command set, memory map,
// control sequence and the public buffer (pub_coeff_stream) are this
// design's choices.
module hs1_multiplier
  import saber_pkg::*;
#(
  parameter int unsigned UNROLL = 1   // public coefficients per cycle (MACs = 256*UNROLL)
) (
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
  localparam int unsigned STEPS = N / UNROLL;   // compute cycles

  typedef enum logic [2:0] {S_IDLE, S_LOAD_S, S_COMPUTE, S_STORE, S_DONE} state_e;
  state_e state_q;

  logic [4:0]  sreq_q;         // secret words requested
  logic        sinfl_q;        // a secret read is in flight
  logic [3:0]  sidx_q;         // index of the word in flight
  logic [8:0]  step_q;         // compute steps done
  logic [5:0]  widx_q;         // store word index
  addr_t       sec_base_q, res_base_q;

  // ---- secret polynomial buffer
  scoeff_t [N-1:0] s;
  logic            s_shift;
  secret_shift_buffer #(.SHIFT(UNROLL)) u_sec (
    .clk, .load_en(sinfl_q), .load_idx(sidx_q), .load_word(rd_data),
    .shift_en(s_shift), .s
  );

  // ---- public polynomial buffer
  logic                 p_req, p_avail, p_consume, p_start;
  addr_t                p_addr;
  coeff_t [UNROLL-1:0]  a;
  pub_coeff_stream #(.STEP(UNROLL), .SLOTS(3)) u_pub (
    .clk, .rst_n, .start(p_start), .base(pub_base),
    .rd_req(p_req), .rd_addr(p_addr), .rd_grant(state_q == S_COMPUTE),
    .rd_data, .avail(p_avail), .coeff(a), .consume(p_consume)
  );

  assign p_start   = (state_q == S_IDLE) && start && (op != OP_STORE);
  assign p_consume = (state_q == S_COMPUTE) && p_avail;
  assign s_shift   = p_consume;

  // ---- centralized multiples, one generator per coefficient in flight
  multiples_t [UNROLL-1:0] mult;
  for (genvar u = 0; u < int'(UNROLL); u++) begin : g_mgen
    multiple_gen u_mg (.a(a[u]), .mult(mult[u]));
  end

  // ---- MAC array: (s * x^u)[j] feeds the u-th MAC of accumulator j
  coeff_t [N-1:0] acc_q, acc_n;
  for (genvar j = 0; j < int'(N); j++) begin : g_mac
    coeff_t [UNROLL:0] chain;
    assign chain[0] = acc_q[j];
    for (genvar u = 0; u < int'(UNROLL); u++) begin : g_u
      scoeff_t su;
      if (j >= u) begin : g_in
        assign su = s[j-u];
      end else begin : g_wrap
        assign su = {~s[N-u+j][SW-1], s[N-u+j][SW-2:0]};
      end
      coeff_mac u_mac (.mult(mult[u]), .s(su), .acc_in(chain[u]), .acc_out(chain[u+1]));
    end
    assign acc_n[j] = chain[UNROLL];
  end

  // ---- memory ports
  always_comb begin
    rd_en   = 1'b0;
    rd_addr = p_addr;
    if (state_q == S_LOAD_S && sreq_q < 5'(SEC_WORDS)) begin
      rd_en   = 1'b1;
      rd_addr = sec_base_q + addr_t'(sreq_q);
    end else if (state_q == S_COMPUTE) begin
      rd_en   = p_req;
    end
  end

  logic [N*QW-1:0] acc_flat;
  assign acc_flat = acc_q;
  assign wr_en   = (state_q == S_STORE);
  assign wr_addr = res_base_q + addr_t'(widx_q);
  assign wr_data = acc_flat[WORD_W*widx_q +: WORD_W];

  assign busy = (state_q != S_IDLE);
  assign done = (state_q == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      sreq_q     <= '0;
      sinfl_q    <= 1'b0;
      sidx_q     <= '0;
      step_q     <= '0;
      widx_q     <= '0;
      sec_base_q <= '0;
      res_base_q <= '0;
      acc_q      <= '0;
    end else begin
      sinfl_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          sec_base_q <= sec_base;
          res_base_q <= res_base;
          sreq_q     <= '0;
          step_q     <= '0;
          widx_q     <= '0;
          if (op == OP_STORE) state_q <= S_STORE;
          else begin
            if (op == OP_MUL) acc_q <= '0;
            state_q <= S_LOAD_S;
          end
        end
        S_LOAD_S: begin
          if (sreq_q < 5'(SEC_WORDS)) begin
            sreq_q  <= sreq_q + 5'd1;
            sinfl_q <= 1'b1;
            sidx_q  <= sreq_q[3:0];
          end else if (!sinfl_q) begin
            state_q <= S_COMPUTE;
          end
        end
        S_COMPUTE: if (p_consume) begin
          acc_q  <= acc_n;
          step_q <= step_q + 9'd1;
          if (step_q == 9'(STEPS - 1)) state_q <= S_DONE;
        end
        S_STORE: begin
          widx_q <= widx_q + 6'd1;
          if (widx_q == 6'(PUB_WORDS - 1)) state_q <= S_DONE;
        end
        S_DONE:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
