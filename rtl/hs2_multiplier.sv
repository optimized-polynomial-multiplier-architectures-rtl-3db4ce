// hs2_multiplier: high-speed schoolbook multiplier with coefficient products
// in DSP multipliers ("High Speed II").
//
// Same task and interface as hs1_multiplier: acc = a * s or acc += a * s in
// Z_{2^13}[x]/(x^256 + 1). Two outer-loop iterations run per cycle: with the
// secret register holding s' = s * x^i, public coefficients a_i and a_{i+1}
// must add a_i*s'[j] + a_{i+1}*s'[j-1] to every acc[j]. These 512 products
// come from 128 dsp_quad_mult units, unit k taking the secret pair
// (s'[2k], s'[2k+1]) and the public pair (a_i, a_{i+1}):
//   a_i*s'[2k]                         -> acc[2k]
//   a_i*s'[2k+1] + a_{i+1}*s'[2k]      -> acc[2k+1]
//   a_{i+1}*s'[2k+1]                   -> acc[2k+2]  (unit 127: -acc[0])
// so every even accumulator coefficient is updated by two units each cycle
// through a three-way adder. The secret register then shifts by two, giving
// 128 compute cycles plus the 3-cycle product pipeline.
// Operation, commands, memory port and timing of done/busy are as in
// hs1_multiplier: OP_MUL/OP_MAC read 16 secret words then stream the 52
// public words while computing; OP_STORE writes 52 packed words.
// The unit mapping and three-way adder follow the document; the command set,
// memory map and control sequence are this design's choices.
module hs2_multiplier
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
  localparam int unsigned STEPS = N / 2;
  localparam int unsigned DSPS  = N / 2;   // 128 units, fixed by the pair packing

  typedef enum logic [2:0] {S_IDLE, S_LOAD_S, S_COMPUTE, S_DRAIN, S_STORE, S_DONE} state_e;
  state_e state_q;

  logic [4:0]  sreq_q;
  logic        sinfl_q;
  logic [3:0]  sidx_q;
  logic [8:0]  step_q;     // pairs issued to the DSPs
  logic [8:0]  upd_q;      // accumulator updates done
  logic [5:0]  widx_q;
  addr_t       sec_base_q, res_base_q;

  // ---- secret polynomial buffer, shifted by two per cycle
  scoeff_t [N-1:0] s;
  logic            issue;
  secret_shift_buffer #(.SHIFT(2)) u_sec (
    .clk, .load_en(sinfl_q), .load_idx(sidx_q), .load_word(rd_data),
    .shift_en(issue), .s
  );

  // ---- public polynomial buffer, two coefficients per cycle
  logic           p_req, p_avail, p_start;
  addr_t          p_addr;
  coeff_t [1:0]   a;
  pub_coeff_stream #(.STEP(2), .SLOTS(3)) u_pub (
    .clk, .rst_n, .start(p_start), .base(pub_base),
    .rd_req(p_req), .rd_addr(p_addr), .rd_grant(state_q == S_COMPUTE),
    .rd_data, .avail(p_avail), .coeff(a), .consume(issue)
  );

  assign p_start = (state_q == S_IDLE) && start && (op != OP_STORE);
  assign issue   = (state_q == S_COMPUTE) && p_avail && (step_q < 9'(STEPS));

  // ---- DSP units
  coeff_t [DSPS-1:0] p00, pmid, p11;
  logic   [DSPS-1:0] pv;
  for (genvar k = 0; k < int'(DSPS); k++) begin : g_dsp
    dsp_quad_mult u_q (
      .clk, .rst_n, .in_valid(issue),
      .s0(s[2*k]), .s1(s[2*k+1]), .a0(a[0]), .a1(a[1]),
      .out_valid(pv[k]), .p00(p00[k]), .pmid(pmid[k]), .p11(p11[k])
    );
  end

  // ---- three-way accumulator adders
  coeff_t [N-1:0] acc_q, acc_n;
  always_comb begin
    for (int k = 0; k < int'(DSPS); k++) begin
      coeff_t carry_in;
      carry_in = (k == 0) ? coeff_t'(-p11[DSPS-1]) : p11[k-1];
      acc_n[2*k]   = acc_q[2*k] + p00[k] + carry_in;
      acc_n[2*k+1] = acc_q[2*k+1] + pmid[k];
    end
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
      upd_q      <= '0;
      widx_q     <= '0;
      sec_base_q <= '0;
      res_base_q <= '0;
      acc_q      <= '0;
    end else begin
      sinfl_q <= 1'b0;
      if (issue) step_q <= step_q + 9'd1;
      if (pv[0]) begin
        acc_q <= acc_n;
        upd_q <= upd_q + 9'd1;
      end
      unique case (state_q)
        S_IDLE: if (start) begin
          sec_base_q <= sec_base;
          res_base_q <= res_base;
          sreq_q     <= '0;
          step_q     <= '0;
          upd_q      <= '0;
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
        S_COMPUTE: if (issue && step_q == 9'(STEPS - 1)) state_q <= S_DRAIN;
        S_DRAIN:   if (pv[0] && upd_q == 9'(STEPS - 1)) state_q <= S_DONE;
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
