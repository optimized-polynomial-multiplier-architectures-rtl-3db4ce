// dsp_quad_mult: four coefficient-wise products with one DSP multiplier.
//
// Inputs: two secret coefficients s0, s1 (sign-magnitude, |s| <= 4) and two
// public coefficients a0, a1 (13 bits). Outputs, modulo 2^13:
//   p00 = a0*s0,  pmid = a0*s1 + a1*s0,  p11 = a1*s1.
// How it works:
//  * Sign handling: the DSP multiplies magnitudes only. If s0 and s1 differ
//    in sign (XOR of the sign bits), a0 is replaced by -a0 mod 2^13. The
//    unpacked fields are then negated: the middle one if s0 < 0, the outer
//    two if s1 < 0.
//  * Packing with a 15-bit lane: A = a0' + a1*2^15 (28 bits),
//    S = |s0| + |s1|*2^15 (18 bits). Then A*S holds a0'|s0| in bits 14..0,
//    the middle sum from bit 15 and a1|s1| from bit 30.
//  * Split for the 26x17 DSP: A = a + a'*2^26, S = s + s'*2^17. The DSP
//    computes a*s + C, where the small LUT multiplier supplies
//    C = (a'*s) << 26 + (a*s') << 17 (a 4-to-1 and a 2-to-1 selection with
//    shifts and adds). a'*s'*2^43 only touches bits above those kept.
//  * Overflow fix: the middle sum can reach 16 bits and carry one into the
//    a1|s1| field. Its lowest bit must equal a1[0] & |s1|[0]; if it does not,
//    one is subtracted from that field.
// Timing: inputs are taken every cycle; outputs appear 3 cycles later
// (2 DSP stages plus an output register), with in_valid delayed alongside as
// out_valid. The technique (packing, sign rule, split, overflow check)
// follows the document; the pipeline depth is this design's choice.
module dsp_quad_mult
  import saber_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  scoeff_t s0,
  input  scoeff_t s1,
  input  coeff_t  a0,
  input  coeff_t  a1,
  output logic    out_valid,
  output coeff_t  p00,
  output coeff_t  pmid,
  output coeff_t  p11
);
  // ---- sign handling and packing
  logic       neg0, neg1;
  coeff_t     a0s;          // +-a0
  logic [27:0] A;
  logic [17:0] S;
  assign neg0 = sec_neg(s0) && (sec_mag(s0) != 3'd0);
  assign neg1 = sec_neg(s1) && (sec_mag(s1) != 3'd0);
  assign a0s  = (neg0 ^ neg1) ? coeff_t'(-a0) : a0;
  assign A    = {a1, 2'b00, a0s};
  assign S    = {sec_mag(s1), 12'd0, sec_mag(s0)};

  // ---- small LUT multiplier: a'*s << 26 + a*s' << 17
  logic [1:0]  a_hi;    // a'
  logic        s_hi;    // s'
  logic [25:0] a_lo;
  logic [16:0] s_lo;
  logic [47:0] c_small;
  assign a_hi = A[27:26];
  assign s_hi = S[17];
  assign a_lo = A[25:0];
  assign s_lo = S[16:0];
  always_comb begin
    logic [18:0] ahs;   // a' * s, a' in 0..3: select 0, s, 2s or 3s
    unique case (a_hi)
      2'd0: ahs = '0;
      2'd1: ahs = 19'(s_lo);
      2'd2: ahs = 19'(s_lo) << 1;
      default: ahs = 19'(s_lo) + (19'(s_lo) << 1);
    endcase
    c_small = (48'(ahs) << 26) + (s_hi ? (48'(a_lo) << 17) : 48'd0);
  end

  // ---- DSP
  logic [47:0] p;
  dsp_mul_add u_dsp (.clk, .a(a_lo), .b(s_lo), .c(c_small), .p);

  // side-band pipeline matching the DSP latency
  logic [1:0] v_d, n0_d, n1_d, fixbit_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= '0; n0_d <= '0; n1_d <= '0; fixbit_d <= '0;
    end else begin
      v_d      <= {v_d[0], in_valid};
      n0_d     <= {n0_d[0], neg0};
      n1_d     <= {n1_d[0], neg1};
      fixbit_d <= {fixbit_d[0], a1[0] & S[15]};
    end
  end

  // ---- unpack, overflow fix, sign correction, output register
  coeff_t f00, fmid, f11;
  always_comb begin
    f00  = p[12:0];
    fmid = p[27:15];
    f11  = p[42:30];
    if (p[30] != fixbit_d[1]) f11 = f11 - coeff_t'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p00 <= '0; pmid <= '0; p11 <= '0;
    end else begin
      out_valid <= v_d[1];
      p00  <= n1_d[1] ? coeff_t'(-f00)  : f00;
      pmid <= n0_d[1] ? coeff_t'(-fmid) : fmid;
      p11  <= n1_d[1] ? coeff_t'(-f11)  : f11;
    end
  end
endmodule
