// saber_poly_mult_top: the proposed Saber polynomial multipliers side by
// side, each with its own 64-bit memory and host port.
//
//   hs1_256: "High Speed I", centralized multiple generation feeding 256
//        select-and-add MACs, 256 compute cycles;
//   hs1_512: the same with 512 MACs (two public coefficients per cycle),
//        128 compute cycles;
//   hs2: "High Speed II", 128 DSP-based units with four products each,
//        128 compute cycles plus a 3-cycle pipeline;
//   lw:  lightweight, 4 MACs, accumulator kept in memory, 18,513 cycles
//        per multiplication including its memory traffic.
// The three units are independent alternatives for the multiplier of a Saber
// processor; each computes a*s or a*s + previous result in
// Z_{2^13}[x]/(x^256 + 1). See saber_mult_unit for the host protocol and each
// multiplier for its memory map and timing.
module saber_poly_mult_top
  import saber_pkg::*;
#(
  parameter int unsigned MEM_DEPTH  = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  host_req_t hs1_256_req,
  output host_rsp_t hs1_256_rsp,
  input  host_req_t hs1_512_req,
  output host_rsp_t hs1_512_rsp,
  input  host_req_t hs2_req,
  output host_rsp_t hs2_rsp,
  input  host_req_t lw_req,
  output host_rsp_t lw_rsp
);
  saber_mult_unit #(.ARCH(ARCH_HS1), .HS1_UNROLL(1), .MEM_DEPTH(MEM_DEPTH)) u_hs1_256 (
    .clk, .rst_n, .req(hs1_256_req), .rsp(hs1_256_rsp)
  );
  saber_mult_unit #(.ARCH(ARCH_HS1), .HS1_UNROLL(2), .MEM_DEPTH(MEM_DEPTH)) u_hs1_512 (
    .clk, .rst_n, .req(hs1_512_req), .rsp(hs1_512_rsp)
  );
  saber_mult_unit #(.ARCH(ARCH_HS2), .MEM_DEPTH(MEM_DEPTH)) u_hs2 (
    .clk, .rst_n, .req(hs2_req), .rsp(hs2_rsp)
  );
  saber_mult_unit #(.ARCH(ARCH_LW), .MEM_DEPTH(MEM_DEPTH)) u_lw (
    .clk, .rst_n, .req(lw_req), .rsp(lw_rsp)
  );
endmodule
