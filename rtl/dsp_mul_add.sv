// dsp_mul_add: model of an FPGA DSP slice used as an unsigned multiplier
// with post-adder.
//
// p = a * b + c modulo 2^48, with a 26 bits and b 17 bits unsigned (the
// unsigned operand sizes of a 27x18 signed DSP multiplier) and c 48 bits.
// Two register stages as in a DSP slice: input registers (A, B, C), then the
// product-plus-addend register (P). Latency 2 cycles, one operation per
// cycle, no stall. Written as plain RTL so a synthesizer can map it onto a
// DSP; the stage count is this design's choice.
module dsp_mul_add (
  input  logic        clk,
  input  logic [25:0] a,
  input  logic [16:0] b,
  input  logic [47:0] c,
  output logic [47:0] p
);
  logic [25:0] a_q;
  logic [16:0] b_q;
  logic [47:0] c_q;

  always_ff @(posedge clk) begin
    a_q <= a;
    b_q <= b;
    c_q <= c;
    p   <= 48'(a_q * b_q) + c_q;
  end
endmodule
