// saber_pkg: constants and types shared by the Saber polynomial multipliers.
//
// Saber multiplies polynomials of N = 256 coefficients in Z_q[x]/(x^N + 1)
// with q = 2^13. One operand (the "public" polynomial) has 13-bit
// coefficients; the other (the "secret" polynomial) has small coefficients
// in -4..+4, stored as 4 bits. All multipliers exchange data with a memory
// of 64-bit words: 16 secret coefficients per word (16 words per
// polynomial) and public coefficients packed back to back, 13 bits each
// (52 words per polynomial, coefficient k at stream bits 13k..13k+12).
//
// Secret coefficient encoding (this design's choice): sign-magnitude,
// bit 3 = sign, bits 2:0 = magnitude 0..4. Negating a coefficient during a
// negacyclic shift is then a flip of bit 3.
package saber_pkg;

  localparam int unsigned N          = 256;  // coefficients per polynomial
  localparam int unsigned QW         = 13;   // log2(q), public/accumulator width
  localparam int unsigned SW         = 4;    // secret coefficient width
  localparam int unsigned WORD_W     = 64;   // memory word width
  localparam int unsigned SEC_PER_WORD = WORD_W / SW;        // 16
  localparam int unsigned SEC_WORDS  = N / SEC_PER_WORD;     // 16
  localparam int unsigned PUB_WORDS  = (N * QW) / WORD_W;    // 52
  localparam int unsigned ADDR_W     = 10;   // memory word address width

  typedef logic [QW-1:0]     coeff_t;   // public / accumulator coefficient
  typedef logic [SW-1:0]     scoeff_t;  // secret coefficient, sign-magnitude
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Commands accepted by the multipliers.
  typedef enum logic [1:0] {
    OP_MUL   = 2'd0,  // acc  = a * s
    OP_MAC   = 2'd1,  // acc += a * s   (inner products)
    OP_STORE = 2'd2   // write the accumulator to memory (high-speed only)
  } op_e;

  // Which proposed multiplier a saber_mult_unit holds.
  typedef enum logic [1:0] {
    ARCH_HS1 = 2'd0,  // centralized multiples, 256 or 512 MACs
    ARCH_HS2 = 2'd1,  // 128 DSP-based units
    ARCH_LW  = 2'd2   // lightweight, 4 MACs
  } arch_e;

  // Host side of one multiplier unit: command and memory access.
  typedef struct packed {
    logic  start;
    op_e   op;
    addr_t sec_base;
    addr_t pub_base;
    addr_t res_base;
    logic  rd_en;      // memory access is served only while the unit is idle
    addr_t rd_addr;
    logic  wr_en;
    addr_t wr_addr;
    word_t wr_data;
  } host_req_t;

  typedef struct packed {
    logic  busy;
    logic  done;
    word_t rd_data;    // one cycle after rd_en
  } host_rsp_t;

  // The five multiples {0,1,2,3,4} * a of a public coefficient, index = multiple.
  typedef logic [4:0][QW-1:0] multiples_t;

  function automatic logic sec_neg(scoeff_t s);
    return s[SW-1];
  endfunction

  function automatic logic [2:0] sec_mag(scoeff_t s);
    return s[2:0];
  endfunction

endpackage
