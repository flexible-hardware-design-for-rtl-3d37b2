// rsa_ecc_pkg: types and constants shared by the RSA/ECC accelerator.
//
// The systolic Montgomery multiplier works on radix-16 digits (alpha = beta = 4
// bits per processing cell, as in the source design). Operand words in the
// shared memory are addressed with 4-bit addresses (16 words, a choice of this
// implementation). A unit command is one 32-bit bus word holding the opcode,
// up to four source addresses, a destination address and a small constant k
// used by the co-processor's subtraction.
package rsa_ecc_pkg;

  // Digit size of a processing cell (alpha = beta = 4).
  localparam int unsigned DIGIT = 4;
  // Width of the carry passed between neighbouring cells. The largest cell sum
  // is 15 + 15*15 + 15*15 + 31 = 496, so the carry never exceeds 31.
  localparam int unsigned CW = 5;
  // Address width of the operand memory (16 words).
  localparam int unsigned AW = 4;
  localparam int unsigned NWORDS = 1 << AW;
  // Host bus data width.
  localparam int unsigned BUS_W = 32;

  // Opcodes of the Montgomery multiplication / exponentiation unit.
  typedef enum logic [1:0] {
    MOP_MUL = 2'd0,   // d = Mont(a, b) mod m
    MOP_EXP = 2'd1    // d = a ^ b mod m, c holds R^2 mod m
  } mmme_op_e;

  // Opcodes of the large number co-processor.
  typedef enum logic [1:0] {
    LOP_ADD  = 2'd0,  // d = a + b
    LOP_SUB  = 2'd1,  // d = a + k*m - b
    LOP_HALF = 2'd2   // d = (a + (a odd ? m : 0)) / 2
  } lncp_op_e;

  // One command word, as written over the bus (bits 25:0).
  typedef struct packed {
    logic [3:0]    k;   // multiple of the modulus added by LOP_SUB
    logic [AW-1:0] d;   // destination word
    logic [AW-1:0] m;   // modulus word
    logic [AW-1:0] c;   // extra source (R^2 mod m for MOP_EXP)
    logic [AW-1:0] b;   // second source / exponent
    logic [AW-1:0] a;   // first source / base
    logic [1:0]    op;  // mmme_op_e or lncp_op_e
  } cmd_t;

  // -n^-1 mod 16 for an odd digit n (Newton step from n^-1 = n mod 8).
  function automatic logic [DIGIT-1:0] neg_inv16(input logic [DIGIT-1:0] n);
    logic [7:0] sq;
    logic [7:0] r;
    sq = 8'(n) * 8'(n);
    r  = 8'(n) * (sq - 8'd2);
    return r[DIGIT-1:0];
  endfunction

endpackage
