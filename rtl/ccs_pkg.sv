// ccs_pkg: constants, command set and command decoder of the Cache Compute System (CCS).
//
// The CCS is a cache with a vector compute unit (CU) beside it. The CU has a map part of two
// levels (L0: type-A units, L1: type-B units) and a binary reduction tree of type-C units with
// an accumulation level at its root. This package holds what those modules share:
//   * the 48 commands of the CCS instruction set (4 classes of operand: VOP2, VCOP, VOP1, COP),
//   * the operation each unit type performs, and
//   * decode(), which splits a command into the operation of every level.
// The command list and its classes follow the document's command table. The numeric command
// identifiers are this design's choice (the table order, 0..47); identifiers 48..63 are invalid.
// Elements are 32-bit two's-complement integers; compares, MIN/MAX and ABS are signed.
package ccs_pkg;

  localparam int unsigned W          = 32;   // element width in bits
  localparam int unsigned LINE_WORDS = 64;   // 2048-bit cache line / 32-bit element
  localparam int unsigned SHW        = $clog2(W);

  typedef enum logic [5:0] {
    // arithmetic, two vectors
    ADDVV = 6'd0,  SUBVV = 6'd1,  MULVV = 6'd2,  SSDVV = 6'd3,  SADVV = 6'd4,  IPVV  = 6'd5,
    // arithmetic, vector and constant
    ADDVC = 6'd6,  SUBVC = 6'd7,  MULVC = 6'd8,  LESSVC = 6'd9, GRTRVC = 6'd10, EQUVC = 6'd11,
    // arithmetic, one vector
    COMP2 = 6'd12, SQV   = 6'd13, ABSV  = 6'd14, ADDV  = 6'd15, MAXV  = 6'd16, MINV  = 6'd17,
    // shift, two vectors
    SLLVV = 6'd18, SRLVV = 6'd19, SLAVV = 6'd20, SRAVV = 6'd21, ROLVV = 6'd22, RORVV = 6'd23,
    // shift, vector and constant
    SLLVC = 6'd24, SRLVC = 6'd25, SLAVC = 6'd26, SRAVC = 6'd27, ROLVC = 6'd28, RORVC = 6'd29,
    // logic, two vectors
    ANDVV = 6'd30, NANDVV = 6'd31, ORVV = 6'd32, NORVV = 6'd33, XORVV = 6'd34, XNORVV = 6'd35,
    // logic, vector and constant
    ANDVC = 6'd36, NANDVC = 6'd37, ORVC = 6'd38, NORVC = 6'd39, XORVC = 6'd40, XNORVC = 6'd41,
    // logic, one vector
    NOTV  = 6'd42, ANDV  = 6'd43, ORV   = 6'd44, XORV  = 6'd45,
    // move
    INITC = 6'd46, COPYV = 6'd47
  } cmd_e;

  // operand class of a command
  typedef enum logic [1:0] {K_VOP2, K_VCOP, K_VOP1, K_COP} kind_e;

  // type-A unit (level L0): adder/subtracter, shifter, logic unit
  typedef enum logic [4:0] {
    A_PASS, A_ADD, A_SUB, A_NEG, A_LT, A_GT, A_EQ,
    A_SLL, A_SRL, A_SLA, A_SRA, A_ROL, A_ROR,
    A_AND, A_NAND, A_OR, A_NOR, A_XOR, A_XNOR, A_NOT, A_CONST
  } a_op_e;

  // type-B unit (level L1): adder/subtracter and multiplier
  typedef enum logic [1:0] {B_PASS, B_MUL, B_SQR, B_ABS} b_op_e;

  // type-C unit (reduction levels and accumulation): adder/comparator, trimmed logic unit
  typedef enum logic [2:0] {C_ADD, C_MAX, C_MIN, C_AND, C_OR, C_XOR} c_op_e;

  typedef struct packed {
    logic  valid;    // identifier names one of the 48 commands
    kind_e kind;     // which operands are fetched
    logic  reduce;   // result is one word (reduce) or a vector (map)
    a_op_e a_op;
    b_op_e b_op;
    c_op_e c_op;
  } dec_t;

  // programming registers of the CU (the execution mask is kept apart: its width is N)
  typedef struct packed {
    logic [5:0]  cmd;      // 0x00 command identifier
    logic [31:0] len;      // 0x04 number of elements of the operands
    logic [31:0] konst;    // 0x08 constant k
    logic [31:0] a_addr;   // 0x0c byte address of operand A
    logic [31:0] b_addr;   // 0x10 byte address of operand B
    logic [31:0] r_addr;   // 0x14 byte address of the result
    logic [31:0] stride;   // 0x18 element stride, in words
  } cfg_t;

  // register word indices (byte offset / 4)
  localparam logic [3:0] R_CMD = 4'h0, R_LEN = 4'h1, R_CONST = 4'h2, R_AADDR = 4'h3,
                         R_BADDR = 4'h4, R_RADDR = 4'h5, R_STRIDE = 4'h6, R_MASKLO = 4'h7,
                         R_MASKHI = 4'h8, R_RSVD = 4'h9, R_START = 4'ha, R_READY = 4'hb;

  function automatic dec_t decode(logic [5:0] id);
    dec_t d;
    d = '{valid: 1'b1, kind: K_VOP2, reduce: 1'b0, a_op: A_PASS, b_op: B_PASS, c_op: C_ADD};
    unique case (id)
      ADDVV:  d.a_op = A_ADD;
      SUBVV:  d.a_op = A_SUB;
      MULVV:  d.b_op = B_MUL;
      SSDVV:  begin d.a_op = A_SUB; d.b_op = B_SQR; d.reduce = 1'b1; end
      SADVV:  begin d.a_op = A_SUB; d.b_op = B_ABS; d.reduce = 1'b1; end
      IPVV:   begin d.b_op = B_MUL; d.reduce = 1'b1; end
      ADDVC:  begin d.kind = K_VCOP; d.a_op = A_ADD; end
      SUBVC:  begin d.kind = K_VCOP; d.a_op = A_SUB; end
      MULVC:  begin d.kind = K_VCOP; d.b_op = B_MUL; end
      LESSVC: begin d.kind = K_VCOP; d.a_op = A_LT; end
      GRTRVC: begin d.kind = K_VCOP; d.a_op = A_GT; end
      EQUVC:  begin d.kind = K_VCOP; d.a_op = A_EQ; end
      COMP2:  begin d.kind = K_VOP1; d.a_op = A_NEG; end
      SQV:    begin d.kind = K_VOP1; d.b_op = B_SQR; end
      ABSV:   begin d.kind = K_VOP1; d.b_op = B_ABS; end
      ADDV:   begin d.kind = K_VOP1; d.reduce = 1'b1; d.c_op = C_ADD; end
      MAXV:   begin d.kind = K_VOP1; d.reduce = 1'b1; d.c_op = C_MAX; end
      MINV:   begin d.kind = K_VOP1; d.reduce = 1'b1; d.c_op = C_MIN; end
      SLLVV:  d.a_op = A_SLL;
      SRLVV:  d.a_op = A_SRL;
      SLAVV:  d.a_op = A_SLA;
      SRAVV:  d.a_op = A_SRA;
      ROLVV:  d.a_op = A_ROL;
      RORVV:  d.a_op = A_ROR;
      SLLVC:  begin d.kind = K_VCOP; d.a_op = A_SLL; end
      SRLVC:  begin d.kind = K_VCOP; d.a_op = A_SRL; end
      SLAVC:  begin d.kind = K_VCOP; d.a_op = A_SLA; end
      SRAVC:  begin d.kind = K_VCOP; d.a_op = A_SRA; end
      ROLVC:  begin d.kind = K_VCOP; d.a_op = A_ROL; end
      RORVC:  begin d.kind = K_VCOP; d.a_op = A_ROR; end
      ANDVV:  d.a_op = A_AND;
      NANDVV: d.a_op = A_NAND;
      ORVV:   d.a_op = A_OR;
      NORVV:  d.a_op = A_NOR;
      XORVV:  d.a_op = A_XOR;
      XNORVV: d.a_op = A_XNOR;
      ANDVC:  begin d.kind = K_VCOP; d.a_op = A_AND; end
      NANDVC: begin d.kind = K_VCOP; d.a_op = A_NAND; end
      ORVC:   begin d.kind = K_VCOP; d.a_op = A_OR; end
      NORVC:  begin d.kind = K_VCOP; d.a_op = A_NOR; end
      XORVC:  begin d.kind = K_VCOP; d.a_op = A_XOR; end
      XNORVC: begin d.kind = K_VCOP; d.a_op = A_XNOR; end
      NOTV:   begin d.kind = K_VOP1; d.a_op = A_NOT; end
      ANDV:   begin d.kind = K_VOP1; d.reduce = 1'b1; d.c_op = C_AND; end
      ORV:    begin d.kind = K_VOP1; d.reduce = 1'b1; d.c_op = C_OR; end
      XORV:   begin d.kind = K_VOP1; d.reduce = 1'b1; d.c_op = C_XOR; end
      INITC:  begin d.kind = K_COP;  d.a_op = A_CONST; end
      COPYV:  d.kind = K_VOP1;
      default: d.valid = 1'b0;
    endcase
    return d;
  endfunction

endpackage
