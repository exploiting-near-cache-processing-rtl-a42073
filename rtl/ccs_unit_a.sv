// ccs_unit_a: type-A unit, one lane of level L0 of the compute unit.
//
// Level L0 is the first map level. Its units hold an adder/subtracter, a shift unit and a logic
// unit, as the document describes; the comparisons (LESSVC, GRTRVC, EQUVC) and the two's
// complement (COMP2) reuse the adder/subtracter, and the constant of INITC is passed through.
// Purely combinational; the compute unit registers the result.
//   a  : element of operand A
//   y  : element of operand B (two-vector commands) or the command constant k
//   op : operation, from ccs_pkg::decode()
//   r  : result
// Choices of this design, not given by the document: shift and rotate amounts are taken modulo
// 32 (the low 5 bits of y); SLA shifts left and keeps the sign bit; SRA replicates the sign bit;
// comparisons are signed and give 1 or 0.
module ccs_unit_a
  import ccs_pkg::*;
(
  input  logic [W-1:0] a,
  input  logic [W-1:0] y,
  input  a_op_e        op,
  output logic [W-1:0] r
);

  logic [SHW-1:0] sh;
  logic [W-1:0]   diff;
  logic [W-1:0]   sll_v;
  logic [2*W-1:0] rol_v, ror_v;   // rotates as shifts of the doubled word

  assign sh    = y[SHW-1:0];
  assign diff  = a - y;
  assign sll_v = a << sh;
  assign rol_v = {a, a} << sh;
  assign ror_v = {a, a} >> sh;

  always_comb begin
    unique case (op)
      A_PASS:  r = a;
      A_ADD:   r = a + y;
      A_SUB:   r = diff;
      A_NEG:   r = '0 - a;
      A_LT:    r = W'($signed(a) < $signed(y));
      A_GT:    r = W'($signed(a) > $signed(y));
      A_EQ:    r = W'(diff == '0);
      A_SLL:   r = sll_v;
      A_SRL:   r = a >> sh;
      A_SLA:   r = {a[W-1], sll_v[W-2:0]};
      A_SRA:   r = W'($signed(a) >>> sh);
      A_ROL:   r = rol_v[2*W-1:W];
      A_ROR:   r = ror_v[W-1:0];
      A_AND:   r = a & y;
      A_NAND:  r = ~(a & y);
      A_OR:    r = a | y;
      A_NOR:   r = ~(a | y);
      A_XOR:   r = a ^ y;
      A_XNOR:  r = ~(a ^ y);
      A_NOT:   r = ~a;
      A_CONST: r = y;
      default: r = a;
    endcase
  end

endmodule
