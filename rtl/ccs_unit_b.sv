// ccs_unit_b: type-B unit, one lane of level L1 of the compute unit.
//
// Level L1 is the second map level and the only one with integer multipliers. A unit holds a
// multiplier and an adder/subtracter. It finishes the commands that need a product (MULVV,
// MULVC, IPVV), a square (SQV, and SSDVV after the L0 difference) or an absolute value (ABSV,
// and SADVV after the L0 difference); for every other command it passes the L0 result on.
// Purely combinational; the compute unit registers the result.
//   x  : result of the L0 unit of the same lane
//   y  : element of operand B or the command constant, carried from L0
//   op : operation, from ccs_pkg::decode()
//   r  : result; products keep the low 32 bits (the absolute value uses the subtracter, 0 - x)
module ccs_unit_b
  import ccs_pkg::*;
(
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  b_op_e        op,
  output logic [W-1:0] r
);

  logic [W-1:0] m_in;

  assign m_in = (op == B_SQR) ? x : y;

  always_comb begin
    unique case (op)
      B_MUL, B_SQR: r = x * m_in;
      B_ABS:        r = x[W-1] ? ('0 - x) : x;
      default:      r = x;
    endcase
  end

endmodule
