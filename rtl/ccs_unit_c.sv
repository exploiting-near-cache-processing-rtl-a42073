// ccs_unit_c: type-C unit, one node of the reduction tree (and of its accumulation level).
//
// A node combines two elements of the level below. It holds an adder/subtracter (used for the
// sum and, as a comparator, for MAX and MIN) and a trimmed logic unit (AND, OR, XOR). Each
// element comes with a mask bit saying whether it takes part. As the document describes, when
// both are valid the node performs the level's operation, when only one is valid it outputs that
// one, and the output mask bit is the OR of the two. With neither valid the output value is 0.
// Purely combinational; the compute unit registers each level.
//   a, b   : elements, ma, mb their mask bits
//   op     : reduction operation, from ccs_pkg::decode()
//   r, mr  : result and its mask bit
// MAX and MIN compare signed.
module ccs_unit_c
  import ccs_pkg::*;
(
  input  logic [W-1:0] a,
  input  logic         ma,
  input  logic [W-1:0] b,
  input  logic         mb,
  input  c_op_e        op,
  output logic [W-1:0] r,
  output logic         mr
);

  logic [W-1:0] both;
  logic         a_lt_b;

  assign a_lt_b = $signed(a) < $signed(b);

  always_comb begin
    unique case (op)
      C_ADD:   both = a + b;
      C_MAX:   both = a_lt_b ? b : a;
      C_MIN:   both = a_lt_b ? a : b;
      C_AND:   both = a & b;
      C_OR:    both = a | b;
      C_XOR:   both = a ^ b;
      default: both = a + b;
    endcase
  end

  always_comb begin
    unique case ({ma, mb})
      2'b11:   r = both;
      2'b10:   r = a;
      2'b01:   r = b;
      default: r = '0;
    endcase
  end

  assign mr = ma | mb;

endmodule
