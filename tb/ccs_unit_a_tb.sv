// ccs_unit_a_tb: checks the L0 type-A unit on every operation with random and corner operands,
// against the reference model of the commands that use that operation.
module ccs_unit_a_tb;
  import ccs_pkg::*;
  import ccs_ref_pkg::*;

  logic [31:0] a, y, r;
  a_op_e       op;
  int          checks = 0, failures = 0;

  ccs_unit_a dut (.a, .y, .op, .r);

  // one command per L0 operation (the command whose L0 step it is)
  a_op_e ops  [20] = '{A_ADD, A_SUB, A_LT, A_GT, A_EQ, A_NEG, A_SLL, A_SRL, A_SLA, A_SRA,
                       A_ROL, A_ROR, A_AND, A_NAND, A_OR, A_NOR, A_XOR, A_XNOR, A_NOT, A_CONST};
  int    cmds [20] = '{0, 1, 9, 10, 11, 12, 18, 19, 20, 21, 22, 23, 30, 31, 32, 33, 34, 35, 42, 46};
  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h20};

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int k = 0; k < 20; k++) begin
        a  = (t < 36) ? corner[t % 6] : $urandom;
        y  = (t < 36) ? corner[t / 6] : ((t % 3 == 0) ? (a + 32'(t % 2)) : $urandom);
        op = ops[k];
        #1;
        checks++;
        if (r !== map_elem(cmds[k], a, y)) begin
          failures++;
          if (failures < 10) $display("FAIL op=%s a=%h y=%h r=%h exp=%h", op.name(), a, y, r,
                                      map_elem(cmds[k], a, y));
        end
      end
    end
    // pass-through (used by MULVV, SQV, COPYV ...)
    a = 32'h1234_5678; y = 32'h9; op = A_PASS; #1;
    checks++; if (r !== a) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
