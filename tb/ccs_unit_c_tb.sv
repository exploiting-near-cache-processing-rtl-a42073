// ccs_unit_c_tb: checks the type-C reduction node for every operation and every combination of
// operand mask bits: both valid -> operation, one valid -> that operand, mask out = OR.
module ccs_unit_c_tb;
  import ccs_pkg::*;

  logic [31:0] a, b, r, e;
  logic        ma, mb, mr;
  c_op_e       op;
  int          checks = 0, failures = 0;

  ccs_unit_c dut (.a, .ma, .b, .mb, .op, .r, .mr);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a  = $urandom;
      b  = (t % 7 == 0) ? a : $urandom;
      ma = t[0];
      mb = t[1];
      op = c_op_e'(t / 4 % 6);
      #1;
      if (ma && mb) begin
        unique case (op)
          C_ADD:   e = a + b;
          C_MAX:   e = ($signed(a) >= $signed(b)) ? a : b;
          C_MIN:   e = ($signed(a) <= $signed(b)) ? a : b;
          C_AND:   e = a & b;
          C_OR:    e = a | b;
          default: e = a ^ b;
        endcase
      end else if (ma) e = a;
      else if (mb)     e = b;
      else             e = 32'd0;
      checks++;
      if (r !== e || mr !== (ma | mb)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h/%b b=%h/%b r=%h/%b exp=%h", op.name(),
                                    a, ma, b, mb, r, mr, e);
      end
    end
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
