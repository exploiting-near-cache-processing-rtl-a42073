// ccs_unit_b_tb: checks the L1 type-B unit (multiply, square, absolute value, pass) against
// independently computed values.
module ccs_unit_b_tb;
  import ccs_pkg::*;

  logic [31:0] x, y, r, e;
  b_op_e       op;
  int          checks = 0, failures = 0;

  ccs_unit_b dut (.x, .y, .op, .r);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      x  = (t % 5 == 0) ? 32'(int'($urandom_range(0, 2000)) - 1000) : $urandom;
      y  = $urandom;
      op = b_op_e'(t % 4);
      #1;
      unique case (op)
        B_MUL:   e = 32'(longint'(x) * longint'(y));
        B_SQR:   e = 32'(longint'(x) * longint'(x));
        B_ABS:   e = ($signed(x) < 0) ? (~x + 1) : x;
        default: e = x;
      endcase
      checks++;
      if (r !== e) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s x=%h y=%h r=%h exp=%h", op.name(), x, y, r, e);
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
