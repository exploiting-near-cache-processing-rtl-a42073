// ccs_mask_gen_tb: checks boundary and execution masks against a per-word membership test
// (word part*N + j lies in [offset, offset + span)), for random and edge operands, including
// the document's example of a 60-element operand starting 4 words into its line.
module ccs_mask_gen_tb;
  localparam int N = 64;

  logic [31:0]  part, span;
  logic [5:0]   offset;
  logic [N-1:0] smask, bmask, emask, eb;
  int           checks = 0, failures = 0;

  ccs_mask_gen #(.N(N)) dut (.*);

  task automatic run(int p, int off, int sp, logic [N-1:0] sm);
    longint g;
    part = 32'(p); offset = 6'(off); span = 32'(sp); smask = sm;
    #1;
    for (int j = 0; j < N; j++) begin
      g = longint'(p) * N + j;
      eb[j] = (g >= off) && (g < longint'(off) + sp);
    end
    checks++;
    if (bmask !== eb || emask !== (eb & sm)) begin
      failures++;
      if (failures < 10) $display("FAIL p=%0d off=%0d span=%0d b=%h exp=%h", p, off, sp, bmask, eb);
    end
  endtask

  initial begin
    run(0, 4, 60, '1);                    // misaligned 60 elements: first 4 words excluded
    checks++; if (bmask !== ~64'hf) failures++;
    run(0, 0, 64, 64'h5555_5555_5555_5555);
    run(1, 0, 64, '1);                    // past the end
    run(1, 10, 64, '1);                   // tail in the second line
    run(0, 63, 1, '1);
    run(3, 17, 1000, {$urandom, $urandom});
    for (int t = 0; t < 3000; t++)
      run($urandom_range(0, 20), $urandom_range(0, 63), $urandom_range(0, 1200), {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
