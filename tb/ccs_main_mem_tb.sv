// ccs_main_mem_tb: masked line writes and line reads against a shadow copy, with the
// one-cycle acknowledge checked. Runs at 16 lines to stay short.
module ccs_main_mem_tb;
  localparam int N = 64, DEPTH = 16;

  logic               clk = 0, rst_n = 0, req = 0, we = 0, ack;
  logic [23:0]        addr = 0;
  logic [N-1:0][31:0] wdata = '0, rdata;
  logic [N-1:0]       wmask = '0;
  logic [N-1:0][31:0] shadow [DEPTH];
  int                 checks = 0, failures = 0;

  ccs_main_mem #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic op(bit w, int a, logic [N-1:0] m);
    int n = 0;
    @(negedge clk);
    req = 1; we = w; addr = 24'(a); wmask = m;
    for (int i = 0; i < N; i++) wdata[i] = $urandom;
    @(posedge clk);
    while (!ack) begin @(posedge clk); n++; end
    checks++; if (n != 1) failures++;
    if (w) begin
      for (int i = 0; i < N; i++) if (m[i]) shadow[a % DEPTH][i] = wdata[i];
    end else begin
      checks++;
      if (rdata !== shadow[a % DEPTH]) begin failures++; $display("FAIL read line %0d", a); end
    end
    @(negedge clk);
    req = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) op(1, a, '1);
    for (int t = 0; t < 300; t++) op($urandom_range(0, 1), $urandom_range(0, 2 * DEPTH - 1),
                                     {$urandom, $urandom});
    for (int a = 0; a < DEPTH; a++) op(0, a, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
