// ccs_regs_tb: writes and reads back every register of the programming interface, checks the
// reset values, the read-only readiness word, the reserved word, the start pulse (one cycle,
// suppressed while busy) and the one-cycle acknowledge.
module ccs_regs_tb;
  import ccs_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         req = 0, we = 0, ack, start, busy = 0;
  logic [3:0]   addr = 0;
  logic [31:0]  wdata = 0, rdata;
  cfg_t         cfg;
  logic [63:0]  smask;
  int           checks = 0, failures = 0, starts = 0;

  ccs_regs #(.N(64)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(bit w, int a, logic [31:0] d, output logic [31:0] q);
    int n = 0;
    @(negedge clk);
    req = 1; we = w; addr = 4'(a); wdata = d;
    @(posedge clk);
    while (!ack) begin @(posedge clk); n++; end
    q = rdata;
    check(n == 1, $sformatf("ack latency %0d", n));
    @(negedge clk);
    req = 0;
  endtask

  initial begin
    logic [31:0] q, v [12];
    repeat (2) @(posedge clk);
    rst_n = 1;
    access(0, 11, 0, q); check(q == 32'd1, "ready after reset");
    access(0, 7, 0, q);  check(q == '1, "mask resets to ones");
    for (int i = 0; i < 9; i++) begin
      v[i] = $urandom;
      access(1, i, v[i], q);
    end
    for (int i = 0; i < 9; i++) begin
      access(0, i, 0, q);
      check(q == ((i == 0) ? {26'd0, v[0][5:0]} : v[i]), $sformatf("reg %0d readback %h", i, q));
    end
    check(cfg.cmd == v[0][5:0] && cfg.len == v[1] && cfg.konst == v[2] && cfg.a_addr == v[3] &&
          cfg.b_addr == v[4] && cfg.r_addr == v[5] && cfg.stride == v[6], "cfg outputs");
    check(smask == {v[8], v[7]}, "mask output");
    access(1, 9, 32'hffff_ffff, q); access(0, 9, 0, q); check(q == 0, "reserved reads 0");
    access(1, 11, 0, q);  access(0, 11, 0, q); check(q == 1, "readiness is read-only");
    check(starts == 0, "no start yet");
    access(1, 10, 1, q);
    @(posedge clk);
    check(starts == 1, "start pulse once");
    busy = 1;
    access(0, 11, 0, q); check(q == 0, "not ready while busy");
    access(1, 10, 1, q);
    @(posedge clk);
    check(starts == 1, "start ignored while busy");
    busy = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
