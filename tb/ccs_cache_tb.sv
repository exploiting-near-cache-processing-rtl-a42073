// ccs_cache_tb: cache with a 64-line main memory behind it. Checks data against a shadow of
// memory and the policies by counting memory reads: CPU read miss allocates (the next read of
// the line is a hit), CPU writes go through and do not allocate, CU reads and writes never
// allocate but use and update a cached line, conflicting lines evict each other, and requests
// from both ports at once are both served. Ends with a random mix of both ports.
module ccs_cache_tb;
  import ccs_pkg::*;

  localparam int N = 64, LINES = 16, DEPTH = 64;

  logic               clk = 0, rst_n = 0;
  logic               cpu_req = 0, cpu_we = 0, cpu_ack;
  logic [31:0]        cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic               cu_req = 0, cu_we = 0, cu_ack;
  logic [23:0]        cu_addr = 0;
  logic [N-1:0][31:0] cu_wdata = '0, cu_rdata;
  logic [N-1:0]       cu_wmask = '0;
  logic               mem_req, mem_we, mem_ack;
  logic [23:0]        mem_addr;
  logic [N-1:0][31:0] mem_wdata, mem_rdata;
  logic [N-1:0]       mem_wmask;
  logic [N-1:0][31:0] shadow [DEPTH];
  int                 checks = 0, failures = 0, mem_reads = 0, mem_writes = 0;

  ccs_cache #(.N(N), .LINES(LINES)) dut (.*);
  ccs_main_mem #(.N(N), .DEPTH(DEPTH)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .wmask(mem_wmask), .ack(mem_ack), .rdata(mem_rdata)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (mem_ack) begin
    if (mem_we) mem_writes++; else mem_reads++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic cpu(bit w, int line, int word, logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    cpu_req = 1; cpu_we = w; cpu_addr = 32'(line * 256 + word * 4); cpu_wdata = d;
    @(posedge clk);
    while (!cpu_ack) @(posedge clk);
    q = cpu_rdata;
    if (w) shadow[line][word] = d;
    else check(q == shadow[line][word], $sformatf("cpu read %0d.%0d = %h exp %h", line, word,
                                                  q, shadow[line][word]));
    @(negedge clk);
    cpu_req = 0;
  endtask

  task automatic cu(bit w, int line, logic [N-1:0] m);
    @(negedge clk);
    cu_req = 1; cu_we = w; cu_addr = 24'(line); cu_wmask = m;
    for (int i = 0; i < N; i++) cu_wdata[i] = $urandom;
    @(posedge clk);
    while (!cu_ack) @(posedge clk);
    if (w) begin
      for (int i = 0; i < N; i++) if (m[i]) shadow[line][i] = cu_wdata[i];
    end else check(cu_rdata == shadow[line], $sformatf("cu read line %0d", line));
    @(negedge clk);
    cu_req = 0;
  endtask

  initial begin
    logic [31:0] q;
    int r0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill memory through the CU port (no allocation)
    for (int l = 0; l < DEPTH; l++) cu(1, l, '1);
    check(mem_writes == DEPTH, "CU writes go to memory");
    r0 = mem_reads;
    cpu(0, 3, 5, 0, q);  check(mem_reads == r0 + 1, "cpu read miss fetches");
    cpu(0, 3, 6, 0, q);  check(mem_reads == r0 + 1, "cpu read hit after allocate");
    cpu(1, 3, 6, 32'h1234_5678, q);
    cpu(0, 3, 6, 0, q);  check(mem_reads == r0 + 1, "cpu write updates cached line");
    cpu(1, 4, 0, 32'hcafe_f00d, q);
    cpu(0, 4, 1, 0, q);  check(mem_reads == r0 + 2, "cpu write does not allocate");
    cu(0, 3, '0);        check(mem_reads == r0 + 2, "cu read hit uses the cache");
    cu(0, 5, '0);        check(mem_reads == r0 + 3, "cu read miss goes to memory");
    cu(0, 5, '0);        check(mem_reads == r0 + 4, "cu read does not allocate");
    cu(1, 3, 64'h00ff_0000_ffff_000f);
    cpu(0, 3, 1, 0, q);  check(mem_reads == r0 + 4, "cu write updates cached line");
    cpu(0, 3, 20, 0, q);
    cpu(0, 19, 2, 0, q); check(mem_reads == r0 + 5, "conflicting line fetched");
    cpu(0, 3, 2, 0, q);  check(mem_reads == r0 + 6, "evicted line fetched again");
    // both ports at once
    @(negedge clk);
    cpu_req = 1; cpu_we = 0; cpu_addr = 32'(7 * 256 + 8);
    cu_req = 1; cu_we = 0; cu_addr = 24'd9;
    fork
      begin @(posedge clk); while (!cpu_ack) @(posedge clk); check(cpu_rdata == shadow[7][2], "cpu in contention"); @(negedge clk); cpu_req = 0; end
      begin @(posedge clk); while (!cu_ack) @(posedge clk); check(cu_rdata == shadow[9], "cu in contention"); @(negedge clk); cu_req = 0; end
    join
    // random mix
    for (int t = 0; t < 400; t++) begin
      if ($urandom_range(0, 1)) cpu($urandom_range(0, 1), $urandom_range(0, DEPTH - 1),
                                    $urandom_range(0, N - 1), $urandom, q);
      else cu($urandom_range(0, 1), $urandom_range(0, DEPTH - 1), {$urandom, $urandom});
    end
    for (int l = 0; l < DEPTH; l++) cu(0, l, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
