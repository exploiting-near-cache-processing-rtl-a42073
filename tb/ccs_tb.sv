// ccs_tb: the Cache Compute System on its own, with a line-wide memory model behind it that
// answers after a random 1..5 cycles, so the cache and controller are exercised under memory
// timing other than the block RAM's. Driven only through the processor bus: operands are
// stored with ordinary writes, the command is programmed through the registers, started, and
// readiness is polled; results are read back with ordinary reads and compared with the
// reference model. It counts, and fails if any never happened: hardware loops, strided and
// misaligned operands, reductions, operand reads that hit the cache, operand reads that bypass
// it, result writes that update a cached line, processor accesses served while a command runs,
// and polls that found the unit busy.
module ccs_tb;
  import ccs_pkg::*;
  import ccs_ref_pkg::*;

  localparam int N = 64;
  localparam logic [31:0] CSR = 32'h8000_0000;
  localparam int MEMW = 16384;                     // words of main memory
  localparam int A0 = 0, B0 = 4096 + 4 * N, R0 = 8192 + 8 * N;   // word bases of the regions

  logic        clk = 0, rst_n = 0;
  logic        cpu_req = 0, cpu_we = 0, cpu_ack, busy;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;

  logic                mem_req, mem_we;
  logic                mem_ack = 0;
  logic [23:0]         mem_addr;
  logic [N-1:0][31:0]  mem_wdata, mem_rdata;
  logic [N-1:0]        mem_wmask;
  logic [N-1:0][31:0]  lines [MEMW / N];

  ccs dut (.*);

  // line memory model with a random response time
  initial begin
    forever begin
      @(posedge clk);
      mem_ack <= 1'b0;
      if (mem_req && !mem_ack) begin
        repeat ($urandom_range(0, 4)) @(posedge clk);
        for (int i = 0; i < N; i++) begin
          if (mem_we && mem_wmask[i]) lines[mem_addr % (MEMW / N)][i] = mem_wdata[i];
        end
        mem_rdata <= lines[mem_addr % (MEMW / N)];
        mem_ack   <= 1'b1;
        @(posedge clk);
        mem_ack   <= 1'b0;
      end
    end
  end

  always #5 clk = ~clk;

  word_t img [], expv [];
  int checks = 0, failures = 0;
  int n_loop = 0, n_stride = 0, n_misal = 0, n_reduce = 0, n_hit = 0, n_miss = 0;
  int n_wr_upd = 0, n_conc = 0, n_poll_busy = 0;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_cache.state == 2'd0 && dut.u_cache.pick_cu && dut.u_cache.cu_req &&
        !dut.u_cache.cu_we) begin
      if (dut.u_cache.p_hit) n_hit++;
      else n_miss++;
    end
    if (dut.u_cache.state == 2'd1 && dut.u_cache.mem_ack && dut.u_cache.sel_cu &&
        dut.u_cache.r_we && dut.u_cache.r_hit) n_wr_upd++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic bus(bit w, logic [31:0] a, logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    cpu_req = 1; cpu_we = w; cpu_addr = a; cpu_wdata = d;
    @(posedge clk);
    while (!cpu_ack) @(posedge clk);
    q = cpu_rdata;
    @(negedge clk);
    cpu_req = 0;
  endtask

  task automatic wr(int word, word_t d);
    logic [31:0] q;
    bus(1, 32'(word * 4), d, q);
    img[word] = d;
  endtask

  task automatic rd_check(int word, string what);
    logic [31:0] q;
    bus(0, 32'(word * 4), 0, q);
    check(q === img[word], $sformatf("%s: word %0d = %h exp %h", what, word, q, img[word]));
  endtask

  // program, start, and wait; 'busy_work' makes the processor use memory while the CCS runs
  task automatic run(int c, int len, word_t k, int a, int b, int r, int stride, bit busy_work);
    logic [31:0] q;
    logic [63:0] sm;
    longint t0, t1;
    int span, first, last;
    sm = stride_mask(stride, (kind_of(c) == 3) ? r % N : a % N, N);
    expv = img;
    ref_exec(expv, c, len, k, a, b, r, stride, sm, N);
    bus(1, CSR + 32'h00, 32'(c), q);
    bus(1, CSR + 32'h04, 32'(len), q);
    bus(1, CSR + 32'h08, k, q);
    bus(1, CSR + 32'h0c, 32'(a * 4), q);
    bus(1, CSR + 32'h10, 32'(b * 4), q);
    bus(1, CSR + 32'h14, 32'(r * 4), q);
    bus(1, CSR + 32'h18, 32'(stride), q);
    bus(1, CSR + 32'h1c, sm[31:0], q);
    bus(1, CSR + 32'h20, sm[63:32], q);
    t0 = cyc;
    bus(1, CSR + 32'h28, 32'd1, q);
    if (busy_work) begin
      // the processor works on its own data (line 200 of memory) while the command runs
      for (int i = 0; i < 4; i++) begin
        if (busy) n_conc++;
        wr(200 * N + i, $urandom);
        if (busy) n_conc++;
        rd_check(200 * N + i, "processor data during a command");
      end
    end
    do begin
      bus(0, CSR + 32'h2c, 0, q);
      if (q == 0) n_poll_busy++;
    end while (q == 0 && cyc - t0 < 200000);
    t1 = cyc;
    check(q == 1, $sformatf("cmd %0d completes", c));
    img = expv;
    // read back everything the command may have written, and a margin around it
    span  = (len - 1) * stride + 1;
    first = is_reduce(c) ? r : r;
    last  = is_reduce(c) ? r : r + span - 1;
    for (int w = first - 2; w <= last + 2; w++) if (w >= 0 && w < MEMW) rd_check(w, $sformatf("cmd %0d", c));
    $display("cmd %2d len %4d stride %0d offset %2d: %0d cycles from start to ready", c, len,
             stride, a % N, t1 - t0);
    if ((a % N) + span > N) n_loop++;
    if (stride > 1) n_stride++;
    if (a % N != 0) n_misal++;
    if (is_reduce(c)) n_reduce++;
  endtask

  initial begin
    logic [31:0] q;
    img = new[MEMW];
    foreach (img[i]) img[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the model starts cleared; the regions used are then written through the processor
    foreach (lines[i]) lines[i] = '0;
    for (int i = 0; i < 1100; i++) begin
      wr(A0 + i, (i % 7 == 0) ? 32'(int'($urandom_range(0, 200)) - 100) : $urandom);
      wr(B0 + i, (i % 5 == 0) ? img[A0 + i] : $urandom);
      wr(R0 + i, 32'h0);
    end
    for (int i = 0; i < N; i++) wr(200 * N + i, 0);
    for (int i = 1; i <= 8; i++) wr(R0 - i, 0);
    bus(0, CSR + 32'h2c, 0, q);
    check(q == 1, "ready after reset");

    // every command on 64 aligned elements (the operand A line is cached by the processor first
    // for odd commands, so both operand paths are used)
    for (int c = 0; c < NCMD; c++) begin
      if (c % 2 != 0) rd_check(A0, "warm line A");
      rd_check(R0 + 5, "warm line R");
      run(c, 64, $urandom, A0, B0, is_reduce(c) ? R0 + c : R0, 1, c % 8 == 0);
    end
    // 1024-element vectors: hardware loop over 16 lines
    run(int'(ADDVV), 1024, 0, A0, B0, R0, 1, 1);
    run(int'(MULVC), 1024, 32'd7, A0, B0, R0, 1, 0);
    run(int'(IPVV), 1024, 0, A0, B0, R0 + 1030, 1, 0);
    run(int'(SSDVV), 1024, 0, A0, B0, R0 + 1031, 1, 0);
    run(int'(MAXV), 1024, 0, A0, B0, R0 + 1032, 1, 0);
    run(int'(ROLVV), 1024, 0, A0, B0, R0, 1, 0);
    // misaligned and strided operands (the reduction example: 60 elements, 4 words in)
    run(int'(ADDV), 60, 0, A0 + 4, B0 + 4, R0 + 1033, 1, 0);
    run(int'(SUBVV), 300, 0, A0 + 13, B0 + 13, R0 + 13, 1, 1);
    run(int'(XORVC), 200, 32'h5a5a_a5a5, A0 + 3, B0 + 3, R0 + 3, 2, 0);
    run(int'(ADDV), 150, 0, A0 + 1, B0 + 1, R0 + 1034, 4, 0);
    run(int'(INITC), 100, 32'hcafe_babe, A0, B0, R0 + 7, 2, 0);
    run(int'(COPYV), 500, 0, A0 + 33, B0 + 33, R0 + 33, 1, 0);

    check(n_loop > 0, "hardware loop");
    check(n_stride > 0, "strided operands");
    check(n_misal > 0, "misaligned operands");
    check(n_reduce > 0, "reductions");
    check(n_hit > 0, "operand read hits the cache");
    check(n_miss > 0, "operand read bypasses the cache");
    check(n_wr_upd > 0, "result write updates a cached line");
    check(n_conc > 0, "processor served while a command runs");
    check(n_poll_busy > 0, "readiness polled while busy");
    $display("loops %0d strided %0d misaligned %0d reduce %0d | CU read hits %0d misses %0d | cached-line updates %0d | concurrent accesses %0d | busy polls %0d",
             n_loop, n_stride, n_misal, n_reduce, n_hit, n_miss, n_wr_upd, n_conc, n_poll_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
