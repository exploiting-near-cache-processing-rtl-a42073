// ccs_ctrl_tb: the controller driving the compute unit against a line-wide memory model with a
// random 1..3-cycle response. Runs every command with random lengths (up to 14 lines, so the
// hardware loop runs many partitions), operand offsets inside the line, and strides 1, 2 and 4
// with the matching software mask, and compares the whole memory image with the reference model
// after each command. Also checks busy/done, a zero-length command and an invalid command id.
module ccs_ctrl_tb;
  import ccs_pkg::*;
  import ccs_ref_pkg::*;

  localparam int N = 64, LINES_MEM = 64;

  logic                clk = 0, rst_n = 0;
  cfg_t                cfg;
  logic [N-1:0]        smask;
  logic                start = 0, busy, done;
  logic                lp_req, lp_we, lp_ack = 0;
  logic [23:0]         lp_addr;
  logic [N-1:0][31:0]  lp_wdata, lp_rdata;
  logic [N-1:0]        lp_wmask;
  logic                cu_valid, cu_first, cu_last;
  logic [N-1:0][31:0]  cu_a, cu_y;
  logic [N-1:0]        cu_mask;
  a_op_e               cu_a_op;
  b_op_e               cu_b_op;
  c_op_e               cu_c_op;
  logic                map_valid, red_valid, red_mask;
  logic [N-1:0][31:0]  map_data;
  logic [N-1:0]        map_mask;
  logic [31:0]         red_data;

  word_t img [], expv [];
  int    checks = 0, failures = 0;
  int    n_loop = 0, n_stride = 0, n_misal = 0, n_reduce = 0, n_cop = 0, n_vop2 = 0;

  ccs_ctrl #(.N(N)) dut (.*);
  ccs_cu #(.N(N)) u_cu (
    .clk, .rst_n, .in_valid(cu_valid), .in_first(cu_first), .in_last(cu_last),
    .in_a(cu_a), .in_y(cu_y), .in_mask(cu_mask), .a_op(cu_a_op), .b_op(cu_b_op),
    .c_op(cu_c_op), .map_valid, .map_data, .map_mask, .red_valid, .red_data, .red_mask
  );

  always #5 clk = ~clk;

  // line memory model
  initial begin
    forever begin
      @(posedge clk);
      lp_ack <= 1'b0;
      if (lp_req && !lp_ack) begin
        repeat ($urandom_range(0, 2)) @(posedge clk);
        for (int i = 0; i < N; i++) begin
          automatic int wa = int'(lp_addr % LINES_MEM) * N + i;
          if (lp_we && lp_wmask[i]) img[wa] = lp_wdata[i];
          lp_rdata[i] <= img[wa];
        end
        lp_ack <= 1'b1;
        @(posedge clk);
        lp_ack <= 1'b0;
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic run(int c, int len, word_t k, int a, int b, int r, int stride);
    int cyc = 0;
    logic [63:0] sm;
    sm = stride_mask(stride, (kind_of(c) == 3) ? r % N : a % N, N);
    expv = img;
    ref_exec(expv, c, len, k, a, b, r, stride, sm, N);
    @(negedge clk);
    cfg.cmd = 6'(c); cfg.len = 32'(len); cfg.konst = k; cfg.stride = 32'(stride);
    cfg.a_addr = 32'(a * 4); cfg.b_addr = 32'(b * 4); cfg.r_addr = 32'(r * 4);
    smask = sm;
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy || len == 0, "busy after start");
    while (busy && cyc < 20000) begin @(negedge clk); cyc++; end
    check(!busy, $sformatf("cmd %0d finished", c));
    for (int i = 0; i < N * LINES_MEM; i++)
      if (img[i] !== expv[i]) begin
        check(0, $sformatf("cmd %0d len %0d stride %0d a %0d: word %0d = %h exp %h", c, len,
                           stride, a, i, img[i], expv[i]));
        break;
      end
    checks++;
    if (((a % N) + (len - 1) * stride) >= N) n_loop++;
    if (stride > 1) n_stride++;
    if (a % N != 0) n_misal++;
    if (is_reduce(c)) n_reduce++;
    if (kind_of(c) == 3) n_cop++;
    if (kind_of(c) == 0) n_vop2++;
  endtask

  initial begin
    int off, len, st, c;
    img = new[N * LINES_MEM];
    foreach (img[i]) img[i] = $urandom;
    cfg = '0; smask = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // zero length: done at once, nothing written
    expv = img;
    @(negedge clk); cfg.cmd = 6'(ADDVV); cfg.len = 0; start = 1;
    @(negedge clk); start = 0;
    check(!busy, "zero length finishes at once");
    // invalid command id is ignored
    @(negedge clk); cfg.cmd = 6'd63; cfg.len = 10; start = 1;
    @(negedge clk); start = 0;
    check(!busy, "invalid command ignored");
    for (int rep = 0; rep < 3; rep++) begin
      for (c = 0; c < NCMD; c++) begin
        st  = 1 << ((c + rep) % 3);
        off = (rep == 0) ? 0 : $urandom_range(0, N - 1);
        len = $urandom_range(1, 880 / st);
        if (rep == 0 && c % 2 == 0) len = 60;
        run(c, len, $urandom, off, 16 * N + off, 32 * N + ((is_reduce(c)) ? $urandom_range(0, N - 1) : off), st);
      end
    end
    check(n_loop > 0 && n_stride > 0 && n_misal > 0 && n_reduce > 0 && n_cop > 0 && n_vop2 > 0,
          "every mechanism exercised");
    $display("hardware loops %0d, strided %0d, misaligned %0d, reduce %0d, COP %0d, VOP2 %0d",
             n_loop, n_stride, n_misal, n_reduce, n_cop, n_vop2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
