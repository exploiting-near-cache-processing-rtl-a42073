// ccs_cu: the compute unit (CU) of the Cache Compute System.
//
// A stream vector unit as wide as a cache line (N = 64 lanes of 32 bits for a 2048-bit line).
// Following the document's datapath, it is a binary structure of levels:
//   L0   N type-A units (add/sub, shift, logic)        -- first map level
//   L1   N type-B units (add/sub, multiply)            -- second map level
//   R1.. log2(N) levels of type-C units (N/2, N/4 .. 1) -- reduction tree
//   ACC  one type-C unit that folds the tree result of every partition into an accumulator
// so the tree has log2(N)+1 computation levels (6 + 1 for N = 64). A map command takes its
// result from L1; a reduce command runs on through the tree. Every level is registered: one
// partition (a line's worth of operands) may enter each cycle, and the CU is fully pipelined.
// Each element carries a bit of the execution mask. The map levels pass the mask on unchanged
// (it becomes the write mask of the result); in the tree each node ORs the bits of its two
// inputs into the submask of the next level, and a node with one valid input forwards it.
//
// Interface: in_valid accepts a partition (in_a: operand A, in_y: operand B or the constant in
// every lane, in_mask: execution mask). in_first marks the first partition of a command (it
// clears the accumulator), in_last the last partition of a reduce command (it makes red_valid
// fire; map commands leave it low). The operations a_op,
// b_op and c_op must be held stable while a command is in flight.
// Timing: map_valid follows in_valid by 2 cycles; red_valid follows the in_valid of the last
// partition by log2(N) + 3 cycles (9 for N = 64). red_mask is 0 when no element took part, and
// red_data is then 0.
// The per-level registers, the accumulator and the exact latencies are this design's choices.
module ccs_cu
  import ccs_pkg::*;
#(
  parameter int unsigned N = LINE_WORDS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_first,
  input  logic                in_last,
  input  logic [N-1:0][W-1:0] in_a,
  input  logic [N-1:0][W-1:0] in_y,
  input  logic [N-1:0]        in_mask,
  input  a_op_e               a_op,
  input  b_op_e               b_op,
  input  c_op_e               c_op,
  output logic                map_valid,
  output logic [N-1:0][W-1:0] map_data,
  output logic [N-1:0]        map_mask,
  output logic                red_valid,
  output logic [W-1:0]        red_data,
  output logic                red_mask
);

  localparam int unsigned LG = $clog2(N);

  // ---------------- L0 ----------------
  logic [N-1:0][W-1:0] l0_r;
  logic [N-1:0][W-1:0] s1_x, s1_y;
  logic [N-1:0]        s1_m;
  logic                s1_v, s1_f, s1_l;

  for (genvar i = 0; i < N; i++) begin : g_l0
    ccs_unit_a u_a (.a(in_a[i]), .y(in_y[i]), .op(a_op), .r(l0_r[i]));
  end

  always_ff @(posedge clk) begin
    s1_x <= l0_r;
    s1_y <= in_y;
    s1_m <= in_mask;
    s1_f <= in_first;
    s1_l <= in_last;
  end

  // ---------------- L1 ----------------
  logic [N-1:0][W-1:0] l1_r;
  logic [N-1:0][W-1:0] s2_x;
  logic [N-1:0]        s2_m;
  logic                s2_v, s2_f, s2_l;

  for (genvar i = 0; i < N; i++) begin : g_l1
    ccs_unit_b u_b (.x(s1_x[i]), .y(s1_y[i]), .op(b_op), .r(l1_r[i]));
  end

  always_ff @(posedge clk) begin
    s2_x <= l1_r;
    s2_m <= s1_m;
    s2_f <= s1_f;
    s2_l <= s1_l;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
      s2_v <= 1'b0;
    end else begin
      s1_v <= in_valid;
      s2_v <= s1_v;
    end
  end

  assign map_valid = s2_v;
  assign map_data  = s2_x;
  assign map_mask  = s2_m;

  // ---------------- reduction tree ----------------
  // lvl_d[l] holds N >> l live entries; lvl_d[0] is the L1 output.
  logic [N-1:0][W-1:0] lvl_d [LG+1];
  logic [N-1:0]        lvl_m [LG+1];
  logic [LG:0]         lvl_v, lvl_f, lvl_l;

  assign lvl_d[0] = s2_x;
  assign lvl_m[0] = s2_m;
  assign lvl_v[0] = s2_v;
  assign lvl_f[0] = s2_f;
  assign lvl_l[0] = s2_l;

  for (genvar l = 1; l <= LG; l++) begin : g_lvl
    logic [N-1:0][W-1:0] nd;
    logic [N-1:0]        nm;
    for (genvar j = 0; j < N; j++) begin : g_node
      if (j < (N >> l)) begin : g_unit
        ccs_unit_c u_c (
          .a (lvl_d[l-1][2*j]),   .ma(lvl_m[l-1][2*j]),
          .b (lvl_d[l-1][2*j+1]), .mb(lvl_m[l-1][2*j+1]),
          .op(c_op), .r(nd[j]), .mr(nm[j])
        );
      end else begin : g_none
        assign nd[j] = '0;
        assign nm[j] = 1'b0;
      end
    end
    always_ff @(posedge clk) begin
      lvl_d[l] <= nd;
      lvl_m[l] <= nm;
      lvl_f[l] <= lvl_f[l-1];
      lvl_l[l] <= lvl_l[l-1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) lvl_v[l] <= 1'b0;
      else        lvl_v[l] <= lvl_v[l-1];
    end
  end

  // ---------------- accumulation level ----------------
  logic [W-1:0] acc_d, acc_n;
  logic         acc_m, acc_mn;
  logic [W-1:0] root_d;
  logic         root_m;

  assign root_d = lvl_d[LG][0];
  assign root_m = lvl_m[LG][0];

  ccs_unit_c u_acc (
    .a(acc_d), .ma(acc_m & ~lvl_f[LG]), .b(root_d), .mb(root_m),
    .op(c_op), .r(acc_n), .mr(acc_mn)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_d     <= '0;
      acc_m     <= 1'b0;
      red_valid <= 1'b0;
    end else begin
      red_valid <= lvl_v[LG] & lvl_l[LG];
      if (lvl_v[LG]) begin
        acc_d <= acc_n;
        acc_m <= acc_mn;
      end
    end
  end

  assign red_data = acc_d;
  assign red_mask = acc_m;

endmodule
