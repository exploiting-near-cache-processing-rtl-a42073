// ccs_cu_tb: runs all 48 commands through the compute unit at its default width (64 lanes).
// Map commands: one partition with a random execution mask; the result must appear exactly 2
// cycles after issue, with the mask passed through. Reduce commands: 1 to 4 partitions issued
// on back-to-back cycles (the unit is pipelined); the accumulated result must appear exactly
// log2(N)+3 cycles after the last partition, and equal the reference fold over the masked
// elements. Masks include all-ones, all-zeros and the misaligned case of the reduction example
// (first 4 elements of the line excluded).
module ccs_cu_tb;
  import ccs_pkg::*;
  import ccs_ref_pkg::*;

  localparam int N  = 64;
  localparam int LG = 6;

  logic                clk = 0, rst_n = 0;
  logic                in_valid = 0, in_first = 0, in_last = 0;
  logic [N-1:0][31:0]  in_a, in_y;
  logic [N-1:0]        in_mask;
  a_op_e               a_op;
  b_op_e               b_op;
  c_op_e               c_op;
  logic                map_valid, red_valid, red_mask;
  logic [N-1:0][31:0]  map_data;
  logic [N-1:0]        map_mask;
  logic [31:0]         red_data;
  int                  checks = 0, failures = 0;
  int                  cyc = 0;

  ccs_cu #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [N-1:0] pick_mask(int t);
    case (t % 5)
      0: return '1;
      1: return '0;
      2: return ~64'hf;                      // first four elements excluded
      3: return 64'h5555_5555_5555_5555;     // stride 2
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    dec_t        d;
    logic [31:0] k, acc, exp;
    bit          any;
    int          np, t0;
    logic [N-1:0][31:0] pa [4], pb [4];
    logic [N-1:0]       pm [4];

    in_a = '0; in_y = '0; in_mask = '0;
    a_op = A_PASS; b_op = B_PASS; c_op = C_ADD;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    for (int rep = 0; rep < 5; rep++) begin
      for (int c = 0; c < NCMD; c++) begin
        d    = decode(6'(c));
        a_op = d.a_op; b_op = d.b_op; c_op = d.c_op;
        k    = (rep == 0) ? 32'd3 : $urandom;
        np   = d.reduce ? 1 + (rep % 4) : 1;
        for (int p = 0; p < np; p++) begin
          for (int i = 0; i < N; i++) begin
            pa[p][i] = (rep == 1) ? 32'(int'($urandom_range(0, 200)) - 100) : $urandom;
            pb[p][i] = (kind_of(c) == 0) ? ((i % 9 == 0) ? pa[p][i] : $urandom) : k;
          end
          pm[p] = pick_mask(rep * 7 + c + p);
        end
        // issue
        @(negedge clk);
        for (int p = 0; p < np; p++) begin
          in_valid = 1; in_first = (p == 0); in_last = d.reduce && (p == np - 1);
          in_a = pa[p]; in_y = pb[p]; in_mask = pm[p];
          t0 = cyc;
          @(negedge clk);
        end
        in_valid = 0;
        if (!d.reduce) begin
          while (!map_valid && cyc < t0 + 20) @(negedge clk);
          check(cyc - t0 == 2, $sformatf("cmd %0d map latency %0d", c, cyc - t0));
          check(map_mask == pm[0], $sformatf("cmd %0d map mask", c));
          for (int i = 0; i < N; i++)
            check(map_data[i] == map_elem(c, pa[0][i], pb[0][i]),
                  $sformatf("cmd %0d lane %0d: %h exp %h", c, i, map_data[i],
                            map_elem(c, pa[0][i], pb[0][i])));
        end else begin
          while (!red_valid && cyc < t0 + 40) @(negedge clk);
          check(cyc - t0 == LG + 3, $sformatf("cmd %0d reduce latency %0d", c, cyc - t0));
          any = 0; acc = '0;
          for (int p = 0; p < np; p++)
            for (int i = 0; i < N; i++)
              if (pm[p][i]) begin
                if (!any) acc = red_elem(c, pa[p][i], pb[p][i]);
                else      acc = red_fold(c, acc, red_elem(c, pa[p][i], pb[p][i]));
                any = 1;
              end
          exp = acc;
          check(red_mask == any, $sformatf("cmd %0d reduce mask", c));
          if (any) check(red_data == exp, $sformatf("cmd %0d np=%0d reduce %h exp %h", c, np,
                                                   red_data, exp));
        end
        @(negedge clk);
      end
    end
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
