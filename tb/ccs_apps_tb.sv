// ccs_apps_tb: the application benchmarks of the prototype system, run on the full-size CCS
// system through the processor bus, with the testbench acting as the processor.
//   kNN:  64 control samples of 64 coordinates, one sample to classify, k = 4. The distance
//         phase runs on the CCS (one SSDVV per control sample); the processor picks the k
//         nearest and takes the majority label.
//   Linear regression of 64 2D points: five CCS reductions give sum x, sum y, sum xy and
//         sum x^2 (ADDV, ADDV, IPVV, SQV + ADDV); the processor solves for slope and intercept.
//   Matrix multiplication of two 64 x 64 integer matrices: the second matrix is stored
//         transposed, and each of the 4096 products is one IPVV over a row and a column.
//   KMeans, 178 samples of 13 features (the shape of the UCI Wine set, with generated values),
//         k = 3, three iterations: every sample-to-centroid distance is one 13-element SSDVV;
//         the processor assigns the samples and recomputes the centroids.
// Every CCS result is compared with a direct computation in the testbench; the number of
// commands and cycles of each benchmark is printed.
module ccs_apps_tb;
  import ccs_pkg::*;

  localparam int N = 64;
  localparam logic [31:0] CSR = 32'h8000_0000;

  logic        clk = 0, rst_n = 0;
  logic        cpu_req = 0, cpu_we = 0, cpu_ack, busy;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;

  ccs_system dut (.*);

  always #5 clk = ~clk;

  int     checks = 0, failures = 0, ncmd = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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

  task automatic wr(int word, logic [31:0] d);
    logic [31:0] q;
    bus(1, 32'(word * 4), d, q);
  endtask


  task automatic rd(int word, output logic [31:0] q);
    bus(1'b0, 32'(word * 4), 0, q);
  endtask

  // program one command with unit stride and run it to completion
  task automatic cmd(cmd_e c, int len, logic [31:0] k, int a, int b, int r);
    logic [31:0] q;
    bus(1, CSR + 32'h00, 32'(c), q);
    bus(1, CSR + 32'h04, 32'(len), q);
    bus(1, CSR + 32'h08, k, q);
    bus(1, CSR + 32'h0c, 32'(a * 4), q);
    bus(1, CSR + 32'h10, 32'(b * 4), q);
    bus(1, CSR + 32'h14, 32'(r * 4), q);
    bus(1, CSR + 32'h18, 32'd1, q);
    bus(1, CSR + 32'h28, 32'd1, q);
    do bus(0, CSR + 32'h2c, 0, q); while (q == 0);
    ncmd++;
  endtask

  initial begin
    logic [31:0] q;
    longint t0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- kNN ----------------
    begin
      int          ctrl [64][64];
      int          lab [64], smp [64];
      longint      dst [64];
      int          best [4];
      int          votes [4];
      int          winner, hw_winner;
      // control samples at words 0..4095, the sample at 4096, distances at 4160
      for (int s = 0; s < 64; s++) begin
        lab[s] = s % 4;
        for (int j = 0; j < 64; j++) begin
          ctrl[s][j] = lab[s] * 40 + int'($urandom_range(0, 50));
          wr(s * 64 + j, 32'(ctrl[s][j]));
        end
      end
      for (int j = 0; j < 64; j++) begin
        smp[j] = 2 * 40 + int'($urandom_range(0, 50));
        wr(4096 + j, 32'(smp[j]));
      end
      t0 = cyc; ncmd = 0;
      for (int s = 0; s < 64; s++) cmd(SSDVV, 64, 0, s * 64, 4096, 4160 + s);
      $display("kNN distance phase: %0d commands, %0d cycles", ncmd, cyc - t0);
      for (int s = 0; s < 64; s++) begin
        automatic longint e = 0;
        for (int j = 0; j < 64; j++) e += longint'(ctrl[s][j] - smp[j]) * (ctrl[s][j] - smp[j]);
        rd(4160 + s, q);
        dst[s] = longint'(q);
        check(q == 32'(e), $sformatf("kNN distance %0d = %0d exp %0d", s, q, e));
      end
      // k = 4 nearest, majority label (processor part)
      for (int i = 0; i < 4; i++) begin
        best[i] = -1;
        for (int s = 0; s < 64; s++) begin
          automatic bit used = 0;
          for (int u = 0; u < i; u++) if (best[u] == s) used = 1;
          if (!used && (best[i] < 0 || dst[s] < dst[best[i]])) best[i] = s;
        end
      end
      votes = '{0, 0, 0, 0};
      for (int i = 0; i < 4; i++) votes[lab[best[i]]]++;
      hw_winner = 0;
      for (int l = 1; l < 4; l++) if (votes[l] > votes[hw_winner]) hw_winner = l;
      winner = 2;
      check(hw_winner == winner, $sformatf("kNN class %0d exp %0d", hw_winner, winner));
    end

    // ---------------- linear regression ----------------
    begin
      int x [64], y [64];
      longint sx = 0, sy = 0, sxy = 0, sxx = 0;
      logic [31:0] hsx, hsy, hsxy, hsxx;
      for (int i = 0; i < 64; i++) begin
        x[i] = i;
        y[i] = 3 * i + 7 + int'($urandom_range(0, 4)) - 2;
        wr(5120 + i, 32'(x[i]));
        wr(5184 + i, 32'(y[i]));
        sx += x[i]; sy += y[i]; sxy += x[i] * y[i]; sxx += x[i] * x[i];
      end
      t0 = cyc; ncmd = 0;
      cmd(ADDV, 64, 0, 5120, 0, 5312);
      cmd(ADDV, 64, 0, 5184, 0, 5313);
      cmd(IPVV, 64, 0, 5120, 5184, 5314);
      cmd(SQV, 64, 0, 5120, 0, 5248);
      cmd(ADDV, 64, 0, 5248, 0, 5315);
      $display("linear regression: %0d commands, %0d cycles", ncmd, cyc - t0);
      rd(5312, hsx); rd(5313, hsy); rd(5314, hsxy); rd(5315, hsxx);
      check(hsx == 32'(sx) && hsy == 32'(sy) && hsxy == 32'(sxy) && hsxx == 32'(sxx),
            "regression sums");
      begin
        real slope, rx, ry, rxy, rxx;
        rx  = real'($signed(hsx));
        ry  = real'($signed(hsy));
        rxy = real'($signed(hsxy));
        rxx = real'($signed(hsxx));
        slope = (64.0 * rxy - rx * ry) / (64.0 * rxx - rx * rx);
        check(slope > 2.9 && slope < 3.1, $sformatf("regression slope %f", slope));
        $display("fitted slope %f", slope);
      end
    end

    // ---------------- matrix multiplication 64 x 64 ----------------
    begin
      int a [64][64], bt [64][64];
      int errs = 0;
      // A at words 0..4095, B transposed at 4096..8191, C at 8192..12287
      for (int i = 0; i < 64; i++)
        for (int j = 0; j < 64; j++) begin
          a[i][j]  = int'($urandom_range(0, 200)) - 100;
          bt[i][j] = int'($urandom_range(0, 200)) - 100;
          wr(i * 64 + j, 32'(a[i][j]));
          wr(4096 + i * 64 + j, 32'(bt[i][j]));
        end
      t0 = cyc; ncmd = 0;
      for (int i = 0; i < 64; i++)
        for (int j = 0; j < 64; j++) cmd(IPVV, 64, 0, i * 64, 4096 + j * 64, 8192 + i * 64 + j);
      $display("matrix multiplication: %0d commands, %0d cycles", ncmd, cyc - t0);
      for (int i = 0; i < 64; i++)
        for (int j = 0; j < 64; j++) begin
          automatic int e = 0;
          for (int t = 0; t < 64; t++) e += a[i][t] * bt[j][t];
          rd(8192 + i * 64 + j, q);
          checks++;
          if (q != 32'(e)) begin
            failures++; errs++;
            if (errs < 5) $display("FAIL C[%0d][%0d] = %0d exp %0d", i, j, int'(q), e);
          end
        end
    end

    // ---------------- KMeans, 178 samples x 13 features, k = 3 ----------------
    // Four samples share a line, in 16-word slots; each centroid is stored once per slot
    // offset so that a sample and a centroid always have the same word offset.
    begin
      localparam int NS = 178, NF = 13, K = 3, SBASE = 12288, CBASE = 15168, DBASE = 15360;
      int smp_k [NS][NF], cen [K][NF], asg [NS], cnt [K];
      longint sum [K][NF];
      int total = 0, moved = 0;
      for (int s = 0; s < NS; s++)
        for (int f = 0; f < NF; f++) begin
          smp_k[s][f] = (s % K) * 30 + int'($urandom_range(0, 40));
          wr(SBASE + s * 16 + f, 32'(smp_k[s][f]));
        end
      for (int c = 0; c < K; c++) cen[c] = smp_k[c];
      for (int it = 0; it < 3; it++) begin
        for (int c = 0; c < K; c++)
          for (int o = 0; o < 4; o++)
            for (int f = 0; f < NF; f++) wr(CBASE + c * 64 + o * 16 + f, 32'(cen[c][f]));
        t0 = cyc; ncmd = 0;
        for (int s = 0; s < NS; s++)
          for (int c = 0; c < K; c++)
            cmd(SSDVV, NF, 0, SBASE + s * 16, CBASE + c * 64 + (s % 4) * 16, DBASE + s * K + c);
        total += int'(cyc - t0);
        moved = 0;
        for (int s = 0; s < NS; s++) begin
          automatic int bc = 0;
          automatic longint bd = 0;
          for (int c = 0; c < K; c++) begin
            automatic longint e = 0;
            for (int f = 0; f < NF; f++)
              e += longint'(smp_k[s][f] - cen[c][f]) * (smp_k[s][f] - cen[c][f]);
            rd(DBASE + s * K + c, q);
            check(q == 32'(e), $sformatf("KMeans distance %0d/%0d = %0d exp %0d", s, c, q, e));
            if (c == 0 || longint'(q) < bd) begin bc = c; bd = longint'(q); end
          end
          if (it == 0 || asg[s] != bc) moved++;
          asg[s] = bc;
        end
        // centroid update on the processor side: integer mean of each cluster
        for (int c = 0; c < K; c++) begin
          cnt[c] = 0;
          for (int f = 0; f < NF; f++) sum[c][f] = 0;
        end
        for (int s = 0; s < NS; s++) begin
          cnt[asg[s]]++;
          for (int f = 0; f < NF; f++) sum[asg[s]][f] += smp_k[s][f];
        end
        for (int c = 0; c < K; c++)
          if (cnt[c] > 0) for (int f = 0; f < NF; f++) cen[c][f] = int'(sum[c][f] / cnt[c]);
        $display("KMeans iteration %0d: %0d commands, %0d cycles, %0d samples reassigned",
                 it, ncmd, cyc - t0, moved);
      end
      // the generated clusters are well apart: every sample ends in the cluster it was drawn from
      for (int s = 0; s < NS; s++)
        check(asg[s] == asg[s % K], $sformatf("KMeans sample %0d in cluster %0d", s, asg[s]));
      check(asg[0] != asg[1] && asg[1] != asg[2] && asg[0] != asg[2], "KMeans three clusters");
      $display("KMeans: %0d cycles of CCS work over 3 iterations", total);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
