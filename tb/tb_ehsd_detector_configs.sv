// tb_ehsd_detector_configs -- end-to-end test of the 4x4 detector built
// for alternative search configurations of the BER study (K from level 8 to
// level 1).  The four alternatives,
//   Config.1 {4,16,32,8,6,4,4,1}   latency 73
//   Config.2 {4,16,32,16,8,4,4,1}  latency 76
//   Config.3 {4,16,20,24,16,8,4,1} latency 85
//   Config.4 {4,16,24,26,16,8,4,1} latency 85
// differ only in sorter sizes, and each detector instance is costly to
// compile, so NCFG selects how many are simulated, starting from Config.3
// (80- and 96-input node selection blocks padded to 128, 64->20, 64->8).
// The expected latencies are worked out by hand: 2 input clocks, 3 per
// level, 5/7/10/14 for sorters of 16/32/64/128 inputs and 4 for the final
// compare.  Each configuration gets 150 problems, checked as in
// tb_ehsd_detector against a breadth-first model of the same search and,
// for noise-free problems, against the transmitted vector.
module tb_ehsd_detector_configs;
  import ehsd_pkg::*;

  localparam int L       = 8;
  localparam int RAD_W   = 32;
  localparam int NPROB   = 150;
  localparam int NCFG    = 1;
  localparam longint RMIN = -(64'sd1 <<< (RAD_W - 1));
  localparam int unsigned CKB [4][MAX_LEVELS] = '{
    '{4, 16, 20, 24, 16, 8, 4, 1, 0, 0, 0, 0, 0, 0, 0, 0},
    '{4, 16, 32,  8,  6, 4, 4, 1, 0, 0, 0, 0, 0, 0, 0, 0},
    '{4, 16, 32, 16,  8, 4, 4, 1, 0, 0, 0, 0, 0, 0, 0, 0},
    '{4, 16, 24, 26, 16, 8, 4, 1, 0, 0, 0, 0, 0, 0, 0, 0}};
  localparam int CLAT [4] = '{85, 73, 76, 85};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int done = 0;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar G = 0; G < NCFG; G++) begin : g_cfg
    localparam int LATENCY = CLAT[G];
    logic in_vld = 1'b0;
    logic signed [R_W-1:0]   r_mat [L][L];
    logic signed [Y_W-1:0]   y_til [L];
    logic signed [RAD_W-1:0] rsph2;
    logic                    out_vld, out_inside;
    logic [SYM_W-1:0]        x_hat [L];
    logic signed [RAD_W-1:0] out_rad;

    if (G == 0) begin : g_c3
      ehsd_detector #(.K_BEST('{4, 16, 20, 24, 16, 8, 4, 1, 0, 0, 0, 0, 0, 0, 0, 0})) dut (.*);
    end else if (G == 1) begin : g_c1
      ehsd_detector #(.K_BEST('{4, 16, 32,  8,  6, 4, 4, 1, 0, 0, 0, 0, 0, 0, 0, 0})) dut (.*);
    end else if (G == 2) begin : g_c2
      ehsd_detector #(.K_BEST('{4, 16, 32, 16,  8, 4, 4, 1, 0, 0, 0, 0, 0, 0, 0, 0})) dut (.*);
    end else begin : g_c4
      ehsd_detector #(.K_BEST('{4, 16, 24, 26, 16, 8, 4, 1, 0, 0, 0, 0, 0, 0, 0, 0})) dut (.*);
    end

    // mechanism counters
    int n_pruned = 0, n_trunc_valid = 0, n_empty = 0, n_b2b = 0, n_bubble = 0,
        n_noisefree = 0, n_ties = 0;

    typedef struct {
      longint rad;
      int     code [L];
    } node_t;

    typedef struct {
      int     code [L];
      longint rad;
      bit     noisefree;
      int     xtrue [L];
      longint rsph;
      int     t_in;
    } expect_t;

    expect_t exp_q[$];

    // K kept after level m (index L-m), as in the default configuration

    function automatic longint sat(longint v);
      return (v < RMIN) ? RMIN : v;
    endfunction

    // Behavioural EHSD search.
    function automatic void model(input longint rm [L][L], input longint yv [L],
                                  input longint r2, output node_t best);
      node_t par[$], ch[$];
      node_t root;
      root.rad = r2;
      for (int i = 0; i < L; i++) root.code[i] = 0;
      par.push_back(root);
      for (int m = L; m >= 1; m--) begin
        int k;
        int nvalid;
        ch.delete();
        for (int p = 0; p < par.size(); p++) begin
          for (int c = 0; c < 4; c++) begin
            node_t n;
            longint s, e;
            n = par[p];
            n.code[m-1] = c;
            s = 0;
            for (int i = m; i <= L; i++) s += rm[m-1][i-1] * (2 * n.code[i-1] - 3);
            e = yv[m-1] - s;
            n.rad = sat(n.rad - e * e);
            ch.push_back(n);
          end
        end
        nvalid = 0;
        for (int i = 0; i < ch.size(); i++) if (ch[i].rad >= 0) nvalid++; else n_pruned++;
        k = int'(CKB[G][L-m]);
        // insertion sort, descending radius (stable)
        for (int i = 1; i < ch.size(); i++) begin
          node_t t;
          int j;
          t = ch[i];
          j = i - 1;
          while (j >= 0 && ch[j].rad < t.rad) begin
            ch[j+1] = ch[j];
            j--;
          end
          ch[j+1] = t;
        end
        if (k < ch.size() && nvalid > k) n_trunc_valid++;
        par.delete();
        for (int i = 0; i < k; i++) par.push_back(ch[i]);
      end
      best = par[0];
    endfunction

    // Build and issue one problem.
    task automatic issue(input int kind);
      longint rm [L][L];
      longint yv [L];
      int     xt [L];
      longint r2, nz;
      node_t  best;
      expect_t ex;
      for (int m = 0; m < L; m++)
        for (int i = 0; i < L; i++) begin
          if (i < m)       rm[m][i] = 0;
          else if (i == m) rm[m][i] = 256 + ($urandom % 1793);
          else             rm[m][i] = longint'($urandom % 2049) - 1024;
          r_mat[m][i] = R_W'(rm[m][i]);
        end
      foreach (xt[i]) xt[i] = $urandom % 4;
      nz = (kind == 0) ? 0 : (kind == 1) ? 160 : 700;
      for (int m = 0; m < L; m++) begin
        longint s;
        s = 0;
        for (int i = m; i < L; i++) s += rm[m][i] * (2 * xt[i] - 3);
        if (nz != 0) s += longint'($urandom % (2 * nz + 1)) - nz;
        yv[m] = s;
        y_til[m] = Y_W'(s);
      end
      // radius: (3.0)^2 in the 1024-per-unit scale, or tiny for kind 3
      r2 = (kind == 3) ? 2000 : 9 * 1024 * 1024;
      if (kind == 2) r2 = 4 * 1024 * 1024;
      rsph2 = RAD_W'(r2);
      model(rm, yv, r2, best);
      ex.code = best.code;
      ex.rad = best.rad;
      ex.noisefree = (kind == 0);
      ex.xtrue = xt;
      ex.rsph = r2;
      ex.t_in = cycle;
      exp_q.push_back(ex);
      in_vld = 1'b1;
    endtask

    // Output checker.
    always @(negedge clk) begin
      if (out_vld) begin
        expect_t ex;
        bit same;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected output at cycle %0d", cycle);
        end else begin
          ex = exp_q.pop_front();
          checks++;
          if (cycle - ex.t_in != LATENCY) begin
            failures++;
            $display("latency %0d, expected %0d", cycle - ex.t_in, LATENCY);
          end
          checks++;
          if (out_inside != (ex.rad >= 0)) begin
            failures++;
            $display("inside flag %0b, model radius %0d", out_inside, ex.rad);
          end
          if (ex.rad < 0) n_empty++;
          if (ex.rad >= 0) begin
            checks++;
            if (longint'(out_rad) != ex.rad) begin
              failures++;
              $display("radius %0d, model %0d", out_rad, ex.rad);
            end
            same = 1;
            foreach (x_hat[i]) if (int'(x_hat[i]) != ex.code[i]) same = 0;
            if (!same && longint'(out_rad) == ex.rad) n_ties++;
          end
          if (ex.noisefree) begin
            n_noisefree++;
            checks++;
            same = 1;
            foreach (x_hat[i]) if (int'(x_hat[i]) != ex.xtrue[i]) same = 0;
            if (!same || longint'(out_rad) != ex.rsph) begin
              failures++;
              $display("noise-free problem not recovered");
            end
          end
        end
      end
    end

    initial begin
      int issued, prev_issue;
      foreach (r_mat[m, i]) r_mat[m][i] = '0;
      foreach (y_til[i]) y_til[i] = '0;
      rsph2 = '0;
      repeat (4) @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk);
      issued = 0;
      prev_issue = -10;
      while (issued < NPROB) begin
        if (($urandom % 8) == 0) begin
          in_vld = 1'b0;
        end else begin
          int kind;
          kind = (issued % 10 == 0) ? 3 : ($urandom % 3);
          issue(kind);
          if (prev_issue == cycle - 1) n_b2b++;
          else if (issued > 0) n_bubble++;
          prev_issue = cycle;
          issued++;
        end
        @(negedge clk);
      end
      in_vld = 1'b0;
      repeat (LATENCY + 5) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin
        failures++;
        $display("%0d results missing", exp_q.size());
      end
      $display("configuration %0d mechanisms: pruned_nodes=%0d truncations_dropping_valid=%0d empty_sphere=%0d back_to_back=%0d bubbles=%0d noise_free=%0d ties=%0d",
               G, n_pruned, n_trunc_valid, n_empty, n_b2b, n_bubble, n_noisefree, n_ties);
      if (n_pruned == 0)      failures++;
      if (n_trunc_valid == 0) failures++;
      if (n_empty == 0)       failures++;
      if (n_b2b == 0)         failures++;
      if (n_bubble == 0)      failures++;
      if (n_noisefree == 0)   failures++;
      checks += 6;
      done++;
    end

  end

  initial begin
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPROB * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
