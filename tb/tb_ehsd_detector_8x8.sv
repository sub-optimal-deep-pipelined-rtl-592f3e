// tb_ehsd_detector_8x8 -- end-to-end test of the detector built for 8x8
// 16-QAM MIMO (16 real levels) with the search configuration
// K = {4,16,28,28,24,16,12,12,8,8,8,8,4,4,4,1}: full expansion of levels
// 16..14, node selection blocks of 64, 112, 112, 96, 64, 48, 48, 32, 32, 32,
// 32, 16 and 16 inputs (the non-power-of-two ones padded), and a 16-input
// final compare.  The checks are those of the 4x4 test: an independent
// breadth-first model of the same search, exact recovery of noise-free
// vectors, and a fixed latency, here 174 clocks with a register every two
// compare stages.  Matrix entries are smaller than in the 4x4 test so that
// y = R x + noise stays inside the 17-bit format with 16 terms.
module tb_ehsd_detector_8x8;
  import ehsd_pkg::*;

  localparam int L       = 16;
  localparam int RAD_W   = 32;
  localparam int LATENCY = 174;
  localparam int NPROB   = 200;
  localparam longint RMIN = -(64'sd1 <<< (RAD_W - 1));

  logic clk = 1'b0, rst_n = 1'b0, in_vld = 1'b0;
  logic signed [R_W-1:0]   r_mat [L][L];
  logic signed [Y_W-1:0]   y_til [L];
  logic signed [RAD_W-1:0] rsph2;
  logic                    out_vld, out_inside;
  logic [SYM_W-1:0]        x_hat [L];
  logic signed [RAD_W-1:0] out_rad;

  ehsd_detector #(
    .N_ANT (8),
    .K_BEST('{4, 16, 28, 28, 24, 16, 12, 12, 8, 8, 8, 8, 4, 4, 4, 1})
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  // K kept after level m (index L-m), as in the 8x8 configuration
  int kcfg [L] = '{4, 16, 28, 28, 24, 16, 12, 12, 8, 8, 8, 8, 4, 4, 4, 1};

  function automatic longint sat(longint v);
    return (v < RMIN) ? RMIN : v;
  endfunction

  // Behavioural EHSD search.
  function automatic void model(input longint rm [L][L], input longint yv [L],
                                input longint r2, output node_t best);
    node_t par[$], ch[$];
    node_t root;
    root.rad = r2;
    foreach (root.code[i]) root.code[i] = 0;
    par.push_back(root);
    for (int m = L; m >= 1; m--) begin
      int k;
      int nvalid;
      ch.delete();
      foreach (par[p]) begin
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
      foreach (ch[i]) if (ch[i].rad >= 0) nvalid++; else n_pruned++;
      k = kcfg[L-m];
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
        else if (i == m) rm[m][i] = 256 + ($urandom % 769);
        else             rm[m][i] = longint'($urandom % 769) - 384;
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
    // radius: (3.0)^2 in the 1024-per-unit scale (4.0^2 for 16 levels), or tiny for kind 3
    r2 = (kind == 3) ? 2000 : 16 * 1024 * 1024;
    if (kind == 2) r2 = 6 * 1024 * 1024;
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
    $display("mechanisms: pruned_nodes=%0d truncations_dropping_valid=%0d empty_sphere=%0d back_to_back=%0d bubbles=%0d noise_free=%0d ties=%0d",
             n_pruned, n_trunc_valid, n_empty, n_b2b, n_bubble, n_noisefree, n_ties);
    if (n_pruned == 0)      failures++;
    if (n_trunc_valid == 0) failures++;
    if (n_empty == 0)       failures++;
    if (n_b2b == 0)         failures++;
    if (n_bubble == 0)      failures++;
    if (n_noisefree == 0)   failures++;
    checks += 6;
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
