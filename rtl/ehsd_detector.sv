// ehsd_detector -- fully pipelined enhanced hybrid sphere detector (EHSD)
// for N_ANT x N_ANT MIMO with 16-QAM, default 4x4.
//
// The detector searches the real-valued tree of L = 2*N_ANT levels,
// from level L (last row of R) down to level 1, breadth first.  K_BEST lists,
// from level L down to level 1, how many nodes survive each level.  Levels
// whose node count is simply four times their parent count are fully
// expanded; at the other levels a node selection block (global Batcher sort
// + K-best) truncates the 4*K_(m+1) children to K_m; after level 1 a compare
// tree keeps the single best vector.  The default K_BEST = {4,16,8,8,4,4,4,1}
// fully expands levels 8..6 (4, 16, 64 nodes) and then uses NSB(64->8),
// NSB(32->8), NSB(32->4), NSB(16->4), NSB(16->4) and a 16-input compare:
// 196 level processing blocks in all.
//
// Dataflow: inputs are registered (1 clock), the XR multiplier forms all
// x*R_mi products (1 clock), and every level takes 3 clocks in its LPBs plus
// the latency of its selection stage (10, 7, 7, 5, 5 and 4 clocks).  The
// product row and the (Q^H y)_m element a level needs are carried to it in
// delay chains so that a new problem can enter every clock.  Total latency
// is LATENCY = 64 clocks for the default configuration; throughput is one
// symbol vector (16 bits for 4x4) per clock.  The nine cycles outside the
// LPBs and NSBs (input register, XR register, 4 compare ranks) are this
// design's allocation of the stated 64-cycle total.
//
// Parameters: N_ANT and K_BEST set the tree (8x8 uses N_ANT = 8 and
// K_BEST = {4,16,28,28,24,16,12,12,8,8,8,8,4,4,4,1}); RAD_W is the radius
// width; REG_EVERY = 2 puts a sorter register after every two compare
// stages (1 gives the deeper pipeline); GS_GROUP > 0 builds every NSB as a
// recursive global sort from GS_GROUP-input networks instead of one network
// (same selection, longer latency: 73 clocks with 16-input groups).  The
// latency for any setting is ehsd_pkg::detector_latency().
//
// Interface:
//   r_mat[m][i]  R_(m+1)(i+1), 15-bit signed, upper triangle used
//   y_til[m]     (Q^H y)_(m+1), 17-bit signed
//   rsph2        initial squared sphere radius, RAD_W-bit signed, >= 0
//   x_hat[m]     detected code of real symbol m+1 (value 2*code-3)
//   out_rad      rsph2 minus the squared distance of x_hat (saturating)
//   out_inside   out_rad >= 0: x_hat lies inside the sphere; when no node
//                survives inside the sphere x_hat is the least-bad vector
//                among those kept and out_inside is low
//   in_vld/out_vld  problem valid, LATENCY clocks apart; no back-pressure
module ehsd_detector import ehsd_pkg::*; #(
  parameter int unsigned N_ANT                 = 4,
  parameter int unsigned K_BEST [MAX_LEVELS]   = K_4X4,
  parameter int unsigned RAD_W                 = 32,
  parameter int unsigned REG_EVERY             = 2,
  parameter int unsigned GS_GROUP              = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_vld,
  input  logic signed [R_W-1:0]   r_mat [2*N_ANT][2*N_ANT],
  input  logic signed [Y_W-1:0]   y_til [2*N_ANT],
  input  logic signed [RAD_W-1:0] rsph2,
  output logic                    out_vld,
  output logic [SYM_W-1:0]        x_hat [2*N_ANT],
  output logic signed [RAD_W-1:0] out_rad,
  output logic                    out_inside
);

  localparam int unsigned L       = 2 * N_ANT;
  localparam int unsigned NODE_W  = RAD_W + SYM_W * L;
  localparam int unsigned MAXK    = max_kept(L, K_BEST);

  // ---- input register and XR multiplier ----------------------------------
  logic                    vld_q, vld_x;
  logic signed [R_W-1:0]   r_q   [L][L];
  logic signed [Y_W-1:0]   y_q   [L];
  logic signed [RAD_W-1:0] rsph_q, rsph_x;
  logic signed [XR_W-1:0]  xr    [L][L][NSYM];

  always_ff @(posedge clk) begin
    r_q    <= r_mat;
    y_q    <= y_til;
    rsph_q <= rsph2;
    rsph_x <= rsph_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_q <= 1'b0;
      vld_x <= 1'b0;
    end else begin
      vld_q <= in_vld;
      vld_x <= vld_q;
    end
  end

  ehsd_xr_multiplier #(.L(L)) u_xr (.clk(clk), .r_mat(r_q), .xr(xr));

  // ---- search levels -----------------------------------------------------
  // par_nodes[m-1] / par_vld[m-1]: parents entering level m.
  logic [NODE_W-1:0] par_nodes [L][MAXK];
  logic              par_vld   [L];
  logic [NODE_W-1:0] best_node;
  logic              best_vld;

  assign par_nodes[L-1][0] = {rsph_x, {(SYM_W*L){1'b0}}};
  assign par_vld[L-1]      = vld_x;
  for (genvar j = 1; j < MAXK; j++) begin : g_root_unused
    assign par_nodes[L-1][j] = '0;
  end

  for (genvar g = 0; g < L; g++) begin : g_lvl
    localparam int unsigned M   = L - g;
    localparam int unsigned P   = parents_at(L, K_BEST, M);
    localparam int unsigned NC  = NSYM * P;
    localparam int unsigned KM  = kept_at(L, K_BEST, M);
    localparam int unsigned T_M = level_time(L, K_BEST, M, GS_GROUP, REG_EVERY);

    // side data of this level, aligned with its parents
    logic [XR_W*L*NSYM-1:0]  xr_flat, xr_flat_d;
    logic signed [XR_W-1:0]  xr_row [L][NSYM];
    logic signed [Y_W-1:0]   y_m;
    logic [NODE_W-1:0]       parents  [P];
    logic [NODE_W-1:0]       children [NC];
    logic                    ch_vld;

    always_comb
      for (int i = 0; i < L; i++)
        for (int c = 0; c < NSYM; c++)
          xr_flat[XR_W*(NSYM*i+c) +: XR_W] = xr[M-1][i][c];

    ehsd_delay #(.W(XR_W*L*NSYM), .D(T_M - 2)) u_xr_dly (
      .clk(clk), .din(xr_flat), .dout(xr_flat_d));

    always_comb
      for (int i = 0; i < L; i++)
        for (int c = 0; c < NSYM; c++)
          xr_row[i][c] = xr_flat_d[XR_W*(NSYM*i+c) +: XR_W];

    ehsd_delay #(.W(Y_W), .D(T_M - 1)) u_y_dly (
      .clk(clk), .din(y_q[M-1]), .dout(y_m));

    for (genvar p = 0; p < P; p++) begin : g_par
      assign parents[p] = par_nodes[M-1][p];
    end

    ehsd_level #(.L(L), .M(M), .P(P), .RAD_W(RAD_W)) u_level (
      .clk(clk), .rst_n(rst_n), .in_vld(par_vld[M-1]), .in_nodes(parents),
      .xr_row(xr_row), .y_m(y_m), .out_vld(ch_vld), .out_nodes(children));

    if (M == 1) begin : g_compare
      ehsd_compare #(.NIN(NC), .W(NODE_W), .KEY_W(RAD_W)) u_cmp (
        .clk(clk), .rst_n(rst_n), .in_vld(ch_vld), .din(children),
        .out_vld(best_vld), .best(best_node));
    end else begin : g_next
      logic [NODE_W-1:0] kept [KM];
      logic              kept_vld;
      if (NC == KM) begin : g_full
        assign kept     = children;
        assign kept_vld = ch_vld;
      end else begin : g_nsb
        ehsd_nsb #(.NIN(NC), .K(KM), .W(NODE_W), .KEY_W(RAD_W),
                   .REG_EVERY(REG_EVERY), .GROUP(GS_GROUP)) u_nsb (
          .clk(clk), .rst_n(rst_n), .in_vld(ch_vld), .din(children),
          .out_vld(kept_vld), .dout(kept));
      end
      for (genvar j = 0; j < MAXK; j++) begin : g_fwd
        if (j < KM) begin : g_use
          assign par_nodes[M-2][j] = kept[j];
        end else begin : g_zero
          assign par_nodes[M-2][j] = '0;
        end
      end
      assign par_vld[M-2] = kept_vld;
    end
  end

  // ---- result --------------------------------------------------------------
  assign out_vld    = best_vld;
  assign out_rad    = best_node[NODE_W-1 -: RAD_W];
  assign out_inside = !best_node[NODE_W-1];
  always_comb
    for (int m = 0; m < L; m++) x_hat[m] = best_node[SYM_W*m +: SYM_W];

  // The configuration must end in a single vector and never keep more
  // nodes than a level produces.
  initial begin
    assert (kept_at(L, K_BEST, 1) == 1)
      else $error("K_BEST must end with 1 at level 1");
    for (int m = L; m >= 1; m--)
      assert (kept_at(L, K_BEST, m) <= NSYM * parents_at(L, K_BEST, m))
        else $error("K_BEST keeps more nodes than level %0d produces", m);
  end

endmodule
