// ehsd_lpb -- level processing block: expands one parent node of search
// level M with one fixed child symbol.
//
// The block evaluates r_(m-1)^2 = r_m^2 - ((Q^H y)_m - sum_(i>=m) R_mi x_i)^2
// for the parent's already decided symbols x_(m+1)..x_L and its own symbol
// SYM for x_m.  Each product R_mi x_i is looked up from the shared x*R table
// with a 4-to-1 multiplexer, so the only multiplier is the squaring.  Because
// R is upper triangular, level M sums L-M+1 terms: the top level needs no
// adder in the sum, level 1 the most.
//
// Pipeline (3 stages, as in the original design):
//   1. multiplexers and the first rank of pairwise adders -> register 1
//   2. rest of the adder tree, subtraction from (Q^H y)_m  -> register 2
//   3. square, subtraction from the parent radius          -> output register
// The remaining radius saturates at the most negative RAD_W value (this
// design's choice); a negative radius marks a node outside the sphere, which
// the sorters then rank last.  The child node is the parent with symbol code
// SYM written at level M.
//
// Interface: in_node/out_node are {radius (RAD_W, signed), L 2-bit codes},
// code of level k at bits [2k-1:2k-2]; xr_row[i][c] = (2c-3)*R_Mi; y_m is
// (Q^H y)_M.  in_vld/out_vld mark a valid problem, 3 clocks apart.
module ehsd_lpb import ehsd_pkg::*; #(
  parameter int unsigned L     = 8,
  parameter int unsigned M     = 8,
  parameter int unsigned SYM   = 0,
  parameter int unsigned RAD_W = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_vld,
  input  logic [RAD_W+SYM_W*L-1:0]    in_node,
  input  logic signed [XR_W-1:0]      xr_row [L][NSYM],
  input  logic signed [Y_W-1:0]       y_m,
  output logic                        out_vld,
  output logic [RAD_W+SYM_W*L-1:0]    out_node
);

  localparam int unsigned NODE_W = RAD_W + SYM_W * L;
  localparam int unsigned NT     = L - M + 1;          // terms in the sum
  localparam int unsigned NP     = (NT + 1) / 2;       // after first adder rank
  localparam int unsigned P_W    = XR_W + 1;
  localparam int unsigned SUM_W  = XR_W + $clog2(L) + 1;
  localparam int unsigned E_W    = ((SUM_W > Y_W) ? SUM_W : Y_W) + 1;
  localparam int unsigned SQ_W   = 2 * E_W;
  localparam int unsigned D_W    = ((SQ_W > RAD_W) ? SQ_W : RAD_W) + 2;
  localparam logic signed [D_W-1:0] RAD_MIN = D_W'(-(64'sd1 <<< (RAD_W - 1)));

  // ---- stage 1: symbol multiplexers and first adder rank -----------------
  logic [NODE_W-1:0]       child_node;
  logic signed [XR_W-1:0]  term [NT];
  logic signed [P_W-1:0]   psum [NP];

  always_comb begin
    child_node = in_node;
    child_node[SYM_W*(M-1) +: SYM_W] = SYM_W'(SYM);
    for (int t = 0; t < NT; t++)
      term[t] = xr_row[M-1+t][child_node[SYM_W*(M-1+t) +: SYM_W]];
    for (int p = 0; p < NP; p++) begin
      if (2*p + 1 < NT) psum[p] = P_W'(term[2*p]) + P_W'(term[2*p+1]);
      else              psum[p] = P_W'(term[2*p]);
    end
  end

  logic                    vld1;
  logic [NODE_W-1:0]       node1;
  logic signed [P_W-1:0]   psum1 [NP];
  logic signed [Y_W-1:0]   y1;

  always_ff @(posedge clk) begin
    node1 <= child_node;
    psum1 <= psum;
    y1    <= y_m;
  end

  // ---- stage 2: adder tree and residual ------------------------------------
  logic signed [SUM_W-1:0] sum;
  logic signed [E_W-1:0]   resid;

  always_comb begin
    sum = '0;
    for (int p = 0; p < NP; p++) sum += SUM_W'(psum1[p]);
    resid = E_W'(y1) - E_W'(sum);
  end

  logic                    vld2;
  logic [NODE_W-1:0]       node2;
  logic signed [E_W-1:0]   resid2;

  always_ff @(posedge clk) begin
    node2  <= node1;
    resid2 <= resid;
  end

  // ---- stage 3: square and radius update ---------------------------------
  logic signed [SQ_W-1:0]  sq;
  logic signed [D_W-1:0]   diff;
  logic [NODE_W-1:0]       node3;

  always_comb begin
    sq   = SQ_W'(resid2) * SQ_W'(resid2);
    diff = D_W'($signed(node2[NODE_W-1 -: RAD_W])) - D_W'(sq);
    if (diff < RAD_MIN) diff = RAD_MIN;
    node3 = {diff[RAD_W-1:0], node2[SYM_W*L-1:0]};
  end

  always_ff @(posedge clk) out_node <= node3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld1    <= 1'b0;
      vld2    <= 1'b0;
      out_vld <= 1'b0;
    end else begin
      vld1    <= in_vld;
      vld2    <= vld1;
      out_vld <= vld2;
    end
  end

endmodule
