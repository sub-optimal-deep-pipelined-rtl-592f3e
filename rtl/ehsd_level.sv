// ehsd_level -- one search level of the detector: every parent node is
// expanded into all four real 16-QAM symbols by four level processing
// blocks.
//
// Child c of parent p is out_nodes[4p+c] and carries symbol code c at level
// M.  The LPBs' output registers are the level's pipeline register, so the
// children appear 3 clocks after the parents.  xr_row and y_m must be the
// products of row M of R and (Q^H y)_M of the same problem, presented in the
// same cycle as the parents.
module ehsd_level import ehsd_pkg::*; #(
  parameter int unsigned L     = 8,
  parameter int unsigned M     = 8,
  parameter int unsigned P     = 1,
  parameter int unsigned RAD_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_vld,
  input  logic [RAD_W+SYM_W*L-1:0] in_nodes [P],
  input  logic signed [XR_W-1:0]   xr_row [L][NSYM],
  input  logic signed [Y_W-1:0]    y_m,
  output logic                     out_vld,
  output logic [RAD_W+SYM_W*L-1:0] out_nodes [NSYM*P]
);

  logic [NSYM*P-1:0] vld;

  for (genvar p = 0; p < P; p++) begin : g_parent
    for (genvar c = 0; c < NSYM; c++) begin : g_child
      ehsd_lpb #(.L(L), .M(M), .SYM(c), .RAD_W(RAD_W)) u_lpb (
        .clk     (clk),
        .rst_n   (rst_n),
        .in_vld  (in_vld),
        .in_node (in_nodes[p]),
        .xr_row  (xr_row),
        .y_m     (y_m),
        .out_vld (vld[NSYM*p+c]),
        .out_node(out_nodes[NSYM*p+c])
      );
    end
  end

  // All LPBs of a level run in lock step.
  assign out_vld = vld[0];

  lpb_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                 (vld == '0) || (vld == '1));

endmodule
