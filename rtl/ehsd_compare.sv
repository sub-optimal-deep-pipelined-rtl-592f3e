// ehsd_compare -- final selection of the detector: the single best of the
// NIN level-1 nodes.
//
// Only the best full symbol vector is needed after the last level, so a
// binary tree of two-input selections replaces a sorter.  Each selection
// keeps the node with the larger remaining squared radius (the earlier input
// on a tie), and a register follows every tree rank, giving clog2(NIN)
// clocks of latency.  NIN is padded to a power of two with nodes of the most
// negative radius.
//
// Interface: din/in_vld in; best/out_vld out clog2(NIN) clocks later.
module ehsd_compare import ehsd_pkg::*; #(
  parameter int unsigned NIN   = 16,
  parameter int unsigned W     = 48,
  parameter int unsigned KEY_W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_vld,
  input  logic [W-1:0] din [NIN],
  output logic         out_vld,
  output logic [W-1:0] best
);

  localparam int unsigned LG = $clog2(NIN);
  localparam int unsigned NP = 1 << LG;
  localparam logic [W-1:0] PAD = {1'b1, {(W-1){1'b0}}};

  logic [W-1:0] tr  [LG+1][NP];
  logic         vtr [LG+1];

  always_comb
    for (int i = 0; i < NP; i++) tr[0][i] = (i < NIN) ? din[i] : PAD;
  assign vtr[0] = in_vld;

  for (genvar r = 0; r < LG; r++) begin : g_rank
    localparam int unsigned NO = NP >> (r + 1);
    always_ff @(posedge clk) begin
      for (int i = 0; i < NO; i++)
        tr[r+1][i] <= ($signed(tr[r][2*i][W-1 -: KEY_W]) >=
                       $signed(tr[r][2*i+1][W-1 -: KEY_W])) ? tr[r][2*i] : tr[r][2*i+1];
      for (int i = NO; i < NP; i++) tr[r+1][i] <= '0;
    end
    always_ff @(posedge clk) begin
      if (!rst_n) vtr[r+1] <= 1'b0;
      else        vtr[r+1] <= vtr[r];
    end
  end

  assign best    = tr[LG][0];
  assign out_vld = vtr[LG];

endmodule
