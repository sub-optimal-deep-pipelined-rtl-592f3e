// ehsd_delay -- fixed shift-register delay for side data of the detector
// pipeline.
//
// The detector accepts a new problem every clock, so the row of x*R products
// and the element of Q^H y that a search level needs must reach that level in
// the same cycle as the nodes of the same problem.  Each such word travels
// down a chain of D registers next to the node pipeline, like the register
// chains that carry R and y alongside the levels in the original design.
// The data registers have no reset: only the valid bits of the pipeline are
// reset, and data is ignored while they are low.
//
// Interface: din (W bits) enters every clock; dout is din delayed by D
// cycles.  D = 0 makes the chain a wire.
module ehsd_delay #(
  parameter int unsigned W = 8,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (D == 0) begin : g_wire
    assign dout = din;
  end else begin : g_chain
    logic [W-1:0] sr [D];
    always_ff @(posedge clk) begin
      sr[0] <= din;
      for (int i = 1; i < D; i++) sr[i] <= sr[i-1];
    end
    assign dout = sr[D-1];
  end

endmodule
