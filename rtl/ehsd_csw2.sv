// ehsd_csw2 -- compare-and-swap element of the Batcher sorting network.
//
// Two nodes enter on a and b; the node whose key (the top KEY_W bits, read
// as signed) is larger leaves on x, the other on y.  The key is the
// remaining squared radius, so x carries the node with the smaller partial
// Euclidean distance: the "minimum" side of the ascending-distance network.
// On equal keys a goes to x.  Purely combinational.
module ehsd_csw2 #(
  parameter int unsigned W     = 48,
  parameter int unsigned KEY_W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic a_first;
  assign a_first = $signed(a[W-1 -: KEY_W]) >= $signed(b[W-1 -: KEY_W]);
  assign x = a_first ? a : b;
  assign y = a_first ? b : a;

endmodule
