// ehsd_nsb -- node selection block: keeps the K best of NIN search nodes.
//
// All NIN nodes of a level are ranked together (global sorting) by a Batcher
// network and the K-best selection passes the first K, i.e. the K nodes with
// the largest remaining squared radius (smallest partial distance).  NIN
// need not be a power of two: the network is padded to the next power of two
// with nodes of the most negative radius, which always rank last; the
// comparators that then only see padding are constant and fold away in
// synthesis.  The selection itself adds no register.
//
// With GROUP > 0 (and NIN > GROUP) the block is built as the recursive
// global sort instead: the nodes are split into groups of GROUP, each group
// is sorted by its own GROUP-input network and keeps its K best, and the
// surviving groups*K nodes go through the same construction again until one
// network of at most GROUP inputs is left.  Since the K best of all nodes are
// always among the K best of their own group, the result is the same set as
// with one network; only size and latency differ.  GROUP = 0, one network
// over all inputs, is the default.
//
// Interface: din/in_vld in; dout (K nodes, best first)/out_vld out
// nsb_latency(NIN, K, GROUP, REG_EVERY) clocks later (10 for 64 inputs, 7
// for 32, 5 for 16 with one network and a register every two compare
// stages; 15 for 64 -> 8 built from 16-input groups).
module ehsd_nsb import ehsd_pkg::*; #(
  parameter int unsigned NIN       = 64,
  parameter int unsigned K         = 8,
  parameter int unsigned W         = 48,
  parameter int unsigned KEY_W     = 32,
  parameter int unsigned REG_EVERY = 2,
  parameter int unsigned GROUP     = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_vld,
  input  logic [W-1:0] din  [NIN],
  output logic         out_vld,
  output logic [W-1:0] dout [K]
);

  localparam logic [W-1:0] PAD = {1'b1, {(W-1){1'b0}}};

  if (GROUP == 0 || NIN <= GROUP) begin : g_single
    localparam int unsigned NP = 1 << $clog2(NIN);
    logic [W-1:0] padded [NP];
    logic [W-1:0] sorted [NP];

    always_comb
      for (int i = 0; i < NP; i++) padded[i] = (i < NIN) ? din[i] : PAD;

    ehsd_batcher_sorter #(.N(NP), .W(W), .KEY_W(KEY_W), .REG_EVERY(REG_EVERY)) u_sort (
      .clk(clk), .rst_n(rst_n), .in_vld(in_vld), .din(padded),
      .out_vld(out_vld), .dout(sorted));

    // K-best selection.
    always_comb
      for (int i = 0; i < K; i++) dout[i] = sorted[i];
  end else begin : g_recursive
    localparam int unsigned NG = (NIN + GROUP - 1) / GROUP;
    logic [W-1:0] survivors [NG*K];
    logic         grp_vld [NG];

    for (genvar g = 0; g < NG; g++) begin : g_group
      logic [W-1:0] gin  [GROUP];
      logic [W-1:0] gout [K];
      always_comb
        for (int i = 0; i < GROUP; i++)
          gin[i] = (g * GROUP + i < NIN) ? din[g * GROUP + i] : PAD;
      ehsd_nsb #(.NIN(GROUP), .K(K), .W(W), .KEY_W(KEY_W),
                 .REG_EVERY(REG_EVERY), .GROUP(0)) u_group (
        .clk(clk), .rst_n(rst_n), .in_vld(in_vld), .din(gin),
        .out_vld(grp_vld[g]), .dout(gout));
      for (genvar i = 0; i < K; i++) begin : g_keep
        assign survivors[g * K + i] = gout[i];
      end
    end

    ehsd_nsb #(.NIN(NG * K), .K(K), .W(W), .KEY_W(KEY_W),
               .REG_EVERY(REG_EVERY), .GROUP(GROUP)) u_next (
      .clk(clk), .rst_n(rst_n), .in_vld(grp_vld[0]), .din(survivors),
      .out_vld(out_vld), .dout(dout));

    initial assert (K < GROUP)
      else $error("recursive global sort needs K < GROUP");
  end

endmodule
