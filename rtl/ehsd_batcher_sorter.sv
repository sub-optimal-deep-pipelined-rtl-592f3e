// ehsd_batcher_sorter -- pipelined Batcher odd-even merge sorting network.
//
// N words (N a power of two) are sorted by descending signed key, the top
// KEY_W bits of each word; the rest of the word travels with its key.  The
// network has lg(N)(lg(N)+1)/2 compare stages of ehsd_csw2 elements: stage
// (p,k), for p = 1,2,4,.. and k = p,p/2,..,1, compares positions a and a+k
// whenever (a - k mod p) mod 2k < k and a and a+k lie in the same block of
// 2p positions.  A register follows every REG_EVERY-th stage, as in the
// original design (a register after every two CSW2 stages), which gives 5,
// 7 and 10 clocks of latency for 16, 32 and 64 inputs; stages after the last
// register are combinational.
//
// Interface: din/in_vld in, dout/out_vld out LATENCY clocks later, with
// dout[0] the word with the largest key.  A new set is accepted every clock.
module ehsd_batcher_sorter import ehsd_pkg::*; #(
  parameter int unsigned N         = 16,
  parameter int unsigned W         = 48,
  parameter int unsigned KEY_W     = 32,
  parameter int unsigned REG_EVERY = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_vld,
  input  logic [W-1:0] din  [N],
  output logic         out_vld,
  output logic [W-1:0] dout [N]
);

  localparam int unsigned S       = batcher_stages(N);

  // (p, k) of compare stage s.
  function automatic int unsigned stage_p(input int unsigned s);
    int unsigned cnt;
    cnt = 0;
    for (int unsigned p = 1; p < N; p = p * 2)
      for (int unsigned k = p; k >= 1; k = k / 2) begin
        if (cnt == s) return p;
        cnt++;
      end
    return 1;
  endfunction

  function automatic int unsigned stage_k(input int unsigned s);
    int unsigned cnt;
    cnt = 0;
    for (int unsigned p = 1; p < N; p = p * 2)
      for (int unsigned k = p; k >= 1; k = k / 2) begin
        if (cnt == s) return k;
        cnt++;
      end
    return 1;
  endfunction

  // Position a is the upper input of a comparator at stage (p, k).
  function automatic bit is_low(input int unsigned p, input int unsigned k,
                                input int unsigned a);
    int unsigned j0;
    j0 = k % p;
    if (a < j0)                      return 1'b0;
    if (a + k >= N)                  return 1'b0;
    if (((a - j0) % (2 * k)) >= k)   return 1'b0;
    if ((a / (2 * p)) != ((a + k) / (2 * p))) return 1'b0;
    return 1'b1;
  endfunction

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int unsigned P = stage_p(s);
    localparam int unsigned K = stage_k(s);
    logic [W-1:0] si [N];   // input of this stage
    logic         vi;
    logic [W-1:0] nx [N];   // compare results
    logic [W-1:0] so [N];   // output, registered or not
    logic         vo;

    if (s == 0) begin : g_first
      assign si = din;
      assign vi = in_vld;
    end else begin : g_chain
      assign si = g_stage[s-1].so;
      assign vi = g_stage[s-1].vo;
    end

    for (genvar a = 0; a < N; a++) begin : g_pos
      if (is_low(P, K, a)) begin : g_cmp
        ehsd_csw2 #(.W(W), .KEY_W(KEY_W)) u_csw2 (
          .a(si[a]), .b(si[a+K]), .x(nx[a]), .y(nx[a+K]));
      end else if (!(a >= K && is_low(P, K, a - K))) begin : g_pass
        assign nx[a] = si[a];
      end
    end

    if ((s + 1) % REG_EVERY == 0) begin : g_reg
      always_ff @(posedge clk) so <= nx;
      always_ff @(posedge clk) begin
        if (!rst_n) vo <= 1'b0;
        else        vo <= vi;
      end
    end else begin : g_comb
      assign so = nx;
      assign vo = vi;
    end
  end

  assign dout    = g_stage[S-1].so;
  assign out_vld = g_stage[S-1].vo;

endmodule
