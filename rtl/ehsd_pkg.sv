// ehsd_pkg -- shared constants and elaboration-time functions of the EHSD
// sphere detector.
//
// The detector works on the real-valued form of an N x N complex MIMO system,
// so a 16-QAM problem has 2N search levels and every level carries one real
// symbol from {-3,-1,+1,+3}.  That symbol is coded in two bits as
// value = 2*code - 3 (00=-3, 01=-1, 10=+1, 11=+3).
//
// A search-tree node is a flat vector {radius, symbols}: the signed remaining
// squared radius r_m^2 in the top RAD_W bits and the 2-bit code of level k in
// bits [2(k-1)+1 : 2(k-1)].  A larger remaining radius means a smaller partial
// Euclidean distance, so the node sorters order nodes by descending radius.
//
// Word widths of R (15 bits signed) and of Q^H y (17 bits signed) follow the
// fixed-point format used for verification of the original design; the
// radius width and the pipeline bookkeeping below are this design's choice.
package ehsd_pkg;

  localparam int unsigned SYM_W      = 2;   // bits per real 16-QAM symbol
  localparam int unsigned NSYM       = 4;   // real constellation points
  localparam int unsigned R_W        = 15;  // element of R, signed
  localparam int unsigned Y_W        = 17;  // element of Q^H y, signed
  localparam int unsigned XR_W       = R_W + 2; // x*R with |x| <= 3
  localparam int unsigned MAX_LEVELS = 16;  // up to 8x8 MIMO

  // Default search configuration of the 4x4 detector, listed from the top
  // level (2N) down to level 1: nodes kept after each level.
  localparam int unsigned K_4X4 [MAX_LEVELS] =
    '{4, 16, 8, 8, 4, 4, 4, 1, 0, 0, 0, 0, 0, 0, 0, 0};

  // Real value of a symbol code.
  function automatic int sym_value(input logic [SYM_W-1:0] code);
    return 2 * int'(code) - 3;
  endfunction

  // Number of compare stages of a Batcher odd-even merge network on n inputs
  // (n a power of two): lg(n)*(lg(n)+1)/2.
  function automatic int unsigned batcher_stages(input int unsigned n);
    int unsigned lg;
    lg = $clog2(n);
    return lg * (lg + 1) / 2;
  endfunction

  // Pipeline latency of a node selection block with nin inputs keeping k:
  // the inputs are padded to a power of two and a register follows every
  // reg_every compare stages.  With group > 0 and nin > group the block
  // sorts groups of `group` nodes, keeps k of each and repeats on the
  // survivors (recursive global sort).
  function automatic int unsigned nsb_latency(input int unsigned nin,
                                              input int unsigned k,
                                              input int unsigned group,
                                              input int unsigned reg_every);
    int unsigned ng;
    if (group == 0 || nin <= group)
      return batcher_stages(1 << $clog2(nin)) / reg_every;
    ng = (nin + group - 1) / group;
    return batcher_stages(1 << $clog2(group)) / reg_every
           + nsb_latency(ng * k, k, group, reg_every);
  endfunction

  // Nodes entering level m (1..levels): 1 root at the top level, otherwise
  // the nodes kept after level m+1.
  function automatic int unsigned parents_at(input int unsigned levels,
                                             input int unsigned k [MAX_LEVELS],
                                             input int unsigned m);
    return (m == levels) ? 1 : k[levels - m - 1];
  endfunction

  // Nodes kept after level m.
  function automatic int unsigned kept_at(input int unsigned levels,
                                          input int unsigned k [MAX_LEVELS],
                                          input int unsigned m);
    return k[levels - m];
  endfunction

  // Cycles a level's selection stage (NSB or final compare) adds after it.
  function automatic int unsigned select_latency(input int unsigned levels,
                                                 input int unsigned k [MAX_LEVELS],
                                                 input int unsigned m,
                                                 input int unsigned group,
                                                 input int unsigned reg_every);
    int unsigned nin;
    nin = NSYM * parents_at(levels, k, m);
    if (m == 1) return $clog2(nin);
    if (nin == kept_at(levels, k, m)) return 0;
    return nsb_latency(nin, kept_at(levels, k, m), group, reg_every);
  endfunction

  // Cycle, counted from the detector inputs, at which level m receives its
  // parent nodes: one input register, one XR-multiplier register, then for
  // every level above 3 LPB stages plus its selection stage.
  function automatic int unsigned level_time(input int unsigned levels,
                                             input int unsigned k [MAX_LEVELS],
                                             input int unsigned m,
                                             input int unsigned group,
                                             input int unsigned reg_every);
    int unsigned t;
    t = 2;
    for (int unsigned j = levels; j > m; j--)
      t += 3 + select_latency(levels, k, j, group, reg_every);
    return t;
  endfunction

  // Total input-to-output latency of the detector.
  function automatic int unsigned detector_latency(input int unsigned levels,
                                                   input int unsigned k [MAX_LEVELS],
                                                   input int unsigned group,
                                                   input int unsigned reg_every);
    return level_time(levels, k, 1, group, reg_every) + 3
           + select_latency(levels, k, 1, group, reg_every);
  endfunction

  // Largest number of nodes kept after any level.
  function automatic int unsigned max_kept(input int unsigned levels,
                                           input int unsigned k [MAX_LEVELS]);
    int unsigned mx;
    mx = 1;
    for (int unsigned j = 0; j < levels; j++)
      if (k[j] > mx) mx = k[j];
    return mx;
  endfunction

endpackage
