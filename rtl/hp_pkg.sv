// Shared constants and helper functions of the hashed perceptron branch
// predictor.
//
// The predictor is a perceptron whose weights are not selected one per
// history bit but by hashing: a bias table indexed by the branch address,
// a few path tables indexed by the addresses of the most recent branches
// ({mi,P} or {mi,PxP} mapping), and gshare-style tables indexed by the
// exclusive OR of the branch address and one segment of the global history
// ({mi,AxG} mapping). No input vector is used: the output is the plain sum
// of one weight per table and its sign is the prediction.
//
// The default numbers describe the 32 KB configuration: 16 tables of 2048
// 8-bit weights, one of them a path table. The training threshold follows
// theta = floor(1.93*h + h/2) with h the number of non-bias tables.
package hp_pkg;

  // Default configuration (32 KB, 16 tables).
  localparam int unsigned DEF_NT   = 16;  // tables, bias table included
  localparam int unsigned DEF_NP   = 1;   // path-indexed tables
  localparam int unsigned DEF_W    = 8;   // bits per weight
  localparam int unsigned DEF_L    = 11;  // log2(weights per table)
  localparam int unsigned DEF_PC_W = 32;  // branch address width
  localparam int unsigned DEF_PC_SHIFT = 2;  // address bits below the instruction

  // Path table hash: {mi,P} (one past branch address per weight),
  // {mi,PxP} (two past addresses, the older one shifted left by one) or
  // {mi,AxPxPxP} (the previous address XORed with three older ones,
  // shifted left by one, two and three).
  typedef enum logic [1:0] {PATH_P = 2'd0, PATH_PXP = 2'd1, PATH_AXPPP = 2'd2} path_mode_e;

  // Width of the perceptron output: a sum of NT weights, plus one bit of
  // headroom for the optional doubling of two weights (weight boosting).
  function automatic int unsigned sum_width(int unsigned w, int unsigned nt);
    return w + $clog2(nt) + 1;
  endfunction

  // theta = floor(1.93*h + h/2) = floor(243*h/100), exact in integers.
  function automatic int unsigned theta(int unsigned h);
    return (243 * h) / 100;
  endfunction

  // Global history bits needed: NG segments of L bits, minus the newest
  // bit, which is not in the register yet when the tables are read.
  function automatic int unsigned ghr_len(int unsigned nt, int unsigned np, int unsigned l);
    return (nt - 1 - np) * l - 1;
  endfunction

  // Depth of the path register (older branch addresses kept, L bits each).
  function automatic int unsigned path_depth(int unsigned np, path_mode_e mode);
    if (np == 0) return 1;
    case (mode)
      PATH_PXP:   return 2 * np;
      PATH_AXPPP: return 3 * np;
      default:    return np;
    endcase
  endfunction

  // Tables that are ahead pipelined: two neighbouring weights are read and
  // the direction of the previous branch picks one. These are the bias
  // table (0) and the global table with the most recent history (NP+1).
  function automatic bit is_ahead(int unsigned t, int unsigned np);
    return (t == 0) || (t == np + 1);
  endfunction

  // Head-splitting / tail-sharing (optional): the bias table gets 1.75
  // times the entries and the three tables with the oldest history half.
  // The bias index then needs one more bit, so all indices are carried
  // with idx_width bits.
  function automatic int unsigned idx_width(int unsigned l, bit head_tail);
    return head_tail ? l + 1 : l;
  endfunction

  // Rows (pairs of weights) of table t.
  function automatic int unsigned table_rows(int unsigned t, int unsigned nt, int unsigned np,
                                             int unsigned l, bit head_tail);
    if (head_tail && t == 0) return 7 * (2 ** (l - 3));
    if (head_tail && t >= nt - 3 && t > np + 1) return 2 ** (l - 2);
    return 2 ** (l - 1);
  endfunction

  // Bits of the per-prediction record (see hp_predictor).
  function automatic int unsigned meta_width(int unsigned nt, int unsigned np,
                                             int unsigned w, int unsigned l,
                                             path_mode_e mode, bit head_tail);
    return nt * idx_width(l, head_tail)  // index of every table
         + sum_width(w, nt)       // perceptron output
         + 1                      // prediction
         + l                      // hashed branch address
         + ghr_len(nt, np, l)     // global history before the branch
         + path_depth(np, mode) * l  // path history before the branch
         + sum_width(w, nt)       // checkpoint: partial sum for the next branch
         + 2 * w;                 // checkpoint: the two weights not selected
  endfunction

endpackage
