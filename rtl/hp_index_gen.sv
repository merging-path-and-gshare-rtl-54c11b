// Hashed index generation for every table of the hashed perceptron.
//
// All indices for branch b are computed in the cycle in which the previous
// branch b-1 is predicted, from what is known then: the hashed address of
// b-1 (pc_l), the speculative global history up to b-2 (ghr, bit 0 most
// recent) and the addresses of older branches (path, entry 0 most recent).
// The mappings, with L = log2(weights per table) and H the history of b
// (H[0] = direction of b-1, H[k] = ghr[k-1]):
//
//   table 0, bias     {mi,A}  : index = {pc(b-1)[L-2:0], H[0]}       (ahead)
//   tables 1..NP, path {mi,P} : index = pc(b-t)                      (normal)
//                     {mi,PxP}: index = pc(b-2t+1) ^ (pc(b-2t) << 1)
//                {mi,AxPxPxP}: index = pc(b-1) ^ (pc(b-3t+1) << 1)
//                                      ^ (pc(b-3t) << 2) ^ (pc(b-3t-1) << 3)
//   table NP+1, newest {mi,AxG}: index = {H[L-1:1] ^ pc(b-1)[L-2:0], H[0]} (ahead)
//   table NP+1+s, s>=1 {mi,AxG}: index = H[s*L +: L] ^ pc(b-1)
//
// For the two ahead tables H[0] is not known yet: the row (upper L-1 bits)
// is output and the selecting LSB is applied later; their lsb output is 0.
// The other tables get their full index here (row plus lsb).
// With HEAD_TAIL the bias table has 1.75 * 2**(L-1) rows (row = pc(b-1)
// modulo that number, so its index is one bit wider: all rows are then
// IW-1 = L bits wide) and the three oldest global tables half the rows
// (row MSB cleared, i.e. index modulo their size).
// The mappings and the use of the previous branch address for the global
// tables follow the document; where exactly the newest history bit goes
// (the index LSB) is this design's choice. Purely combinational.
module hp_index_gen #(
  parameter int unsigned NT = hp_pkg::DEF_NT,
  parameter int unsigned NP = hp_pkg::DEF_NP,
  parameter int unsigned L  = hp_pkg::DEF_L,
  parameter hp_pkg::path_mode_e PATH_MODE = hp_pkg::PATH_P,
  parameter bit          HEAD_TAIL = 1'b0,
  localparam int unsigned IW = hp_pkg::idx_width(L, HEAD_TAIL),
  localparam int unsigned GL = hp_pkg::ghr_len(NT, NP, L),
  localparam int unsigned PD = hp_pkg::path_depth(NP, PATH_MODE)
) (
  input  logic [L-1:0]      pc_l,    // hashed address of branch b-1
  input  logic [GL-1:0]     ghr,     // directions of b-2, b-3, ...
  input  logic [PD*L-1:0]   path,    // hashed addresses of b-2, b-3, ...
  output logic [NT*(IW-1)-1:0] rows, // row of each table
  output logic [NT-1:0]     lsbs     // index LSB of non-ahead tables
);
  // pc(b-k) for k = 1 .. PD+1
  function automatic logic [L-1:0] past_pc(int unsigned k, logic [L-1:0] cur,
                                           logic [PD*L-1:0] p);
    return (k == 1) ? cur : p[(k-2)*L +: L];
  endfunction

  localparam int unsigned BIAS_ROWS = hp_pkg::table_rows(0, NT, NP, L, HEAD_TAIL);

  always_comb begin
    logic [L-1:0] idx;
    logic [IW-2:0] r;
    rows = '0;
    lsbs = '0;
    for (int unsigned t = 0; t < NT; t++) begin
      if (t == 0) begin
        if (HEAD_TAIL) rows[t*(IW-1) +: (IW-1)] = (IW-1)'(pc_l % L'(BIAS_ROWS));
        else           rows[t*(IW-1) +: (IW-1)] = (IW-1)'(pc_l[L-2:0]);
      end else if (t <= NP) begin
        case (PATH_MODE)
          hp_pkg::PATH_PXP:
            idx = past_pc(2*t-1, pc_l, path) ^ (past_pc(2*t, pc_l, path) << 1);
          hp_pkg::PATH_AXPPP:
            idx = pc_l ^ (past_pc(3*t-1, pc_l, path) << 1)
                       ^ (past_pc(3*t, pc_l, path) << 2)
                       ^ (past_pc(3*t+1, pc_l, path) << 3);
          default:
            idx = past_pc(t, pc_l, path);
        endcase
        rows[t*(IW-1) +: (IW-1)] = (IW-1)'(idx[L-1:1]);
        lsbs[t]                  = idx[0];
      end else if (t == NP + 1) begin
        rows[t*(IW-1) +: (IW-1)] = (IW-1)'(ghr[L-2:0] ^ pc_l[L-2:0]);
      end else begin
        idx = ghr[(t-NP-1)*L - 1 +: L] ^ pc_l;
        r   = (IW-1)'(idx[L-1:1]);
        // a halved table keeps the index modulo its size
        if (HEAD_TAIL && t >= NT - 3) r[L-2] = 1'b0;
        rows[t*(IW-1) +: (IW-1)] = r;
        lsbs[t]                  = idx[0];
      end
    end
  end

endmodule
