// Hashed perceptron branch predictor, ahead pipelined to a one-cycle
// effective latency (top level).
//
// Main idea: a perceptron whose weights are each selected by a hash of a
// sequence of branches rather than one per history bit. Table 0 is the
// bias table (branch address), tables 1..NP are path tables (addresses of
// the most recent branches) and the remaining tables are gshare-like:
// each XORs the branch address with its own L-bit segment of the global
// history, so 16 tables of 2048 weights cover 154 bits of history. The
// prediction is taken when the sum of the selected weights is >= 0.
//
// Pipeline. In the cycle a branch is presented (br_valid, br_pc) its
// prediction (pred_taken, pred_out) comes out combinationally from the
// ahead latch (hp_ahead_stage), while the tables are already being read
// for the next branch with this branch's address and the history before
// it. The two tables that would need this branch's direction (bias, and
// the global table with the newest history) read both neighbouring
// weights; the direction picks one in the next branch's cycle. Speculative
// history is updated at the clock edge. With no branch, nothing moves.
//
// Resolution. Every prediction comes with pred_meta, a record the core
// keeps and returns on upd_meta with the resolved direction (upd_valid,
// upd_taken). It holds the indices used, the output, the prediction, the
// history before the branch and a checkpoint: the partial sum and the
// unselected ahead weights read for the following branch. The update
// trains the tables (hp_train_ctrl); if the branch was mispredicted, the
// same cycle also restores the history and reloads the ahead latch from
// the checkpoint, so the first correct-path branch can be predicted in the
// next cycle. A branch presented in a recovery cycle is ignored (it is on
// the wrong path). After reset the tables clear themselves; ready rises
// after 2**(L-1) cycles (7/4 of that with HEAD_TAIL, the bias table being
// the largest) and branches are ignored until then.
//
// The mappings, the training rule, the ahead pipelining with a pair read
// and the checkpointing of the unselected weights follow the document; the
// record format, the PC bits used and the recovery-cycle behaviour are
// this design's.
module hp_predictor #(
  parameter int unsigned NT       = hp_pkg::DEF_NT,
  parameter int unsigned NP       = hp_pkg::DEF_NP,
  parameter int unsigned W        = hp_pkg::DEF_W,
  parameter int unsigned L        = hp_pkg::DEF_L,
  parameter int unsigned PC_W     = hp_pkg::DEF_PC_W,
  parameter int unsigned PC_SHIFT = hp_pkg::DEF_PC_SHIFT,
  parameter hp_pkg::path_mode_e PATH_MODE = hp_pkg::PATH_P,
  parameter bit          BOOST    = 1'b0,
  parameter bit          HEAD_TAIL = 1'b0,  // 1.75x bias table, halved oldest tables
  localparam int unsigned SW = hp_pkg::sum_width(W, NT),
  localparam int unsigned MW = hp_pkg::meta_width(NT, NP, W, L, PATH_MODE, HEAD_TAIL)
) (
  input  logic                 clk,
  input  logic                 rst,
  output logic                 ready,
  // prediction
  input  logic                 br_valid,
  input  logic [PC_W-1:0]      br_pc,
  output logic                 pred_taken,
  output logic signed [SW-1:0] pred_out,
  output logic [MW-1:0]        pred_meta,
  // resolution
  input  logic                 upd_valid,
  input  logic                 upd_taken,
  input  logic [MW-1:0]        upd_meta,
  output logic                 upd_mispredict,  // recovery happens this cycle
  output logic                 upd_train,       // tables are trained this cycle
  output logic                 upd_low_conf     // |out| <= theta for this update
);
  localparam int unsigned GL = hp_pkg::ghr_len(NT, NP, L);
  localparam int unsigned PD = hp_pkg::path_depth(NP, PATH_MODE);
  localparam int unsigned TR = NP + 1;        // newest global table
  localparam int unsigned NN = NT - 2;        // tables summed ahead
  localparam int unsigned IW = hp_pkg::idx_width(L, HEAD_TAIL);  // index bits

  typedef struct packed {
    logic [NT*IW-1:0]    idx;
    logic signed [SW-1:0] out;
    logic                pred;
    logic [L-1:0]        pc;
    logic [GL-1:0]       ghr;
    logic [PD*L-1:0]     path;
    logic signed [SW-1:0] rec_psum;
    logic [W-1:0]        rec_w_recent;
    logic [W-1:0]        rec_w_bias;
  } meta_t;

  meta_t m_in, m_out;
  assign m_in = meta_t'(upd_meta);

  // ---------------------------------------------------------------- state
  logic [GL-1:0]   ghr;
  logic [PD*L-1:0] path;
  logic [L-1:0]    pc_l;
  logic            recover, advance, train_en, train_inc, low_conf;
  logic [NT-1:0]   tbl_ready;

  assign pc_l    = br_pc[PC_SHIFT +: L];
  assign ready   = &tbl_ready;
  assign advance = br_valid && ready && !recover;

  // --------------------------------------------------------- index and read
  logic [L-1:0]        ig_pc;
  logic [GL-1:0]       ig_ghr;
  logic [PD*L-1:0]     ig_path;
  logic [NT*(IW-1)-1:0] rows;
  logic [NT-1:0]       lsbs;

  always_comb begin
    if (recover) begin
      ig_pc = m_in.pc; ig_ghr = m_in.ghr; ig_path = m_in.path;
    end else begin
      ig_pc = pc_l;    ig_ghr = ghr;      ig_path = path;
    end
  end

  hp_index_gen #(.NT(NT), .NP(NP), .L(L), .PATH_MODE(PATH_MODE), .HEAD_TAIL(HEAD_TAIL)) u_idx (
    .pc_l(ig_pc), .ghr(ig_ghr), .path(ig_path), .rows(rows), .lsbs(lsbs)
  );

  logic [2*W-1:0]  pairs [NT];
  logic [NN*W-1:0] known_w;
  logic [NT*IW-1:0] cur_idx;

  for (genvar t = 0; t < NT; t++) begin : g_tbl
    hp_weight_table #(.W(W), .L(IW), .ROWS(hp_pkg::table_rows(t, NT, NP, L, HEAD_TAIL))) u_tbl (
      .clk(clk), .rst(rst), .ready(tbl_ready[t]),
      .rd_row(rows[t*(IW-1) +: (IW-1)]), .rd_pair(pairs[t]),
      .upd_en(train_en), .upd_idx(m_in.idx[t*IW +: IW]), .upd_taken(train_inc)
    );
  end

  // weights whose index is fully known, in table order without 0 and TR
  always_comb begin
    int unsigned k;
    k = 0;
    known_w = '0;
    for (int unsigned t = 0; t < NT; t++) begin
      if (!hp_pkg::is_ahead(t, NP)) begin
        known_w[k*W +: W] = lsbs[t] ? pairs[t][2*W-1:W] : pairs[t][W-1:0];
        k++;
      end
    end
  end

  // Static weight boosting doubles the most recent path table (table 1).
  localparam logic [NN-1:0] PS_DOUBLE = (BOOST && NP > 0) ? NN'(1) : '0;

  logic signed [SW-1:0] psum_next;
  hp_adder_tree #(.N(NN), .W(W), .OW(SW), .DOUBLE(PS_DOUBLE)) u_psum (
    .in(known_w), .sum(psum_next)
  );

  // ----------------------------------------------------------- ahead latch
  hp_ahead_stage #(.NT(NT), .NP(NP), .W(W), .L(IW), .BOOST(BOOST)) u_stage (
    .clk(clk), .rst(rst), .sel(ghr[0]),
    .advance(advance), .ld_psum(psum_next),
    .ld_pair_bias(pairs[0]), .ld_pair_recent(pairs[TR]),
    .ld_rows(rows), .ld_lsbs(lsbs),
    .recover(recover), .rec_psum(m_in.rec_psum),
    .rec_w_bias(m_in.rec_w_bias), .rec_w_recent(m_in.rec_w_recent),
    .out(pred_out), .idx(cur_idx)
  );

  assign pred_taken = !pred_out[SW-1];

  always_comb begin
    m_out.idx          = cur_idx;
    m_out.out          = pred_out;
    m_out.pred         = pred_taken;
    m_out.pc           = pc_l;
    m_out.ghr          = ghr;
    m_out.path         = path;
    m_out.rec_psum     = psum_next;
    m_out.rec_w_bias   = pred_taken ? pairs[0][W-1:0]  : pairs[0][2*W-1:W];
    m_out.rec_w_recent = pred_taken ? pairs[TR][W-1:0] : pairs[TR][2*W-1:W];
  end
  assign pred_meta = MW'(m_out);

  // -------------------------------------------------------------- history
  hp_history #(.L(L), .GL(GL), .PD(PD)) u_hist (
    .clk(clk), .rst(rst),
    .push(advance), .push_dir(pred_taken), .push_pc(pc_l),
    .restore(recover), .restore_ghr(m_in.ghr), .restore_path(m_in.path),
    .restore_dir(upd_taken), .restore_pc(m_in.pc),
    .ghr(ghr), .path(path)
  );

  // ------------------------------------------------------------- training
  hp_train_ctrl #(.H(NT - 1), .OW(SW)) u_train (
    .upd_valid(upd_valid && ready), .pred(m_in.pred), .taken(upd_taken),
    .out(m_in.out), .mispredict(recover), .low_conf(low_conf),
    .train_en(train_en), .train_inc(train_inc)
  );

  assign upd_mispredict = recover;
  assign upd_train      = train_en;
  assign upd_low_conf   = low_conf;

  // The record on the update port must come from this predictor: its
  // stored prediction has to be the sign of its stored output.
  assert property (@(posedge clk) disable iff (rst)
                   upd_valid |-> (m_in.pred == !m_in.out[SW-1]))
    else $error("update record inconsistent: pred does not match out");

endmodule
