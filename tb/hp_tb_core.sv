// End-to-end test bench core for hp_predictor, shared by the small and the
// full-size test benches.
//
// It plays the processor: it walks a small synthetic program of six static
// branches (a loop branch, an always-taken, a random, an XOR of two past
// random outcomes, an alternating and a never-taken branch), presents one
// branch per cycle with random gaps, keeps the prediction records in
// flight and resolves them in order after a random delay. After a
// misprediction it fetches random wrong-path branches until the
// misprediction resolves, then flushes them and resumes the program.
//
// A behavioural reference model, written from the indexing formulas and
// the training rule rather than from the RTL structure, predicts every
// branch: for branch b it reads, in the cycle of b-1, the weight each table
// would use for either direction of b-1 (the newest history bit), and sums
// the ones chosen by the actual prediction of b-1. Prediction, output,
// mispredict and training flags are compared every cycle, and the counts
// of the mechanisms (gaps, back-to-back predictions, a prediction right
// after a recovery, recoveries, squashes, both training causes, saturation,
// both pair selections) are checked to be non-zero. The clearing time after
// reset is checked to be the row count of the largest table. Five of
// the six program branches, the XOR branch included, are predictable; the
// random one caps the accuracy near 92%, and MIN_ACC_PCT sets the accuracy
// required over the second half of the run.
module hp_tb_core #(
  parameter int unsigned NT = 16,
  parameter int unsigned NP = 1,
  parameter int unsigned W  = 8,
  parameter int unsigned L  = 11,
  parameter hp_pkg::path_mode_e PATH_MODE = hp_pkg::PATH_P,
  parameter bit          BOOST = 1'b0,
  parameter bit          HEAD_TAIL = 1'b0,
  parameter bit          REQUIRE_SAT = 1'b0,
  parameter int unsigned NBR = 20000,       // branches resolved on the correct path
  parameter bit          FULL_DEFAULTS = 1'b0,
  parameter int unsigned MIN_ACC_PCT = 0    // required accuracy, second half of the run
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned SW = hp_pkg::sum_width(W, NT);
  localparam int unsigned MW = hp_pkg::meta_width(NT, NP, W, L, PATH_MODE, HEAD_TAIL);
  localparam int unsigned TH = hp_pkg::theta(NT - 1);
  localparam int NENT = 2 ** L;                       // weights of a standard table
  localparam int BIAS_ROWS = HEAD_TAIL ? 7 * 2 ** (L - 3) : NENT / 2;
  localparam int WMAX = 2 ** (W - 1) - 1;
  localparam int WMIN = -(2 ** (W - 1));

  logic rst, ready, br_valid, pred_taken, upd_valid, upd_taken;
  logic upd_mispredict, upd_train, upd_low_conf;
  logic [31:0] br_pc;
  logic signed [SW-1:0] pred_out;
  logic [MW-1:0] pred_meta, upd_meta;

  if (FULL_DEFAULTS) begin : g_dut_full
    hp_predictor dut (.*);
  end else begin : g_dut
    hp_predictor #(.NT(NT), .NP(NP), .W(W), .L(L), .PATH_MODE(PATH_MODE), .BOOST(BOOST),
                   .HEAD_TAIL(HEAD_TAIL)) dut (.*);
  end

  // ------------------------------------------------------------ the model
  int wt [NT][2 * NENT];
  bit hist [512];            // hist[0] = direction of the last predicted branch
  int pth  [16];             // pth[0]  = hashed address of the last predicted branch
  // latch: weight and index of every table for either value of the newest bit
  int lw [NT][2];
  int li [NT][2];

  typedef struct {
    logic [MW-1:0] meta;
    int  idx [NT];
    int  out;
    bit  pred;
    bit  actual;
    bit  wrong_path;
    int  gen_state;          // program position after this branch (correct path)
    bit  gen_h1, gen_h2;     // random history of the program after this branch
    bit  hist_s [512];
    int  pth_s [16];
    int  pcl;
    int  nw [NT][2];         // weights read in this branch's cycle for the next one
    int  ni [NT][2];
    int  resolve_at;
  } rec_t;
  rec_t q [$];

  function automatic int pc_hash(logic [31:0] pc);
    return int'(pc[2 +: L]);
  endfunction

  // pc(b-k), k >= 1, seen from the cycle of b-1 whose address is cur
  function automatic int past(int k, int cur);
    return (k == 1) ? cur : pth[k-2];
  endfunction

  // Index of table t for branch b: cur = pc(b-1), h0 = direction of b-1,
  // history bits H[k] = hist[k-1] for k >= 1.
  function automatic int index_of(int t, int cur, bit h0);
    int mask, v, s;
    mask = NENT - 1;
    // with head-splitting the bias table has 2*BIAS_ROWS weights and the
    // three oldest tables NENT/2: index modulo the table size
    if (t == 0) return (((cur % BIAS_ROWS) << 1) | int'(h0)) % (2 * BIAS_ROWS);
    if (t <= NP) begin
      if (PATH_MODE == hp_pkg::PATH_PXP) return (past(2*t-1, cur) ^ (past(2*t, cur) << 1)) & mask;
      if (PATH_MODE == hp_pkg::PATH_AXPPP)
        return (cur ^ (past(3*t-1, cur) << 1) ^ (past(3*t, cur) << 2) ^ (past(3*t+1, cur) << 3)) & mask;
      return past(t, cur) & mask;
    end
    s = t - NP - 1;
    v = 0;
    for (int k = 0; k < L; k++) begin
      int hk;
      hk = s * L + k;
      if (hk == 0) v |= int'(h0);
      else         v |= int'(hist[hk-1]) << k;
    end
    if (HEAD_TAIL && s > 0 && t >= NT - 3) mask = NENT / 2 - 1;
    return (v ^ ((s == 0) ? (cur << 1) : cur)) & mask;
  endfunction

  function automatic int model_out(bit sel);
    int o;
    o = 0;
    for (int t = 0; t < NT; t++) begin
      int v;
      v = lw[t][sel];
      if (BOOST && (t == 0 || t == 1)) v = v * 2;
      o += v;
    end
    return o;
  endfunction

  // ----------------------------------------------------- program generator
  int  gpos;      // next static branch of the program, 0..5
  int  giter;
  bit  gh1, gh2;  // last two outcomes of the random branch
  bit  wrong;     // fetching down a wrong path

  function automatic logic [31:0] prog_pc(int p);
    return 32'h0000_1000 + 32'(p * 32'h44);
  endfunction

  // ------------------------------------------------------------- counters
  int n_pred, n_gap, n_recover, n_squash, n_train_wrong, n_train_low, n_sat;
  int n_sel0, n_sel1, n_correct, n_resolved, n_late_correct, n_late_total;
  int cyc, resolved_ok, n_b2b, n_after_rec, clr_cycles;
  bit prev_idle, prev_rec;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    n_pred = 0; n_gap = 0; n_recover = 0; n_squash = 0; n_train_wrong = 0;
    n_train_low = 0; n_sat = 0; n_sel0 = 0; n_sel1 = 0; n_correct = 0;
    n_resolved = 0; n_late_correct = 0; n_late_total = 0; resolved_ok = 0;
    cyc = 0; prev_idle = 0; prev_rec = 0; n_b2b = 0; n_after_rec = 0; clr_cycles = 0;
    gpos = 0; giter = 0; gh1 = 0; gh2 = 0; wrong = 0;
    foreach (wt[t, i]) wt[t][i] = 0;
    foreach (hist[i]) hist[i] = 0;
    foreach (pth[i]) pth[i] = 0;
    foreach (lw[t, s]) begin lw[t][s] = 0; li[t][s] = 0; end
    rst = 1; br_valid = 0; br_pc = '0; upd_valid = 0; upd_taken = 0; upd_meta = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // table clearing takes as many cycles as the largest table has rows
    for (int i = 0; i < NENT; i++) begin
      @(posedge clk);
      clr_cycles++;
      #1;
      if (ready) break;
    end
    check(ready == 1'b1, "ready after clearing");
    check(clr_cycles == BIAS_ROWS, $sformatf("clearing took %0d cycles", clr_cycles));
    check(cyc == 0, "no cycle counted before ready");

    while (resolved_ok < NBR) begin
      bit do_upd, do_br, mis, train, lowc, pr, act;
      int o, pcl;
      bit sel;
      rec_t r;
      logic [31:0] pc;
      cyc++;
      // ----- choose this cycle's activity
      do_upd = 0; do_br = 0;
      if (q.size() > 0 && q[0].resolve_at <= cyc) do_upd = 1;
      upd_valid = do_upd;
      if (do_upd) begin
        upd_taken = q[0].actual;
        upd_meta  = q[0].meta;
      end
      mis = do_upd && (q[0].pred != q[0].actual);
      if (!mis && q.size() < 24 && ($urandom_range(0, 9) < 8)) do_br = 1;
      br_valid = do_br;
      if (do_br) begin
        if (wrong) br_pc = 32'h0000_8000 + 32'($urandom_range(0, 255) * 4);
        else       br_pc = prog_pc(gpos);
      end
      #1;
      // ----- compare the update
      if (do_upd) begin
        lowc  = (q[0].out < 0 ? -q[0].out : q[0].out) <= TH;
        train = mis || lowc;
        check(upd_mispredict == mis, "mispredict flag");
        check(upd_train == train, "train flag");
        check(upd_low_conf == lowc, "low confidence flag");
      end
      // ----- compare the prediction
      sel = hist[0];
      if (do_br) begin
        o  = model_out(sel);
        pr = (o >= 0);
        check(pred_taken == pr, $sformatf("prediction pc=%h", br_pc));
        check(int'(pred_out) == o, $sformatf("output %0d vs model %0d", int'(pred_out), o));
        n_pred++;
        if (prev_idle) n_gap++;
        else n_b2b++;                 // predicted in the cycle after the previous one
        if (prev_rec) n_after_rec++;  // first branch right after a recovery
        if (sel) n_sel1++; else n_sel0++;
        // actual direction and program advance
        r.wrong_path = wrong;
        if (wrong) act = 1'($urandom_range(0, 1));
        else begin
          case (gpos)
            0: act = (giter % 8) != 7;
            1: act = 1;
            2: act = 1'($urandom_range(0, 1));
            3: act = gh1 ^ gh2;
            4: act = giter[0];
            default: act = 0;
          endcase
          if (gpos == 2) begin gh2 = gh1; gh1 = act; end
          if (gpos == 5) giter++;
          gpos = (gpos + 1) % 6;
        end
        r.meta = pred_meta; r.out = o; r.pred = pr; r.actual = act;
        r.gen_state = gpos; r.gen_h1 = gh1; r.gen_h2 = gh2;
        r.hist_s = hist; r.pth_s = pth;
        pcl = pc_hash(br_pc);
        r.pcl = pcl;
        for (int t = 0; t < NT; t++) r.idx[t] = li[t][sel];
        r.resolve_at = cyc + int'($urandom_range(1, 12));
        if (!wrong && pr != act) wrong = 1;
      end
      // ----- state change at the clock edge, in the RTL's order:
      //       reads of this cycle first, then training, then the latch
      if (do_br) begin
        for (int t = 0; t < NT; t++)
          for (int s = 0; s < 2; s++) begin
            r.ni[t][s] = index_of(t, pcl, s[0]);
            r.nw[t][s] = wt[t][r.ni[t][s]];
          end
      end
      if (do_upd) begin
        if (train) begin
          if (mis) n_train_wrong++; else n_train_low++;
          for (int t = 0; t < NT; t++) begin
            int ix;
            ix = q[0].idx[t];
            if (q[0].actual) begin
              if (wt[t][ix] == WMAX) n_sat++; else wt[t][ix]++;
            end else begin
              if (wt[t][ix] == WMIN) n_sat++; else wt[t][ix]--;
            end
          end
        end
        n_resolved++;
        if (!q[0].wrong_path) begin
          resolved_ok++;
          if (q[0].pred == q[0].actual) n_correct++;
          if (resolved_ok > NBR / 2) begin
            n_late_total++;
            if (q[0].pred == q[0].actual) n_late_correct++;
          end
        end
      end
      if (mis) begin
        rec_t m;
        m = q.pop_front();
        n_recover++;
        n_squash += q.size();
        q.delete();
        // restore history, shift in the actual direction and address
        hist = m.hist_s; pth = m.pth_s;
        for (int i = 511; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = m.actual;
        for (int i = 15; i > 0; i--) pth[i] = pth[i-1];
        pth[0] = m.pcl;
        lw = m.nw; li = m.ni;
        // the program generator did not move on the wrong path
        check(gpos == m.gen_state && gh1 == m.gen_h1 && gh2 == m.gen_h2, "program resumes");
        wrong = 0;
      end else begin
        if (do_upd) void'(q.pop_front());
        if (do_br) begin
          for (int i = 511; i > 0; i--) hist[i] = hist[i-1];
          hist[0] = r.pred;
          for (int i = 15; i > 0; i--) pth[i] = pth[i-1];
          pth[0] = r.pcl;
          lw = r.nw; li = r.ni;
          q.push_back(r);
        end
      end
      prev_idle = !do_br;
      prev_rec  = mis;
      @(posedge clk);
      #1;
    end
    br_valid = 0; upd_valid = 0;

    $display("predictions=%0d resolved=%0d correct-path accuracy=%0d/%0d (second half %0d/%0d)",
             n_pred, n_resolved, n_correct, resolved_ok, n_late_correct, n_late_total);
    $display("gaps=%0d recoveries=%0d squashed=%0d train_mispredict=%0d train_low_conf=%0d saturations=%0d sel0=%0d sel1=%0d",
             n_gap, n_recover, n_squash, n_train_wrong, n_train_low, n_sat, n_sel0, n_sel1);
    $display("back_to_back=%0d right_after_recovery=%0d clearing_cycles=%0d", n_b2b, n_after_rec, clr_cycles);
    check(n_gap > 0, "a branch after an idle cycle (latch hold)");
    check(n_b2b > 0, "predictions in consecutive cycles (one-cycle effective latency)");
    check(n_after_rec > 0, "a prediction in the cycle after a recovery");
    check(n_recover > 0, "a misprediction recovery");
    check(n_squash > 0, "a squashed wrong-path branch");
    check(n_train_wrong > 0, "training on a misprediction");
    check(n_train_low > 0, "training below the threshold");
    check(n_sel0 > 0 && n_sel1 > 0, "both ahead selections");
    if (REQUIRE_SAT) check(n_sat > 0, "a saturated weight");
    check(n_late_correct * 100 >= int'(MIN_ACC_PCT) * n_late_total, "accuracy once trained");
    done = 1;
  end
endmodule
