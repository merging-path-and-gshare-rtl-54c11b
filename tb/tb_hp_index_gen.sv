// Test bench of hp_index_gen. Four instances: the default 16 tables with
// one {mi,P} path table and 11-bit indices, 6 tables with two {mi,PxP}
// path tables and 6-bit indices, 6 tables with two {mi,AxPxPxP} path
// tables and 7-bit indices, and 8 tables with 8-bit indices and
// head-splitting/tail-sharing (bias row = address modulo 224, the three
// oldest tables with 64 rows). For random addresses and histories the
// expected index of every table is worked out from the mapping formulas,
// bit by bit, with the history written as H[k] (H[0] = newest direction).
module tb_hp_index_gen;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // --- instance A: defaults
  localparam int NTA = 16, NPA = 1, LA = 11, GLA = 153, PDA = 1;
  logic [LA-1:0] pc_a;
  logic [GLA-1:0] ghr_a;
  logic [PDA*LA-1:0] path_a;
  logic [NTA*(LA-1)-1:0] rows_a;
  logic [NTA-1:0] lsbs_a;
  hp_index_gen dut_a (.pc_l(pc_a), .ghr(ghr_a), .path(path_a), .rows(rows_a), .lsbs(lsbs_a));

  // --- instance B: PxP path hash
  localparam int NTB = 6, NPB = 2, LB = 6, GLB = 3 * 6 - 1, PDB = 4;
  logic [LB-1:0] pc_b;
  logic [GLB-1:0] ghr_b;
  logic [PDB*LB-1:0] path_b;
  logic [NTB*(LB-1)-1:0] rows_b;
  logic [NTB-1:0] lsbs_b;
  hp_index_gen #(.NT(NTB), .NP(NPB), .L(LB), .PATH_MODE(hp_pkg::PATH_PXP)) dut_b (
    .pc_l(pc_b), .ghr(ghr_b), .path(path_b), .rows(rows_b), .lsbs(lsbs_b));

  // --- instance C: AxPxPxP path hash
  localparam int NTC = 6, NPC = 2, LC = 7, GLC = 3 * 7 - 1, PDC = 6;
  logic [LC-1:0] pc_c;
  logic [GLC-1:0] ghr_c;
  logic [PDC*LC-1:0] path_c;
  logic [NTC*(LC-1)-1:0] rows_c;
  logic [NTC-1:0] lsbs_c;
  hp_index_gen #(.NT(NTC), .NP(NPC), .L(LC), .PATH_MODE(hp_pkg::PATH_AXPPP)) dut_c (
    .pc_l(pc_c), .ghr(ghr_c), .path(path_c), .rows(rows_c), .lsbs(lsbs_c));

  // --- instance D: head-splitting / tail-sharing
  localparam int NTD = 8, NPD = 1, LD = 8, GLD = 6 * 8 - 1, PDD = 1, IWD = LD + 1;
  logic [LD-1:0] pc_d;
  logic [GLD-1:0] ghr_d;
  logic [PDD*LD-1:0] path_d;
  logic [NTD*(IWD-1)-1:0] rows_d;
  logic [NTD-1:0] lsbs_d;
  hp_index_gen #(.NT(NTD), .NP(NPD), .L(LD), .HEAD_TAIL(1'b1)) dut_d (
    .pc_l(pc_d), .ghr(ghr_d), .path(path_d), .rows(rows_d), .lsbs(lsbs_d));

  // expected full index; H0 is taken as 0 (for ahead tables only the row is compared)
  // mode: 0 = P, 1 = PxP, 2 = AxPxPxP
  function automatic int expect_idx(int t, int np, int l, int mode, int cur,
                                    bit g [], int pa []);
    int mask, v, s;
    int pcs [10];
    mask = (1 << l) - 1;
    pcs[1] = cur;
    for (int k = 2; k < 10; k++) pcs[k] = (k - 2 < pa.size()) ? pa[k-2] : 0;
    if (t == 0) return (cur << 1) & mask;
    if (t <= np) begin
      if (mode == 1) return (pcs[2*t-1] ^ (pcs[2*t] << 1)) & mask;
      if (mode == 2) return (cur ^ (pcs[3*t-1] << 1) ^ (pcs[3*t] << 2) ^ (pcs[3*t+1] << 3)) & mask;
      return pcs[t] & mask;
    end
    s = t - np - 1;
    v = 0;
    for (int k = 0; k < l; k++) begin
      int hk;
      hk = s * l + k;
      if (hk > 0 && g[hk-1]) v |= 1 << k;
    end
    return (v ^ ((s == 0) ? (cur << 1) : cur)) & mask;
  endfunction

  initial begin
    for (int it = 0; it < 2000; it++) begin
      bit ga [], gb [], gc [];
      int pa [], pb [], pcc [];
      ga = new[GLA]; gb = new[GLB]; pa = new[PDA]; pb = new[PDB]; gc = new[GLC]; pcc = new[PDC];
      pc_c = LC'($urandom);
      for (int i = 0; i < GLC; i++) begin gc[i] = 1'($urandom); ghr_c[i] = gc[i]; end
      for (int i = 0; i < PDC; i++) begin pcc[i] = int'(LC'($urandom)); path_c[i*LC +: LC] = LC'(pcc[i]); end
      begin
        bit gd [];
        int pd [];
        gd = new[GLD]; pd = new[PDD];
        pc_d = LD'($urandom);
        for (int i = 0; i < GLD; i++) begin gd[i] = 1'($urandom); ghr_d[i] = gd[i]; end
        for (int i = 0; i < PDD; i++) begin pd[i] = int'(LD'($urandom)); path_d[i*LD +: LD] = LD'(pd[i]); end
        #1;
        check(int'(rows_d[0 +: (IWD-1)]) == int'(pc_d) % 224, "D bias row");
        for (int t = 1; t < NTD; t++) begin
          int e;
          e = expect_idx(t, NPD, LD, 0, int'(pc_d), gd, pd);
          if (t >= NTD - 3) e = e & 127;
          check(int'(rows_d[t*(IWD-1) +: (IWD-1)]) == (e >> 1), $sformatf("D row t=%0d", t));
          if (t != NPD + 1) check(lsbs_d[t] == e[0], $sformatf("D lsb t=%0d", t));
        end
      end
      pc_a = LA'($urandom); pc_b = LB'($urandom);
      for (int i = 0; i < GLA; i++) begin ga[i] = 1'($urandom); ghr_a[i] = ga[i]; end
      for (int i = 0; i < GLB; i++) begin gb[i] = 1'($urandom); ghr_b[i] = gb[i]; end
      for (int i = 0; i < PDA; i++) begin pa[i] = int'(LA'($urandom)); path_a[i*LA +: LA] = LA'(pa[i]); end
      for (int i = 0; i < PDB; i++) begin pb[i] = int'(LB'($urandom)); path_b[i*LB +: LB] = LB'(pb[i]); end
      #1;
      for (int t = 0; t < NTA; t++) begin
        int e;
        e = expect_idx(t, NPA, LA, 0, int'(pc_a), ga, pa);
        check(int'(rows_a[t*(LA-1) +: (LA-1)]) == (e >> 1), $sformatf("A row t=%0d", t));
        if (t != 0 && t != NPA + 1) check(lsbs_a[t] == e[0], $sformatf("A lsb t=%0d", t));
      end
      for (int t = 0; t < NTB; t++) begin
        int e;
        e = expect_idx(t, NPB, LB, 1, int'(pc_b), gb, pb);
        check(int'(rows_b[t*(LB-1) +: (LB-1)]) == (e >> 1), $sformatf("B row t=%0d", t));
        if (t != 0 && t != NPB + 1) check(lsbs_b[t] == e[0], $sformatf("B lsb t=%0d", t));
      end
      for (int t = 0; t < NTC; t++) begin
        int e;
        e = expect_idx(t, NPC, LC, 2, int'(pc_c), gc, pcc);
        check(int'(rows_c[t*(LC-1) +: (LC-1)]) == (e >> 1), $sformatf("C row t=%0d", t));
        if (t != 0 && t != NPC + 1) check(lsbs_c[t] == e[0], $sformatf("C lsb t=%0d", t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
