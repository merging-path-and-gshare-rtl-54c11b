// Test bench of hp_weight_table (W=8, L=5, sized down to 12 rows: 24
// weights, as a table cut by head-splitting/tail-sharing can be).
// Checks the clearing time after reset (ready after 12 cycles), that every
// row reads zero, random training against an integer model of saturating
// counters, saturation at +127 and -128, and that a read in the cycle of a
// write returns the old value.
module tb_hp_weight_table;
  localparam int W = 8, L = 5, ROWS = 12, N = 2 * ROWS;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, ready, upd_en, upd_taken;
  logic [L-2:0] rd_row;
  logic [2*W-1:0] rd_pair;
  logic [L-1:0] upd_idx;

  hp_weight_table #(.W(W), .L(L), .ROWS(ROWS)) dut (.*);

  int model [N];
  int checks = 0, failures = 0, nsat_hi = 0, nsat_lo = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic check_all();
    for (int r = 0; r < N / 2; r++) begin
      rd_row = (L-1)'(r);
      #1;
      check(int'(signed'(rd_pair[W-1:0])) == model[2*r], $sformatf("row %0d low", r));
      check(int'(signed'(rd_pair[2*W-1:W])) == model[2*r+1], $sformatf("row %0d high", r));
    end
  endtask

  task automatic train(int idx, bit tk);
    logic [2*W-1:0] old_pair;
    upd_en = 1; upd_idx = L'(idx); upd_taken = tk; rd_row = (L-1)'(idx >> 1);
    #1 old_pair = rd_pair;
    @(posedge clk); #1;
    upd_en = 0;
    // the read in the write cycle saw the old value
    check(int'(signed'((idx & 1) ? old_pair[2*W-1:W] : old_pair[W-1:0])) == model[idx], "old value during write");
    if (tk) begin if (model[idx] == 127) nsat_hi++; else model[idx]++; end
    else    begin if (model[idx] == -128) nsat_lo++; else model[idx]--; end
  endtask

  initial begin
    int cyc;
    rst = 1; upd_en = 0; upd_idx = '0; upd_taken = 0; rd_row = '0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    check(cyc == N / 2, $sformatf("clearing took %0d cycles", cyc));
    check_all();
    // training requests while clearing are ignored; none issued here
    for (int i = 0; i < 400; i++) train(int'($urandom_range(0, N - 1)), 1'($urandom_range(0, 1)));
    check_all();
    for (int i = 0; i < 140; i++) train(3, 1'b1);
    for (int i = 0; i < 300; i++) train(8, 1'b0);
    check_all();
    check(model[3] == 127 && model[8] == -128, "model saturated");
    check(nsat_hi > 0 && nsat_lo > 0, "both saturation limits reached");
    for (int i = 0; i < 3; i++) train(3, 1'b0);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
