// Test bench of hp_history with the default sizes (153 history bits, two
// 11-bit path entries). Random pushes, idle cycles and restores from saved
// copies are compared with a model that keeps the histories as arrays.
module tb_hp_history;
  localparam int L = 11, GL = 153, PD = 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, push, push_dir, restore, restore_dir;
  logic [L-1:0] push_pc, restore_pc;
  logic [GL-1:0] restore_ghr, ghr;
  logic [PD*L-1:0] restore_path, path;

  hp_history #(.L(L), .GL(GL), .PD(PD)) dut (.*);

  bit h [GL];
  int p [PD];
  int checks = 0, failures = 0, n_restore = 0, n_push = 0;
  logic [GL-1:0] saved_g;
  logic [PD*L-1:0] saved_p;

  task automatic compare();
    bit ok;
    ok = 1;
    for (int i = 0; i < GL; i++) if (ghr[i] != h[i]) ok = 0;
    for (int i = 0; i < PD; i++) if (int'(path[i*L +: L]) != p[i]) ok = 0;
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL at check %0d", checks); end
  endtask

  initial begin
    rst = 1; push = 0; push_dir = 0; push_pc = '0; restore = 0; restore_dir = 0;
    restore_pc = '0; restore_ghr = '0; restore_path = '0;
    foreach (h[i]) h[i] = 0;
    foreach (p[i]) p[i] = 0;
    saved_g = '0; saved_p = '0;
    @(posedge clk); #1 rst = 0;
    compare();
    for (int it = 0; it < 5000; it++) begin
      int a;
      a = int'($urandom_range(0, 9));
      push = (a < 6); push_dir = 1'($urandom_range(0, 1)); push_pc = L'($urandom);
      restore = (a == 9); restore_dir = 1'($urandom_range(0, 1)); restore_pc = L'($urandom);
      restore_ghr = saved_g; restore_path = saved_p;
      if (a == 8) begin saved_g = ghr; saved_p = path; end
      @(posedge clk); #1;
      if (restore) begin
        n_restore++;
        for (int i = GL - 1; i > 0; i--) h[i] = restore_ghr[i-1];
        h[0] = restore_dir;
        for (int i = PD - 1; i > 0; i--) p[i] = int'(restore_path[(i-1)*L +: L]);
        p[0] = int'(restore_pc);
      end else if (push) begin
        n_push++;
        for (int i = GL - 1; i > 0; i--) h[i] = h[i-1];
        h[0] = push_dir;
        for (int i = PD - 1; i > 0; i--) p[i] = p[i-1];
        p[0] = int'(push_pc);
      end
      compare();
    end
    checks++;
    if (n_restore == 0 || n_push == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
