// End-to-end test of hp_predictor at three other sizes of the size sweep:
// 1 KB (8 tables of 128 weights, 4 path tables), 8 KB (8 tables of 1024
// weights, 2 path tables) and 128 KB (16 tables of 8192 weights, 1 path
// table), all with 8-bit weights. Each instance runs the synthetic program
// of hp_tb_core against the reference model and must reach 80% accuracy
// over the second half of its run. The three run side by side.
module tb_hp_predictor_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] done;
  int checks [3], failures [3];

  hp_tb_core #(.NT(8), .NP(4), .W(8), .L(7), .NBR(10000), .MIN_ACC_PCT(80))
    u_1k (.clk(clk), .done(done[0]), .checks(checks[0]), .failures(failures[0]));
  hp_tb_core #(.NT(8), .NP(2), .W(8), .L(10), .NBR(10000), .MIN_ACC_PCT(80))
    u_8k (.clk(clk), .done(done[1]), .checks(checks[1]), .failures(failures[1]));
  hp_tb_core #(.NT(16), .NP(1), .W(8), .L(13), .NBR(10000), .MIN_ACC_PCT(80))
    u_128k (.clk(clk), .done(done[2]), .checks(checks[2]), .failures(failures[2]));

  initial begin
    wait (done == 3'b111);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end
endmodule
