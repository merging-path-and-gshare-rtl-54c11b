// Small end-to-end test bench of hp_predictor, two instances side by side.
// The first has 6 tables of 64 weights, two path tables with the {mi,PxP}
// hash, 2-bit weights so that saturation occurs, and weight boosting on.
// The second uses the settings of the trace-tuned variant that are built:
// 8 tables of 256 weights, one {mi,AxPxPxP} path table, 5-bit weights,
// weight boosting, and head-splitting/tail-sharing (bias table of 448
// weights, the three oldest tables of 128). Otherwise as the full-size bench: see hp_tb_core for
// the program, the reference model and the checks.
// Ends with one TB_RESULT line; a watchdog stops it after 400000 cycles.
module tb_hp_predictor;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] done;
  int   checks [2], failures [2];

  hp_tb_core #(.NT(6), .NP(2), .W(2), .L(6), .PATH_MODE(hp_pkg::PATH_PXP), .BOOST(1'b1),
               .REQUIRE_SAT(1'b1), .NBR(20000))
    u_pxp (.clk(clk), .done(done[0]), .checks(checks[0]), .failures(failures[0]));

  hp_tb_core #(.NT(8), .NP(1), .W(5), .L(8), .PATH_MODE(hp_pkg::PATH_AXPPP), .BOOST(1'b1),
               .HEAD_TAIL(1'b1), .NBR(20000), .MIN_ACC_PCT(80))
    u_axppp (.clk(clk), .done(done[1]), .checks(checks[1]), .failures(failures[1]));

  initial begin
    wait (done == 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
