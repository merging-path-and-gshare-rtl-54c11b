// Full-size end-to-end test bench of hp_predictor: the predictor has all
// its default parameters (16 tables of 2048 8-bit weights, one path table).
// It clears the tables and runs the synthetic program of hp_tb_core for
// 30000 correct-path branches against the reference model, and requires
// 85% accuracy over the second half.
// Ends with one TB_RESULT line; a watchdog stops it after 600000 cycles.
module tb_hp_predictor_full;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done;
  int   checks, failures;

  hp_tb_core #(.FULL_DEFAULTS(1'b1), .NBR(30000), .MIN_ACC_PCT(85))
    u_core (.clk(clk), .done(done), .checks(checks), .failures(failures));

  initial begin
    @(posedge done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
