// Test bench of hp_train_ctrl with the default 16 tables (H = 15, theta =
// floor(1.93*15 + 7.5) = 36, worked out by hand here). Every output value
// from -4096 to 4095 is tried with every prediction, outcome and valid.
module tb_hp_train_ctrl;
  localparam int OW = 13, THETA = 36;
  logic upd_valid, pred, taken, mispredict, low_conf, train_en, train_inc;
  logic signed [OW-1:0] out;

  hp_train_ctrl #(.H(15), .OW(OW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int o = -4096; o < 4096; o++)
      for (int c = 0; c < 8; c++) begin
        bit v, p, t, exp_mis, exp_low;
        {v, p, t} = 3'(c);
        upd_valid = v; pred = p; taken = t; out = OW'(o);
        #1;
        exp_mis = v && (p != t);
        exp_low = v && ((o < 0 ? -o : o) <= THETA);
        checks++;
        if (mispredict != exp_mis || low_conf != exp_low || train_en != (exp_mis || exp_low)
            || (train_en && train_inc != t)) begin
          failures++;
          if (failures < 10) $display("FAIL out=%0d v=%0d p=%0d t=%0d", o, v, p, t);
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
