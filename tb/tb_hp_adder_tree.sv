// Test bench of hp_adder_tree: 14 and 15 inputs of 8 bits (odd and even
// counts), without and with doubled inputs, random and extreme weights,
// compared with an integer sum.
module tb_hp_adder_tree;
  localparam int W = 8, OW = 13;
  logic [15*W-1:0] in15;
  logic [14*W-1:0] in14;
  logic signed [OW-1:0] s15, s14d;

  hp_adder_tree #(.N(15), .W(W), .OW(OW)) dut15 (.in(in15), .sum(s15));
  hp_adder_tree #(.N(14), .W(W), .OW(OW), .DOUBLE(14'b00_0000_0000_0101)) dut14 (.in(in14), .sum(s14d));

  int checks = 0, failures = 0;

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int e15, e14;
      e15 = 0; e14 = 0;
      for (int i = 0; i < 15; i++) begin
        int v;
        case (it)
          0: v = 127;
          1: v = -128;
          default: v = int'($urandom_range(0, 255)) - 128;
        endcase
        in15[i*W +: W] = W'(v);
        e15 += v;
        if (i < 14) begin
          in14[i*W +: W] = W'(v);
          e14 += (i == 0 || i == 2) ? 2 * v : v;
        end
      end
      #1;
      checks += 2;
      if (int'(s15) != e15) begin failures++; $display("FAIL 15: %0d vs %0d", s15, e15); end
      if (int'(s14d) != e14) begin failures++; $display("FAIL 14: %0d vs %0d", s14d, e14); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
