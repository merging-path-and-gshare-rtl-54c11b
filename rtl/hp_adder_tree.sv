// Adder of the perceptron output: the sum of N signed W-bit weights.
//
// The hashed perceptron uses no input vector (every input is +1), so the
// dot product reduces to a plain sum of the selected weights; no
// multiplier is needed. The sum is built as a balanced binary tree of
// two-input adders, each level one bit wider than the one below, and is
// sign-extended to OW bits. Inputs whose bit is set in DOUBLE are shifted
// left by one before the sum (static weight boosting, off by default).
// Purely combinational.
module hp_adder_tree #(
  parameter int unsigned N  = 15,
  parameter int unsigned W  = hp_pkg::DEF_W,
  parameter int unsigned OW = hp_pkg::sum_width(hp_pkg::DEF_W, hp_pkg::DEF_NT),
  parameter logic [N-1:0] DOUBLE = '0
) (
  input  logic [N*W-1:0]      in,    // N weights, weight i at [i*W +: W]
  output logic signed [OW-1:0] sum
);
  localparam int unsigned LV = (N <= 1) ? 1 : $clog2(N);
  localparam int unsigned NP2 = 2 ** LV;

  // node[level][i]; level 0 holds the (possibly doubled) inputs
  logic signed [OW-1:0] node [LV+1][NP2];

  always_comb begin
    for (int unsigned i = 0; i < NP2; i++) begin
      if (i < N) begin
        node[0][i] = OW'(signed'(in[i*W +: W]));
        if (DOUBLE[i]) node[0][i] = node[0][i] <<< 1;
      end else begin
        node[0][i] = '0;
      end
    end
    for (int unsigned lv = 1; lv <= LV; lv++)
      for (int unsigned i = 0; i < NP2; i++)
        node[lv][i] = (i < (NP2 >> lv)) ? node[lv-1][2*i] + node[lv-1][2*i+1] : '0;
  end

  assign sum = (N <= 1) ? node[0][0] : node[LV][0];

endmodule
