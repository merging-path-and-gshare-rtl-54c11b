// Ahead pipeline latch and final adder of the hashed perceptron.
//
// The weight tables are read in the cycle of branch b-1 for branch b. At
// the clock edge this stage latches, for branch b: the partial sum of all
// weights whose index was fully known (psum), the two candidate weights of
// each of the two ahead-pipelined tables (bias table and the global table
// with the newest history), and every table's index. In the cycle of
// branch b the direction predicted for b-1 (sel) picks one candidate of
// each pair and one adder adds them to the partial sum: out is the
// perceptron output and its sign the prediction, so a branch is predicted
// in the cycle it is presented (one cycle effective latency).
//
// When no branch is presented (advance low) the latch keeps its contents
// for the next branch, which is what the shadow latch of the document
// achieves. On recover (a mispredicted branch resolved) the latch is
// loaded from that branch's checkpoint: the partial sum it saved and the
// weights it did not select, which are the ones the correct direction
// needs; the row indices are recomputed by the caller. With BOOST the
// bias weight is doubled (and, when there is no path table, the newest
// global weight). Recover has priority over advance; reset clears all.
// Decoupling table read and adder, the pair read and the checkpoint of
// the unselected weights follow the document; the latch contents and the
// encoding are this design's.
module hp_ahead_stage #(
  parameter int unsigned NT = hp_pkg::DEF_NT,
  parameter int unsigned NP = hp_pkg::DEF_NP,
  parameter int unsigned W  = hp_pkg::DEF_W,
  parameter int unsigned L  = hp_pkg::DEF_L,
  parameter bit          BOOST = 1'b0,
  localparam int unsigned SW = hp_pkg::sum_width(W, NT)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   sel,        // predicted direction of the previous branch
  // normal load, for the next branch
  input  logic                   advance,
  input  logic signed [SW-1:0]   ld_psum,
  input  logic [2*W-1:0]         ld_pair_bias,
  input  logic [2*W-1:0]         ld_pair_recent,
  input  logic [NT*(L-1)-1:0]    ld_rows,
  input  logic [NT-1:0]          ld_lsbs,
  // load from a checkpoint after a misprediction
  input  logic                   recover,
  input  logic signed [SW-1:0]   rec_psum,
  input  logic [W-1:0]           rec_w_bias,
  input  logic [W-1:0]           rec_w_recent,
  // outputs for the branch presented in this cycle
  output logic signed [SW-1:0]   out,
  output logic [NT*L-1:0]        idx
);

  logic signed [SW-1:0] psum_q;
  logic [2*W-1:0]       pb_q, pr_q;
  logic [NT*(L-1)-1:0]  rows_q;
  logic [NT-1:0]        lsbs_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      psum_q <= '0;
      pb_q   <= '0;
      pr_q   <= '0;
      rows_q <= '0;
      lsbs_q <= '0;
    end else if (recover) begin
      psum_q <= rec_psum;
      pb_q   <= {rec_w_bias, rec_w_bias};
      pr_q   <= {rec_w_recent, rec_w_recent};
      rows_q <= ld_rows;
      lsbs_q <= ld_lsbs;
    end else if (advance) begin
      psum_q <= ld_psum;
      pb_q   <= ld_pair_bias;
      pr_q   <= ld_pair_recent;
      rows_q <= ld_rows;
      lsbs_q <= ld_lsbs;
    end
  end

  logic signed [SW-1:0] wb, wr;

  always_comb begin
    wb = SW'(signed'(sel ? pb_q[2*W-1:W] : pb_q[W-1:0]));
    wr = SW'(signed'(sel ? pr_q[2*W-1:W] : pr_q[W-1:0]));
    if (BOOST) begin
      wb = wb <<< 1;
      if (NP == 0) wr = wr <<< 1;
    end
    out = psum_q + wb + wr;
    for (int unsigned t = 0; t < NT; t++)
      idx[t*L +: L] = {rows_q[t*(L-1) +: (L-1)], hp_pkg::is_ahead(t, NP) ? sel : lsbs_q[t]};
  end

endmodule
