// Speculative global and path history of the hashed perceptron.
//
// ghr holds the predicted directions of past branches (bit 0 the most
// recent); path holds the L-bit hashed addresses of past branches (entry 0
// the most recent). Both are updated speculatively: on push, the
// prediction and the address of the branch just predicted are shifted in.
// On restore, used when a branch turns out mispredicted, both registers
// are reloaded from the copy saved with that branch and the branch's
// actual direction and address are shifted in, so prediction continues on
// the correct path in the next cycle. Restore has priority over push.
// Both registers reset to zero. Register updates only, at the clock edge.
// The document uses speculative global history; the checkpoint-and-shift
// recovery and the reset value are this design's choices.
module hp_history #(
  parameter int unsigned L  = hp_pkg::DEF_L,
  parameter int unsigned GL = hp_pkg::ghr_len(hp_pkg::DEF_NT, hp_pkg::DEF_NP, hp_pkg::DEF_L),
  parameter int unsigned PD = hp_pkg::path_depth(hp_pkg::DEF_NP, hp_pkg::PATH_P)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic             push_dir,
  input  logic [L-1:0]     push_pc,
  input  logic             restore,
  input  logic [GL-1:0]    restore_ghr,
  input  logic [PD*L-1:0]  restore_path,
  input  logic             restore_dir,
  input  logic [L-1:0]     restore_pc,
  output logic [GL-1:0]    ghr,
  output logic [PD*L-1:0]  path
);
  // path register after shifting in one address
  logic [PD*L-1:0] path_push, path_restore;
  if (PD == 1) begin : g_path1
    assign path_push    = push_pc;
    assign path_restore = restore_pc;
  end else begin : g_pathn
    assign path_push    = {path[(PD-1)*L-1:0], push_pc};
    assign path_restore = {restore_path[(PD-1)*L-1:0], restore_pc};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ghr  <= '0;
      path <= '0;
    end else if (restore) begin
      ghr  <= {restore_ghr[GL-2:0], restore_dir};
      path <= path_restore;
    end else if (push) begin
      ghr  <= {ghr[GL-2:0], push_dir};
      path <= path_push;
    end
  end

endmodule
