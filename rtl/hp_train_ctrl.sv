// Training decision of the hashed perceptron.
//
// When a branch resolves, the perceptron is trained if its prediction was
// wrong or if the magnitude of its output was at most the threshold
// theta = floor(1.93*H + H/2), H being the number of non-bias tables. All
// weights used for the prediction then move one step towards the outcome
// (+1 for taken, -1 for not taken); with no input vector there is no
// per-weight sign. This module decides whether to train and reports why,
// so that the caller can count both causes; it also flags the mispredict,
// which triggers recovery of the speculative state. Combinational.
// The rule and the threshold formula are the document's.
module hp_train_ctrl #(
  parameter int unsigned H  = hp_pkg::DEF_NT - 1,
  parameter int unsigned OW = hp_pkg::sum_width(hp_pkg::DEF_W, hp_pkg::DEF_NT)
) (
  input  logic                 upd_valid,
  input  logic                 pred,       // prediction that was made
  input  logic                 taken,      // resolved direction
  input  logic signed [OW-1:0] out,        // perceptron output that was used
  output logic                 mispredict,
  output logic                 low_conf,   // |out| <= theta
  output logic                 train_en,
  output logic                 train_inc   // +1 (taken) or -1
);
  localparam int unsigned THETA = hp_pkg::theta(H);

  logic [OW-1:0] mag;

  always_comb begin
    mag        = out[OW-1] ? OW'(-out) : OW'(out);
    mispredict = upd_valid && (pred != taken);
    low_conf   = upd_valid && (mag <= OW'(THETA));
    train_en   = mispredict || low_conf;
    train_inc  = taken;
  end

endmodule
