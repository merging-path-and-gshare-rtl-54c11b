// One weight table of the hashed perceptron: 2**L signed W-bit weights.
//
// The table is organised as 2**(L-1) rows of two neighbouring weights
// (index LSB picks the weight within a row). The prediction port reads a
// whole row combinationally, so that an ahead-pipelined table can fetch
// both candidates one cycle before the direction bit that selects between
// them is known; a table that already knows its full index simply selects
// with the index LSB it computed.
//
// Training is a read-modify-write on a second read port: when upd_en is
// high the weight at upd_idx moves one step towards the outcome (+1 when
// upd_taken, -1 otherwise), saturating at the most positive and most
// negative W-bit values. The write takes effect at the clock edge, so a
// prediction read in the same cycle sees the old value.
//
// ROWS may be set below 2**(L-1) (any number, not only a power of two);
// the caller must then keep row indices below ROWS.
//
// After reset the table clears itself, one row per cycle (ROWS cycles);
// ready is low until then and training requests are ignored.
// The saturating counter and its width follow the document (8-bit
// signed weights); the row organisation, the reset sweep and the
// one-write-per-cycle port are choices of this design.
module hp_weight_table #(
  parameter int unsigned W = hp_pkg::DEF_W,
  parameter int unsigned L = hp_pkg::DEF_L,
  parameter int unsigned ROWS = 2 ** (L - 1)   // may be fewer than 2**(L-1)
) (
  input  logic             clk,
  input  logic             rst,
  output logic             ready,
  // prediction read port
  input  logic [L-2:0]     rd_row,
  output logic [2*W-1:0]   rd_pair,   // {weight[row,1], weight[row,0]}
  // training port
  input  logic             upd_en,
  input  logic [L-1:0]     upd_idx,
  input  logic             upd_taken
);
  localparam logic signed [W-1:0] WMAX = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] WMIN = {1'b1, {(W-1){1'b0}}};

  localparam int unsigned RB = (ROWS > 1) ? $clog2(ROWS) : 1;  // row bits in use

  logic [2*W-1:0] mem [ROWS];

  logic           clearing;
  logic [RB-1:0]  clr_row;
  logic [RB-1:0]  rd_r, upd_r;

  assign rd_r    = rd_row[RB-1:0];
  assign upd_r   = upd_idx[RB:1];
  assign ready   = !clearing;
  assign rd_pair = mem[rd_r];

  // Read-modify-write of one weight.
  logic [2*W-1:0]       upd_pair;
  logic signed [W-1:0]  upd_old, upd_new;
  logic [2*W-1:0]       upd_pair_new;

  always_comb begin
    upd_pair = mem[upd_r];
    upd_old  = upd_idx[0] ? upd_pair[2*W-1:W] : upd_pair[W-1:0];
    if (upd_taken) upd_new = (upd_old == WMAX) ? upd_old : upd_old + 1'b1;
    else           upd_new = (upd_old == WMIN) ? upd_old : upd_old - 1'b1;
    upd_pair_new = upd_idx[0] ? {upd_new, upd_pair[W-1:0]} : {upd_pair[2*W-1:W], upd_new};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      clearing <= 1'b1;
      clr_row  <= '0;
    end else if (clearing) begin
      clr_row <= clr_row + 1'b1;
      if (clr_row == RB'(ROWS - 1)) clearing <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst && clearing)   mem[clr_row] <= '0;
    else if (!rst && upd_en) mem[upd_r] <= upd_pair_new;
  end

endmodule
