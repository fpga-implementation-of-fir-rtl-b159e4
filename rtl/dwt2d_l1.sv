// dwt2d_l1: one level of the 2D forward wavelet transform, as two chains of
// decimators.
//
// The input stream is filtered and decimated by a row stage and the row
// stage's output is filtered and decimated again by a column stage. The upper
// chain uses the lowpass analysis filter in both stages (approximation, LL),
// the lower chain the highpass filter in both stages (detail, HH). The two
// chains and their row-then-column order follow the source design; which
// filter sits in which chain is this implementation's choice. There is no
// row/column transposition memory: the column stage filters the row stage's
// output stream in the order it arrives, so for an image the caller must
// deliver the samples in the order it wants each stage to filter them.
//
// Interface and timing: x is accepted when x_valid && x_ready (at most one
// sample per 8 clocks). Each output strobes once per four accepted inputs;
// the column stage sees one row result per 16 clocks at most and is always
// ready for it. rst is synchronous.
module dwt2d_l1 #(
  parameter int unsigned DATA_W = dwt_pkg::SAMPLE_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     x_ready,
  output logic                     ll_valid,
  output logic signed [DATA_W-1:0] ll,
  output logic                     hh_valid,
  output logic signed [DATA_W-1:0] hh
);

  logic                     rl_valid, rh_valid, rl_ready, rh_ready;
  logic                     cl_ready, ch_ready;
  logic signed [DATA_W-1:0] rl, rh;

  // Both row filters take each sample together.
  assign x_ready = rl_ready && rh_ready;

  decimator #(.DATA_W(DATA_W), .COEFS(dwt_pkg::LP_ANALYSIS)) u_row_lo (
    .clk, .rst, .x_valid(x_valid && x_ready), .x, .x_ready(rl_ready),
    .y_valid(rl_valid), .y(rl)
  );

  decimator #(.DATA_W(DATA_W), .COEFS(dwt_pkg::HP_ANALYSIS)) u_row_hi (
    .clk, .rst, .x_valid(x_valid && x_ready), .x, .x_ready(rh_ready),
    .y_valid(rh_valid), .y(rh)
  );

  decimator #(.DATA_W(DATA_W), .COEFS(dwt_pkg::LP_ANALYSIS)) u_col_lo (
    .clk, .rst, .x_valid(rl_valid), .x(rl), .x_ready(cl_ready),
    .y_valid(ll_valid), .y(ll)
  );

  decimator #(.DATA_W(DATA_W), .COEFS(dwt_pkg::HP_ANALYSIS)) u_col_hi (
    .clk, .rst, .x_valid(rh_valid), .x(rh), .x_ready(ch_ready),
    .y_valid(hh_valid), .y(hh)
  );

  // A row result arrives at most every 16 clocks; the column filter frees up
  // every 8, so no row result is ever dropped.
  a_col_lo_ready : assert property (@(posedge clk) disable iff (rst) rl_valid |-> cl_ready);
  a_col_hi_ready : assert property (@(posedge clk) disable iff (rst) rh_valid |-> ch_ready);

endmodule
