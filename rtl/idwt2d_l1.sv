// idwt2d_l1: one level of the 2D inverse wavelet transform, as two chains of
// interpolators.
//
// One input stream feeds two chains. In each, a row interpolator (zero
// insertion and an 8-tap DA filter) is followed by a column interpolator, so
// every input sample yields four outputs per chain. The upper chain uses the
// lowpass synthesis filter, the lower chain the highpass synthesis filter.
// The two chains and the row-then-column order follow the source design's
// block diagram; the filter assignment is this implementation's choice, and
// as in the forward transform there is no transposition memory.
//
// Rates: an interpolator turns one input into two outputs and its filter
// needs 8 clocks per output, so a column stage can take one input per 16
// clocks. The row stages therefore run on a clock enable that is high every
// second clock (half rate): they then produce one output per 16 clocks, which
// the column stages take back to back. Input rate: one sample per 32 clocks.
//
// Interface and timing: x is accepted when x_valid && x_ready. a_valid and
// b_valid pulse four times per accepted input. rst is synchronous.
module idwt2d_l1 #(
  parameter int unsigned DATA_W = dwt_pkg::SAMPLE_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     x_ready,
  output logic                     a_valid,
  output logic signed [DATA_W-1:0] a,
  output logic                     b_valid,
  output logic signed [DATA_W-1:0] b
);

  // Half-rate clock enable for the row stage.
  logic row_ce;

  always_ff @(posedge clk) begin
    if (rst) row_ce <= 1'b0;
    else     row_ce <= ~row_ce;
  end

  logic                     ra_valid, rb_valid, ra_ready, rb_ready;
  logic                     ca_ready, cb_ready;
  logic signed [DATA_W-1:0] ra, rb;

  assign x_ready = ra_ready && rb_ready;

  interpolator #(.DATA_W(DATA_W), .COEFS(dwt_pkg::LP_SYNTHESIS)) u_row_a (
    .clk, .rst, .ce(row_ce), .x_valid(x_valid && x_ready), .x, .x_ready(ra_ready),
    .y_valid(ra_valid), .y(ra)
  );

  interpolator #(.DATA_W(DATA_W), .COEFS(dwt_pkg::HP_SYNTHESIS)) u_row_b (
    .clk, .rst, .ce(row_ce), .x_valid(x_valid && x_ready), .x, .x_ready(rb_ready),
    .y_valid(rb_valid), .y(rb)
  );

  interpolator #(.DATA_W(DATA_W), .COEFS(dwt_pkg::LP_SYNTHESIS)) u_col_a (
    .clk, .rst, .ce(1'b1), .x_valid(ra_valid), .x(ra), .x_ready(ca_ready),
    .y_valid(a_valid), .y(a)
  );

  interpolator #(.DATA_W(DATA_W), .COEFS(dwt_pkg::HP_SYNTHESIS)) u_col_b (
    .clk, .rst, .ce(1'b1), .x_valid(rb_valid), .x(rb), .x_ready(cb_ready),
    .y_valid(b_valid), .y(b)
  );

  // The column stage must never miss a row result.
  a_col_a_ready : assert property (@(posedge clk) disable iff (rst) ra_valid |-> ca_ready);
  a_col_b_ready : assert property (@(posedge clk) disable iff (rst) rb_valid |-> cb_ready);

endmodule
