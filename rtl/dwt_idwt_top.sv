// dwt_idwt_top: level-1 2D forward and inverse discrete wavelet transforms
// built from 8-tap distributed-arithmetic FIR filters.
//
// The forward transform (dwt2d_l1) and the inverse transform (idwt2d_l1)
// stand side by side, each with its own stream ports; nothing between them
// (such as coefficient thresholding) is part of this design, so the caller
// connects or processes the subbands as it needs.
//
// Interface: all streams are 8-bit two's complement with a valid strobe; an
// input is taken when its *_valid and *_ready are both high.
//   forward:  one input per 8 clocks at most, ll/hh one output per 4 inputs
//   inverse:  one input per 32 clocks at most, a/b four outputs per input
// Single clock, synchronous active-high reset.
module dwt_idwt_top #(
  parameter int unsigned DATA_W = dwt_pkg::SAMPLE_W
) (
  input  logic                     clk,
  input  logic                     rst,
  // forward 2D DWT
  input  logic                     dwt_x_valid,
  input  logic signed [DATA_W-1:0] dwt_x,
  output logic                     dwt_x_ready,
  output logic                     dwt_ll_valid,
  output logic signed [DATA_W-1:0] dwt_ll,
  output logic                     dwt_hh_valid,
  output logic signed [DATA_W-1:0] dwt_hh,
  // inverse 2D DWT
  input  logic                     idwt_x_valid,
  input  logic signed [DATA_W-1:0] idwt_x,
  output logic                     idwt_x_ready,
  output logic                     idwt_a_valid,
  output logic signed [DATA_W-1:0] idwt_a,
  output logic                     idwt_b_valid,
  output logic signed [DATA_W-1:0] idwt_b
);

  dwt2d_l1 #(.DATA_W(DATA_W)) u_dwt (
    .clk, .rst,
    .x_valid (dwt_x_valid),  .x (dwt_x),  .x_ready (dwt_x_ready),
    .ll_valid(dwt_ll_valid), .ll(dwt_ll),
    .hh_valid(dwt_hh_valid), .hh(dwt_hh)
  );

  idwt2d_l1 #(.DATA_W(DATA_W)) u_idwt (
    .clk, .rst,
    .x_valid(idwt_x_valid), .x(idwt_x), .x_ready(idwt_x_ready),
    .a_valid(idwt_a_valid), .a(idwt_a),
    .b_valid(idwt_b_valid), .b(idwt_b)
  );

endmodule
