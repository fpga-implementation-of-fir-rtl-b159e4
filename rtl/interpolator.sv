// interpolator: one wavelet synthesis stage, zero insertion followed by a DA
// FIR filter.
//
// The upsampler (4-bit counter and clearable 8-bit load register) presents
// each input sample to the 8-tap bit-serial DA filter and then a zero, one
// 8-clock DA frame apart, so the filter sees x(0), 0, x(1), 0, ... and
// produces two outputs per input:
//   y(n) = sat((sum_k c_k u(n-k)) >>> COEF_FRAC), u(2m) = x(m), u(2m+1) = 0.
// The structure follows the source design; the clock enable, which lets a
// stage run at a fraction of the clock rate, is this implementation's own.
//
// Interface and timing (everything advances only when ce = 1): x is accepted
// when x_valid && x_ready, one sample per 16 enabled clocks. y_valid pulses
// for one clock 11 and 19 enabled clocks after acceptance.
// rst is synchronous.
module interpolator #(
  parameter int unsigned     DATA_W = dwt_pkg::SAMPLE_W,
  parameter dwt_pkg::coefs_t COEFS  = dwt_pkg::LP_SYNTHESIS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce,
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     x_ready,
  output logic                     y_valid,
  output logic signed [DATA_W-1:0] y
);

  logic              u_valid, f_ready;
  logic [DATA_W-1:0] u_data;

  upsampler #(.W(DATA_W), .CNT_W(4)) u_up (
    .clk, .rst, .ce,
    .x_valid, .x(x), .x_ready,
    .f_valid(u_valid), .f_data(u_data)
  );

  fir_da8 #(.DATA_W(DATA_W), .COEFS(COEFS)) u_fir (
    .clk, .rst, .ce,
    .x_valid(u_valid), .x(u_data), .x_ready(f_ready),
    .y_valid, .y_full(), .y
  );

  // The upsampler's two hand-overs are one filter frame apart, so the filter
  // is always ready for them.
  a_fir_ready : assert property (@(posedge clk) disable iff (rst) u_valid |-> f_ready);

endmodule
