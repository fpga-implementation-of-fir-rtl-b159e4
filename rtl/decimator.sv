// decimator: one wavelet analysis stage, a DA FIR filter followed by
// decimation by 2.
//
// Samples enter the 8-tap bit-serial DA filter (fir_da8); each filter result,
// requantised to 8 bits, goes to a downsampler whose 1-bit counter and
// register keep every second result. The result is
//   y(m) = sat((sum_k c_k x(2m-k)) >>> COEF_FRAC),
// the analysis equation of the discrete wavelet transform. The structure
// (filter, 1-bit counter, register) follows the source design.
//
// Interface and timing: x is accepted when x_valid && x_ready, at most one
// sample per 8 clocks. y_valid pulses one clock after every second filter
// result, i.e. DATA_W+2 clocks after an even-indexed sample was accepted.
// rst is synchronous.
module decimator #(
  parameter int unsigned     DATA_W = dwt_pkg::SAMPLE_W,
  parameter dwt_pkg::coefs_t COEFS  = dwt_pkg::LP_ANALYSIS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     x_ready,
  output logic                     y_valid,
  output logic signed [DATA_W-1:0] y
);

  logic              f_valid;
  logic [DATA_W-1:0] f_y;

  fir_da8 #(.DATA_W(DATA_W), .COEFS(COEFS)) u_fir (
    .clk, .rst, .ce(1'b1),
    .x_valid, .x, .x_ready,
    .y_valid(f_valid), .y_full(), .y(f_y)
  );

  downsampler #(.W(DATA_W)) u_down (
    .clk, .rst,
    .in_valid(f_valid), .in_data(f_y),
    .out_valid(y_valid), .out_data(y)
  );

endmodule
