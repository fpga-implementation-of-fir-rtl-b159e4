// downsampler: keep every second sample of a stream (decimation by 2).
//
// A 1-bit counter toggles on every valid input sample; when it is 0 the
// output register loads the sample and out_valid pulses in the next clock.
// The kept samples are therefore inputs 0, 2, 4, ... after reset, which gives
// the even-indexed filter outputs of a wavelet analysis stage. The counter
// and register follow the source design's decimator; counting filter results
// rather than clocks is this implementation's choice.
//
// Interface: in_valid/in_data one-clock strobes; out_valid/out_data one
// clock after a kept input; out_data holds until the next kept sample.
// rst is synchronous and clears the counter, so the first sample is kept.
module downsampler #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  logic phase;  // the 1-bit counter

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && !phase;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) out_data <= in_data;
      end
    end
  end

endmodule
