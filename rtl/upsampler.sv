// upsampler: zero insertion (interpolation by 2) in front of the DA filter.
//
// An accepted sample is loaded into a W-bit load register and a 4-bit
// counter starts. While the counter's MSB is 0 (counts 0-7) the register
// holds the sample; when the MSB becomes 1 (counts 8-15) it clears the
// register, so zero is presented. The filter is handed the register contents
// twice, at counts 1 and 9: the sample, then the inserted zero, one DA frame
// (8 clocks) apart. The 4-bit counter, the 8-bit register and the MSB-driven
// clear follow the source design; starting the counter on an accepted sample
// (rather than letting it run freely) and a synchronous clear are this
// implementation's choices.
//
// Interface and timing (everything advances only when ce = 1):
//   x is accepted when x_valid && x_ready; x_ready is high when idle or at
//   count 15, so one sample per 16 enabled clocks can be taken.
//   f_valid pulses at counts 1 and 9 with f_data = sample, then 0.
module upsampler #(
  parameter int unsigned W     = 8,
  parameter int unsigned CNT_W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic         x_valid,
  input  logic [W-1:0] x,
  output logic         x_ready,
  output logic         f_valid,
  output logic [W-1:0] f_data
);

  localparam logic [CNT_W-1:0] CNT_LAST = '1;
  localparam logic [CNT_W-2:0] TAKE     = (CNT_W-1)'(1);

  logic             busy;
  logic [CNT_W-1:0] cnt;
  logic [W-1:0]     q;
  logic             load;

  assign x_ready = ce && (!busy || cnt == CNT_LAST);
  assign load    = x_valid && x_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cnt  <= '0;
      q    <= '0;
    end else if (ce) begin
      if (load) begin
        busy <= 1'b1;
        cnt  <= '0;
        q    <= x;
      end else begin
        if (busy) begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_LAST) busy <= 1'b0;
        end
        if (cnt[CNT_W-1]) q <= '0;  // active-high clear from the counter MSB
      end
    end
  end

  assign f_valid = ce && busy && (cnt[CNT_W-2:0] == TAKE);
  assign f_data  = q;

endmodule
