// fir_da8: 8-tap FIR filter in bit-serial distributed arithmetic (DA).
//
// Computes y(n) = sum_{k=0..7} c_k * x(n-k) without a multiplier. With
// two's-complement samples x = -x[B-1]*2^(B-1) + sum_j x[j]*2^j the sum can be
// reordered by bit position:
//   y = -2^(B-1) * P(B-1) + sum_{j<B-1} 2^j * P(j),
//   P(j) = sum_k c_k * x(n-k)[j]   (a sum of coefficients, read from a table)
// Hardware, as in the source design:
//   * parallel-to-serial register: takes an 8-bit sample and shifts it out
//     one bit per clock, MSB (sign bit) first;
//   * bit-serial shift-register cascade of 7 x 8 bits holding the bits of the
//     seven previous samples; the bit leaving the serialiser and the bit 8k-1
//     places down the cascade are bit j of x(n) and of x(n-k);
//   * two 16-word partial LUTs (taps 0-3 and 4-7) whose outputs are added by
//     a ripple-carry adder to give P(j);
//   * scaling accumulator: acc = -P on the sign bit, then acc = 2*acc + P
//     for each following bit.
// The MSB-first order and the accumulator form are this implementation's
// reading of the DA equation; the output requantisation is its own choice.
//
// Interface and timing (all on clk, everything advances only when ce = 1):
//   x is accepted when x_valid && x_ready. A frame of DATA_W enabled clocks
//   follows; x_ready is high when idle or in the frame's last bit clock, so
//   samples may follow back to back, one per DATA_W enabled clocks.
//   y_valid pulses for one clock (with ce high) DATA_W+1 enabled clocks after
//   acceptance (back to back: one result every DATA_W enabled clocks).
//   y_full is the exact inner product; y is y_full >>> COEF_FRAC saturated to
//   DATA_W bits (used to chain stages through DATA_W-bit registers).
//   Both hold their value until the next result. rst is synchronous.
module fir_da8 #(
  parameter int unsigned DATA_W    = dwt_pkg::SAMPLE_W,
  parameter int unsigned COEF_FRAC = dwt_pkg::COEF_FRAC,
  parameter dwt_pkg::coefs_t COEFS     = dwt_pkg::LP_ANALYSIS,
  localparam int unsigned LUT_W    = dwt_pkg::COEF_W + $clog2(dwt_pkg::LUT_IN),
  localparam int unsigned SUM_W    = LUT_W + 1,
  localparam int unsigned ACC_W    = SUM_W + DATA_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce,
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     x_ready,
  output logic                     y_valid,
  output logic signed [ACC_W-1:0]  y_full,
  output logic signed [DATA_W-1:0] y
);

  localparam int unsigned N_TAPS = dwt_pkg::N_TAPS;
  localparam int unsigned LUT_IN = dwt_pkg::LUT_IN;
  localparam int unsigned COEF_W = dwt_pkg::COEF_W;
  localparam int unsigned CNT_W  = $clog2(DATA_W);
  localparam int unsigned CASC_W = (N_TAPS - 1) * DATA_W;

  logic              busy;
  logic [CNT_W-1:0]  bitcnt;
  logic [DATA_W-1:0] p2s;
  logic [CASC_W-1:0] casc;
  logic              last, load, sbit;
  logic [N_TAPS-1:0] addr;

  assign last    = busy && (bitcnt == CNT_W'(DATA_W - 1));
  assign x_ready = ce && (!busy || last);
  assign load    = x_valid && x_ready;
  assign sbit    = p2s[DATA_W-1];

  // Address bit k: bit of x(n-k) at the current bit position.
  always_comb begin
    addr[0] = sbit;
    for (int unsigned k = 1; k < N_TAPS; k++)
      addr[k] = casc[k*DATA_W-1];
  end

  // Partitioned LUT: taps 0-3 and taps 4-7, added by the ripple-carry adder.
  logic signed [LUT_W-1:0] p_lo, p_hi;
  logic        [SUM_W-1:0] psum;
  logic                    cout_unused;  // carry of a sign-extended add: not needed

  da_lut #(
    .ADDR_W(LUT_IN), .COEF_W(COEF_W), .LUT_W(LUT_W),
    .COEFS (COEFS[LUT_IN-1:0])
  ) u_lut_1 (
    .addr(addr[LUT_IN-1:0]), .p(p_lo)
  );

  da_lut #(
    .ADDR_W(LUT_IN), .COEF_W(COEF_W), .LUT_W(LUT_W),
    .COEFS (COEFS[N_TAPS-1:LUT_IN])
  ) u_lut_2 (
    .addr(addr[N_TAPS-1:LUT_IN]), .p(p_hi)
  );

  rca #(.W(SUM_W)) u_rca (
    .a   (SUM_W'(p_lo)),
    .b   (SUM_W'(p_hi)),
    .cin (1'b0),
    .s   (psum),
    .cout(cout_unused)
  );

  // Scaling accumulator.
  logic signed [ACC_W-1:0] acc, acc_next, pext;

  assign pext     = ACC_W'($signed(psum));
  assign acc_next = (bitcnt == '0) ? -pext : (acc <<< 1) + pext;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      bitcnt <= '0;
      p2s    <= '0;
      casc   <= '0;
      acc    <= '0;
    end else if (ce) begin
      if (busy) begin
        casc <= {casc[CASC_W-2:0], sbit};
        acc  <= acc_next;
      end
      if (load) begin
        p2s    <= x;
        busy   <= 1'b1;
        bitcnt <= '0;
      end else if (busy) begin
        p2s    <= p2s << 1;
        bitcnt <= bitcnt + 1'b1;
        if (last) busy <= 1'b0;
      end
    end
  end

  // Result register and strobe.
  logic yv_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      yv_q   <= 1'b0;
      y_full <= '0;
    end else if (ce) begin
      yv_q <= last;
      if (last) y_full <= acc_next;
    end
  end

  assign y_valid = yv_q && ce;

  // Requantise to DATA_W bits: drop the coefficient scale, then saturate.
  localparam logic signed [ACC_W-1:0] Y_MAX = ACC_W'((2 ** (DATA_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] Y_MIN = -ACC_W'(2 ** (DATA_W - 1));

  logic signed [ACC_W-1:0] y_scaled;

  assign y_scaled = y_full >>> COEF_FRAC;

  always_comb begin
    if (y_scaled > Y_MAX)      y = Y_MAX[DATA_W-1:0];
    else if (y_scaled < Y_MIN) y = Y_MIN[DATA_W-1:0];
    else                       y = y_scaled[DATA_W-1:0];
  end

endmodule
