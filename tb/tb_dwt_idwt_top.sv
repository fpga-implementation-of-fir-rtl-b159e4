// tb_dwt_idwt_top: end-to-end test of the level-1 2D forward and inverse
// wavelet transforms at default parameters.
//
// A synthetic 256 x 256 image (gradients, a bright square with sharp edges and
// noise, 8-bit signed) is streamed in raster order into the forward
// transform as fast as it accepts samples. Its LL and HH outputs are checked
// in order against a reference model. The LL samples are then fed, as they
// come out, into the inverse transform, whose two outputs are checked against
// a reference model too. Both transforms run concurrently.
//
// The test also counts how often each mechanism of the design occurred and
// fails if one never did: sign-bit subtraction (negative samples), output
// saturation, back-to-back filter frames, dropped odd outputs (decimation),
// inserted zeros (interpolation), clock-enable stalls of the half-rate row
// stage, and input back-pressure.
module tb_dwt_idwt_top;
  import dwt_ref_pkg::*;

  localparam int ROWS = 256, COLS = 256, N_PIX = ROWS * COLS;

  int checks = 0, failures = 0;

  logic              clk = 1'b0, rst = 1'b1;
  logic              dwt_x_valid = 1'b0, idwt_x_valid = 1'b0;
  logic signed [7:0] dwt_x = '0, idwt_x = '0;
  logic              dwt_x_ready, idwt_x_ready;
  logic              dwt_ll_valid, dwt_hh_valid, idwt_a_valid, idwt_b_valid;
  logic signed [7:0] dwt_ll, dwt_hh, idwt_a, idwt_b;

  always #5 clk = ~clk;

  dwt_idwt_top dut (.*);

  dec_model row_l = new(dwt_pkg::LP_ANALYSIS);
  dec_model col_l = new(dwt_pkg::LP_ANALYSIS);
  dec_model row_h = new(dwt_pkg::HP_ANALYSIS);
  dec_model col_h = new(dwt_pkg::HP_ANALYSIS);
  int_model row_a = new(dwt_pkg::LP_SYNTHESIS);
  int_model col_a = new(dwt_pkg::LP_SYNTHESIS);
  int_model row_b = new(dwt_pkg::HP_SYNTHESIS);
  int_model col_b = new(dwt_pkg::HP_SYNTHESIS);

  int exp_ll[$], exp_hh[$], exp_a[$], exp_b[$];
  int ll_fifo[$];  // LL samples waiting to enter the inverse transform
  int n_ll = 0, n_hh = 0, n_a = 0, n_b = 0, n_dwt_in = 0, n_idwt_in = 0;

  // Mechanism counters.
  int c_neg = 0, c_sat = 0, c_b2b = 0, c_drop = 0, c_zero = 0, c_stall = 0, c_hold = 0;

  function automatic int pixel(int r, int c);
    int v = (r * 3 + c * 2) % 160 - 80;
    if (r >= 80 && r < 160 && c >= 96 && c < 176) v = 120;
    v += int'($urandom_range(0, 6)) - 3;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  function automatic void chain(int_model r, int_model c, int v, ref int q[$]);
    int r0, r1, c0, c1;
    r.step(v, r0, r1);
    c.step(r0, c0, c1); q.push_back(c0); q.push_back(c1);
    c.step(r1, c0, c1); q.push_back(c0); q.push_back(c1);
  endfunction

  task automatic compare(string name, ref int q[$], input logic signed [7:0] got);
    checks++;
    if (q.size() == 0) begin
      failures++; $display("FAIL %s: unexpected output", name);
    end else begin
      automatic int e = q.pop_front();
      if (int'(got) != e) begin
        failures++; $display("FAIL %s: got %0d expected %0d", name, got, e);
      end
    end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (dwt_x_valid && dwt_x_ready) begin
        int r, c;
        if (row_l.step(int'(dwt_x), r)) if (col_l.step(r, c)) exp_ll.push_back(c);
        if (row_h.step(int'(dwt_x), r)) if (col_h.step(r, c)) exp_hh.push_back(c);
        n_dwt_in++;
      end
      if (idwt_x_valid && idwt_x_ready) begin
        chain(row_a, col_a, int'(idwt_x), exp_a);
        chain(row_b, col_b, int'(idwt_x), exp_b);
        void'(ll_fifo.pop_front());
        n_idwt_in++;
      end
      if (dwt_ll_valid) begin compare("LL", exp_ll, dwt_ll); ll_fifo.push_back(int'(dwt_ll)); n_ll++; end
      if (dwt_hh_valid) begin compare("HH", exp_hh, dwt_hh); n_hh++; end
      if (idwt_a_valid) begin compare("IDWT a", exp_a, idwt_a); n_a++; end
      if (idwt_b_valid) begin compare("IDWT b", exp_b, idwt_b); n_b++; end

      if (dut.u_dwt.u_row_lo.u_fir.load && dut.u_dwt.u_row_lo.u_fir.x[7]) c_neg++;
      if (dut.u_dwt.u_row_lo.u_fir.load && dut.u_dwt.u_row_lo.u_fir.last) c_b2b++;
      if (dut.u_dwt.u_row_hi.u_fir.y_valid &&
          dut.u_dwt.u_row_hi.u_fir.y_scaled != 19'(dut.u_dwt.u_row_hi.u_fir.y)) c_sat++;
      if (dut.u_dwt.u_row_lo.u_down.in_valid && dut.u_dwt.u_row_lo.u_down.phase) c_drop++;
      if (dut.u_idwt.u_row_a.u_up.f_valid && dut.u_idwt.u_row_a.u_up.cnt[3]) c_zero++;
      if (!dut.u_idwt.row_ce && dut.u_idwt.u_row_a.u_fir.busy) c_stall++;
      if (dwt_x_valid && !dwt_x_ready) c_hold++;
    end
  end

  // Forward transform source.
  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        bit ok;
        dwt_x_valid = 1'b1;
        dwt_x = 8'(pixel(r, c));
        do begin #1 ok = dwt_x_ready; @(negedge clk); end while (!ok);
      end
    dwt_x_valid = 1'b0;
  end

  // Inverse transform source: the LL samples in the order they came out.
  initial begin
    @(negedge clk);
    while (rst) @(negedge clk);
    forever begin
      if (ll_fifo.size() != 0) begin
        idwt_x_valid = 1'b1;
        idwt_x = 8'(ll_fifo[0]);
      end else begin
        idwt_x_valid = 1'b0;
      end
      @(negedge clk);
    end
  end

  initial begin
    wait (n_dwt_in == N_PIX && n_idwt_in == N_PIX / 4 && exp_a.size() == 0 && exp_b.size() == 0);
    repeat (100) @(negedge clk);
    checks++;
    if (n_ll != N_PIX / 4 || n_hh != N_PIX / 4 || n_a != N_PIX || n_b != N_PIX ||
        exp_ll.size() != 0 || exp_hh.size() != 0) begin
      failures++; $display("FAIL counts: ll=%0d hh=%0d a=%0d b=%0d", n_ll, n_hh, n_a, n_b);
    end
    $display("mechanisms: negative=%0d saturated=%0d back_to_back=%0d dropped=%0d zeros=%0d stalls=%0d held=%0d",
             c_neg, c_sat, c_b2b, c_drop, c_zero, c_stall, c_hold);
    checks += 7;
    if (c_neg == 0)   begin failures++; $display("FAIL no negative sample"); end
    if (c_sat == 0)   begin failures++; $display("FAIL no saturation"); end
    if (c_b2b == 0)   begin failures++; $display("FAIL no back-to-back frame"); end
    if (c_drop == 0)  begin failures++; $display("FAIL no decimation"); end
    if (c_zero == 0)  begin failures++; $display("FAIL no zero insertion"); end
    if (c_stall == 0) begin failures++; $display("FAIL no clock-enable stall"); end
    if (c_hold == 0)  begin failures++; $display("FAIL no back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_PIX * 8 + N_PIX * 8 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
