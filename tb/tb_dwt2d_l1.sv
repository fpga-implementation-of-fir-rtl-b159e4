// tb_dwt2d_l1: forward 2D stage. A stream of samples (a slow ramp with noise,
// then random values) is offered back to back; the LL and HH outputs are
// compared in order with a reference model of two chained analysis stages
// (lowpass/lowpass and highpass/highpass). Also checks that the input takes
// one sample per 8 clocks and that every output appears once per 4 inputs.
module tb_dwt2d_l1;
  import dwt_ref_pkg::*;

  int checks = 0, failures = 0;

  logic              clk = 1'b0, rst = 1'b1, x_valid = 1'b0;
  logic signed [7:0] x = '0;
  logic              x_ready, ll_valid, hh_valid;
  logic signed [7:0] ll, hh;

  always #5 clk = ~clk;

  dwt2d_l1 dut (.clk, .rst, .x_valid, .x, .x_ready, .ll_valid, .ll, .hh_valid, .hh);

  dec_model row_l = new(dwt_pkg::LP_ANALYSIS);
  dec_model col_l = new(dwt_pkg::LP_ANALYSIS);
  dec_model row_h = new(dwt_pkg::HP_ANALYSIS);
  dec_model col_h = new(dwt_pkg::HP_ANALYSIS);

  int exp_ll[$], exp_hh[$];
  int cyc = 0, n_in = 0, n_ll = 0, n_hh = 0, last_acc = -1;
  bit full_rate = 1;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (x_valid && x_ready) begin
        int r, c;
        if (row_l.step(int'(x), r)) if (col_l.step(r, c)) exp_ll.push_back(c);
        if (row_h.step(int'(x), r)) if (col_h.step(r, c)) exp_hh.push_back(c);
        if (full_rate && last_acc >= 0) begin
          checks++;
          if (cyc - last_acc != 8) begin failures++; $display("FAIL spacing %0d", cyc - last_acc); end
        end
        last_acc = cyc;
        n_in++;
      end
      if (ll_valid) begin
        checks++; n_ll++;
        if (exp_ll.size() == 0) begin failures++; $display("FAIL extra LL"); end
        else begin
          automatic int e = exp_ll.pop_front();
          if (int'(ll) != e) begin failures++; $display("FAIL LL %0d exp %0d", ll, e); end
        end
      end
      if (hh_valid) begin
        checks++; n_hh++;
        if (exp_hh.size() == 0) begin failures++; $display("FAIL extra HH"); end
        else begin
          automatic int e = exp_hh.pop_front();
          if (int'(hh) != e) begin failures++; $display("FAIL HH %0d exp %0d", hh, e); end
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    x_valid = 1'b1;
    for (int i = 0; i < 400; i++) begin
      bit ok;
      x = (i < 200) ? 8'((i % 100) - 50 + $urandom_range(0, 8)) : 8'($urandom);
      do begin #1 ok = x_ready; @(negedge clk); end while (!ok);
    end
    full_rate = 0;
    for (int i = 0; i < 600; i++) begin
      x_valid = 1'($urandom_range(0, 3) == 0);
      x = 8'($urandom);
      @(negedge clk);
    end
    x_valid = 1'b0;
    repeat (60) @(negedge clk);
    checks++;
    if (exp_ll.size() != 0 || exp_hh.size() != 0 || n_ll != (n_in + 3) / 4 || n_hh != n_ll) begin
      failures++; $display("FAIL in=%0d ll=%0d hh=%0d", n_in, n_ll, n_hh);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
