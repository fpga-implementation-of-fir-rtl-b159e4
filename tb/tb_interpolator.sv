// tb_interpolator: lowpass and highpass synthesis stages (zero insertion and
// filter) fed with the same samples, at full rate back to back and then with
// a random clock enable. Outputs are compared with the reference model
// (filter of x0, 0, x1, 0, ... requantised to 8 bits). The two outputs of a
// sample must appear 11 and 19 enabled clocks after it was accepted, and back
// to back one sample is taken per 16 clocks.
module tb_interpolator;
  import dwt_ref_pkg::*;

  int checks = 0, failures = 0;

  logic              clk = 1'b0, rst = 1'b1, ce = 1'b1, x_valid = 1'b0;
  logic signed [7:0] x = '0;
  logic              rdy_l, rdy_h, yv_l, yv_h;
  logic signed [7:0] y_l, y_h;

  always #5 clk = ~clk;

  interpolator dut_l (.clk, .rst, .ce, .x_valid, .x, .x_ready(rdy_l), .y_valid(yv_l), .y(y_l));
  interpolator #(.COEFS(dwt_pkg::HP_SYNTHESIS)) dut_h (
    .clk, .rst, .ce, .x_valid, .x, .x_ready(rdy_h), .y_valid(yv_h), .y(y_h));

  int_model m_l = new(dwt_pkg::LP_SYNTHESIS);
  int_model m_h = new(dwt_pkg::HP_SYNTHESIS);

  int exp_l[$], exp_h[$], exp_t[$];
  int cyc = 0, en_cnt = 0, n_in = 0, n_out = 0, last_acc = -1, b2b = 0;
  bit full_rate = 1;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (x_valid && rdy_l) begin
        int a0, a1, b0, b1;
        m_l.step(int'(x), a0, a1);
        m_h.step(int'(x), b0, b1);
        exp_l.push_back(a0); exp_h.push_back(b0); exp_t.push_back(en_cnt + 11);
        exp_l.push_back(a1); exp_h.push_back(b1); exp_t.push_back(en_cnt + 19);
        if (full_rate && last_acc >= 0) begin
          checks++; b2b++;
          if (cyc - last_acc != 16) begin failures++; $display("FAIL spacing %0d", cyc - last_acc); end
        end
        last_acc = cyc;
        n_in++;
      end
      if (yv_l || yv_h) begin
        checks += 3;
        n_out++;
        if (!(yv_l && yv_h) || exp_l.size() == 0) begin
          failures++; $display("FAIL unexpected output");
        end else begin
          int el, eh, t;
          el = exp_l.pop_front(); eh = exp_h.pop_front(); t = exp_t.pop_front();
          if (int'(y_l) != el) begin failures++; $display("FAIL lp %0d exp %0d", y_l, el); end
          if (int'(y_h) != eh) begin failures++; $display("FAIL hp %0d exp %0d", y_h, eh); end
          if (en_cnt != t) begin failures++; $display("FAIL latency: at %0d exp %0d", en_cnt, t); end
        end
      end
      if (ce) en_cnt++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    x_valid = 1'b1;
    for (int i = 0; i < 60; i++) begin
      bit ok;
      x = 8'($urandom);
      do begin #1 ok = rdy_l; @(negedge clk); end while (!ok);
    end
    full_rate = 0;
    for (int i = 0; i < 1500; i++) begin
      ce = 1'($urandom);
      x_valid = 1'($urandom_range(0, 3) == 0);
      x = 8'($urandom);
      @(negedge clk);
    end
    ce = 1'b1; x_valid = 1'b0;
    repeat (40) @(negedge clk);
    checks++;
    if (exp_l.size() != 0 || n_out != 2 * n_in || b2b < 59) begin
      failures++; $display("FAIL in=%0d out=%0d left=%0d", n_in, n_out, exp_l.size());
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
