// tb_decimator: lowpass and highpass analysis stages (filter and decimation
// by 2) fed with the same samples, back to back and with random gaps. Every
// output is compared with the reference model (filter outputs 0, 2, 4, ...
// requantised to 8 bits); each kept output must appear 10 clocks after its
// input was accepted and the stages must take one sample per 8 clocks.
module tb_decimator;
  import dwt_ref_pkg::*;

  int checks = 0, failures = 0;

  logic              clk = 1'b0, rst = 1'b1, x_valid = 1'b0;
  logic signed [7:0] x = '0;
  logic              rdy_l, rdy_h, yv_l, yv_h;
  logic signed [7:0] y_l, y_h;

  always #5 clk = ~clk;

  decimator dut_l (.clk, .rst, .x_valid, .x, .x_ready(rdy_l), .y_valid(yv_l), .y(y_l));
  decimator #(.COEFS(dwt_pkg::HP_ANALYSIS)) dut_h (
    .clk, .rst, .x_valid, .x, .x_ready(rdy_h), .y_valid(yv_h), .y(y_h));

  dec_model m_l = new(dwt_pkg::LP_ANALYSIS);
  dec_model m_h = new(dwt_pkg::HP_ANALYSIS);

  int exp_l[$], exp_h[$], exp_t[$];
  int cyc = 0, n_in = 0, n_out = 0, last_acc = -1, b2b = 0;
  bit full_rate = 1;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (x_valid && rdy_l) begin
        int yl, yh;
        bit kl, kh;
        kl = m_l.step(int'(x), yl);
        kh = m_h.step(int'(x), yh);
        if (kl) begin exp_l.push_back(yl); exp_h.push_back(yh); exp_t.push_back(cyc + 10); end
        if (full_rate && last_acc >= 0) begin
          checks++; b2b++;
          if (cyc - last_acc != 8) begin failures++; $display("FAIL spacing %0d", cyc - last_acc); end
        end
        last_acc = cyc;
        n_in++;
      end
      if (yv_l || yv_h) begin
        checks += 4;
        n_out++;
        if (!(yv_l && yv_h) || exp_l.size() == 0) begin
          failures++; $display("FAIL unexpected output");
        end else begin
          int el, eh, t;
          el = exp_l.pop_front(); eh = exp_h.pop_front(); t = exp_t.pop_front();
          if (int'(y_l) != el) begin failures++; $display("FAIL lp %0d exp %0d", y_l, el); end
          if (int'(y_h) != eh) begin failures++; $display("FAIL hp %0d exp %0d", y_h, eh); end
          if (cyc != t) begin failures++; $display("FAIL latency: at %0d exp %0d", cyc, t); end
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    x_valid = 1'b1;
    for (int i = 0; i < 100; i++) begin
      bit ok;
      x = 8'($urandom);
      do begin #1 ok = rdy_l; @(negedge clk); end while (!ok);
    end
    full_rate = 0;
    for (int i = 0; i < 800; i++) begin
      x_valid = 1'($urandom_range(0, 3) == 0);
      x = 8'($urandom);
      @(negedge clk);
    end
    x_valid = 1'b0;
    repeat (30) @(negedge clk);
    checks++;
    if (exp_l.size() != 0 || n_out != (n_in + 1) / 2 || b2b < 99) begin
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
