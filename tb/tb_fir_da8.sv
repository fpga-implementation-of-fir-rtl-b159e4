// tb_fir_da8: self-checking test of the bit-serial DA FIR filter.
// Two instances (lowpass and highpass analysis coefficients) get the same
// sample stream. Every result is compared, full precision and requantised,
// with an integer multiply-add model. Also checked: latency of DATA_W+1 = 9
// enabled clocks from acceptance to y_valid, one accepted sample per 8 clocks
// when samples are offered back to back, and correct operation with gaps
// between samples and with a random clock enable.
module tb_fir_da8;
  import dwt_ref_pkg::*;

  int checks = 0, failures = 0;

  logic              clk = 1'b0, rst = 1'b1, ce = 1'b1, x_valid = 1'b0;
  logic signed [7:0] x = '0;
  logic              rdy_l, rdy_h, yv_l, yv_h;
  logic signed [18:0] yf_l, yf_h;
  logic signed [7:0]  y_l, y_h;

  always #5 clk = ~clk;

  fir_da8 dut_l (.clk, .rst, .ce, .x_valid, .x, .x_ready(rdy_l),
                 .y_valid(yv_l), .y_full(yf_l), .y(y_l));
  fir_da8 #(.COEFS(dwt_pkg::HP_ANALYSIS)) dut_h (
                 .clk, .rst, .ce, .x_valid, .x, .x_ready(rdy_h),
                 .y_valid(yv_h), .y_full(yf_h), .y(y_h));

  fir_model m_l = new(dwt_pkg::LP_ANALYSIS);
  fir_model m_h = new(dwt_pkg::HP_ANALYSIS);

  int exp_lf[$], exp_l[$], exp_hf[$], exp_h[$], t_acc[$];
  int en_cnt = 0, accepted = 0, results = 0, saturations = 0;
  int last_acc = -1, cyc = 0, b2b_checked = 0;
  bit b2b_phase = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (rdy_l != rdy_h) begin
        failures++; $display("FAIL ready mismatch");
      end
      if (x_valid && rdy_l) begin
        int fl, fh;
        fl = m_l.step_full(int'(x));
        fh = m_h.step_full(int'(x));
        exp_lf.push_back(fl); exp_l.push_back(requant(fl));
        exp_hf.push_back(fh); exp_h.push_back(requant(fh));
        t_acc.push_back(en_cnt);
        if (requant(fl) != (fl >>> 6) || requant(fh) != (fh >>> 6)) saturations++;
        if (b2b_phase && last_acc >= 0) begin
          checks++; b2b_checked++;
          if (cyc - last_acc != 8) begin
            failures++; $display("FAIL back-to-back spacing %0d", cyc - last_acc);
          end
        end
        last_acc = cyc;
        accepted++;
      end
      if (yv_l != yv_h) begin
        failures++; $display("FAIL y_valid mismatch");
      end
      if (yv_l) begin
        if (exp_l.size() == 0) begin
          failures++; $display("FAIL unexpected result");
        end else begin
          int efl, el, efh, eh, t;
          efl = exp_lf.pop_front(); el = exp_l.pop_front();
          efh = exp_hf.pop_front(); eh = exp_h.pop_front();
          t = t_acc.pop_front();
          checks += 5;
          results++;
          if (int'(yf_l) != efl) begin failures++; $display("FAIL lp full %0d exp %0d", yf_l, efl); end
          if (int'(y_l)  != el)  begin failures++; $display("FAIL lp y %0d exp %0d", y_l, el); end
          if (int'(yf_h) != efh) begin failures++; $display("FAIL hp full %0d exp %0d", yf_h, efh); end
          if (int'(y_h)  != eh)  begin failures++; $display("FAIL hp y %0d exp %0d", y_h, eh); end
          if (en_cnt - t != 9)   begin failures++; $display("FAIL latency %0d", en_cnt - t); end
        end
      end
      if (ce) en_cnt++;
    end
  end

  function automatic logic [7:0] pick();
    case ($urandom_range(0, 5))
      0: return 8'h80;
      1: return 8'h7F;
      default: return 8'($urandom);
    endcase
  endfunction

  // Hold the current sample until the filter takes it.
  task automatic send();
    bit ok;
    do begin
      #1 ok = rdy_l;
      @(negedge clk);
    end while (!ok);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Back to back, full rate.
    b2b_phase = 1;
    x_valid = 1'b1;
    for (int i = 0; i < 120; i++) begin
      x = pick();
      send();
    end
    b2b_phase = 0;
    // Same value held: drives the lowpass output into saturation.
    for (int i = 0; i < 12; i++) begin
      x = (i < 6) ? 8'sd127 : -8'sd128;
      send();
    end
    // Random gaps.
    for (int i = 0; i < 150; i++) begin
      x_valid = 1'($urandom_range(0, 2) == 0);
      x = pick();
      @(negedge clk);
    end
    // Random clock enable.
    for (int i = 0; i < 600; i++) begin
      ce = 1'($urandom);
      x_valid = 1'($urandom);
      x = pick();
      @(negedge clk);
    end
    ce = 1'b1; x_valid = 1'b0;
    repeat (30) @(negedge clk);
    checks++;
    if (exp_l.size() != 0 || results != accepted) begin
      failures++; $display("FAIL %0d accepted, %0d results", accepted, results);
    end
    checks++;
    if (saturations == 0 || b2b_checked < 100) begin
      failures++; $display("FAIL coverage: saturations=%0d b2b=%0d", saturations, b2b_checked);
    end
    $display("accepted=%0d results=%0d saturations=%0d", accepted, results, saturations);
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
