// tb_upsampler: checks the zero-insertion front end of the interpolator.
// Every accepted sample must be handed on twice, 2 and 10 enabled clocks
// after acceptance (counts 1 and 9 of the 4-bit counter), first as the sample
// and then as zero (register cleared by the counter MSB). Back to back the
// upsampler must take one sample per 16 clocks. Runs at full rate and with a
// random clock enable.
module tb_upsampler;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst = 1'b1, ce = 1'b1, x_valid = 1'b0;
  logic [7:0] x = '0;
  logic       x_ready, f_valid;
  logic [7:0] f_data;

  always #5 clk = ~clk;

  upsampler dut (.clk, .rst, .ce, .x_valid, .x, .x_ready, .f_valid, .f_data);

  // Expected hand-overs: enabled-clock time and value.
  int exp_t[$], exp_v[$];
  int en_cnt = 0, cyc = 0, last_acc = -1, zeros = 0, b2b = 0;
  bit full_rate = 1;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (x_valid && x_ready) begin
        exp_t.push_back(en_cnt + 2);  exp_v.push_back(int'(x));
        exp_t.push_back(en_cnt + 10); exp_v.push_back(0);
        if (full_rate && last_acc >= 0) begin
          checks++; b2b++;
          if (cyc - last_acc != 16) begin
            failures++; $display("FAIL spacing %0d", cyc - last_acc);
          end
        end
        last_acc = cyc;
      end
      if (f_valid) begin
        checks += 2;
        if (exp_t.size() == 0) begin
          failures++; $display("FAIL unexpected hand-over");
        end else begin
          int t, v;
          t = exp_t.pop_front(); v = exp_v.pop_front();
          if (t != en_cnt) begin failures++; $display("FAIL time %0d exp %0d", en_cnt, t); end
          if (int'(f_data) != v) begin failures++; $display("FAIL data %0d exp %0d", f_data, v); end
          if (v == 0) zeros++;
        end
      end
      if (ce) en_cnt++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    x_valid = 1'b1;
    for (int i = 0; i < 20; i++) begin
      bit ok;
      x = 8'($urandom_range(1, 255));
      do begin #1 ok = x_ready; @(negedge clk); end while (!ok);
    end
    full_rate = 0;
    for (int i = 0; i < 800; i++) begin
      ce = 1'($urandom);
      x_valid = 1'($urandom_range(0, 3) == 0);
      x = 8'($urandom_range(1, 255));
      @(negedge clk);
    end
    ce = 1'b1; x_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_t.size() != 0 || zeros < 20 || b2b < 19) begin
      failures++; $display("FAIL left=%0d zeros=%0d b2b=%0d", exp_t.size(), zeros, b2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
