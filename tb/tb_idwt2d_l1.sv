// tb_idwt2d_l1: inverse 2D stage. Samples are offered back to back and then
// with random gaps; both chains' outputs are compared in order with a
// reference model of two chained synthesis stages (each input yields four
// outputs per chain). Also checks that back to back the input takes one
// sample per 32 clocks.
module tb_idwt2d_l1;
  import dwt_ref_pkg::*;

  int checks = 0, failures = 0;

  logic              clk = 1'b0, rst = 1'b1, x_valid = 1'b0;
  logic signed [7:0] x = '0;
  logic              x_ready, a_valid, b_valid;
  logic signed [7:0] a, b;

  always #5 clk = ~clk;

  idwt2d_l1 dut (.clk, .rst, .x_valid, .x, .x_ready, .a_valid, .a, .b_valid, .b);

  int_model row_a = new(dwt_pkg::LP_SYNTHESIS);
  int_model col_a = new(dwt_pkg::LP_SYNTHESIS);
  int_model row_b = new(dwt_pkg::HP_SYNTHESIS);
  int_model col_b = new(dwt_pkg::HP_SYNTHESIS);

  int exp_a[$], exp_b[$];
  int cyc = 0, n_in = 0, n_a = 0, n_b = 0, last_acc = -1;
  bit full_rate = 1;

  function automatic void chain(int_model r, int_model c, int v, ref int q[$]);
    int r0, r1, c0, c1;
    r.step(v, r0, r1);
    c.step(r0, c0, c1); q.push_back(c0); q.push_back(c1);
    c.step(r1, c0, c1); q.push_back(c0); q.push_back(c1);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (x_valid && x_ready) begin
        chain(row_a, col_a, int'(x), exp_a);
        chain(row_b, col_b, int'(x), exp_b);
        if (full_rate && last_acc >= 0) begin
          checks++;
          if (cyc - last_acc != 32) begin failures++; $display("FAIL spacing %0d", cyc - last_acc); end
        end
        last_acc = cyc;
        n_in++;
      end
      if (a_valid) begin
        checks++; n_a++;
        if (exp_a.size() == 0) begin failures++; $display("FAIL extra a"); end
        else begin
          automatic int e = exp_a.pop_front();
          if (int'(a) != e) begin failures++; $display("FAIL a %0d exp %0d", a, e); end
        end
      end
      if (b_valid) begin
        checks++; n_b++;
        if (exp_b.size() == 0) begin failures++; $display("FAIL extra b"); end
        else begin
          automatic int e = exp_b.pop_front();
          if (int'(b) != e) begin failures++; $display("FAIL b %0d exp %0d", b, e); end
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    x_valid = 1'b1;
    for (int i = 0; i < 60; i++) begin
      bit ok;
      x = 8'($urandom);
      do begin #1 ok = x_ready; @(negedge clk); end while (!ok);
    end
    full_rate = 0;
    for (int i = 0; i < 2000; i++) begin
      x_valid = 1'($urandom_range(0, 15) == 0);
      x = 8'($urandom);
      @(negedge clk);
    end
    x_valid = 1'b0;
    repeat (80) @(negedge clk);
    checks++;
    if (exp_a.size() != 0 || exp_b.size() != 0 || n_a != 4 * n_in || n_b != n_a) begin
      failures++; $display("FAIL in=%0d a=%0d b=%0d", n_in, n_a, n_b);
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
