// tb_downsampler: feeds a random stream of strobed samples and checks that
// exactly samples 0, 2, 4, ... come out, each one clock after it went in,
// and that nothing comes out otherwise.
module tb_downsampler;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic [7:0] in_data = '0;
  logic       out_valid;
  logic [7:0] out_data;

  always #5 clk = ~clk;

  downsampler dut (.clk, .rst, .in_valid, .in_data, .out_valid, .out_data);

  int  n_in = 0, n_out = 0, dropped = 0;
  bit  pend = 0;
  logic [7:0] pend_v;

  always @(posedge clk) begin
    if (!rst) begin
      // An output must match the sample kept on the previous edge.
      checks++;
      if (out_valid != pend) begin
        failures++; $display("FAIL out_valid=%0b expected %0b", out_valid, pend);
      end else if (out_valid) begin
        checks++;
        n_out++;
        if (out_data != pend_v) begin
          failures++; $display("FAIL out_data=%0h exp %0h", out_data, pend_v);
        end
      end
      pend = 0;
      if (in_valid) begin
        if (n_in % 2 == 0) begin pend = 1; pend_v = in_data; end
        else dropped++;
        n_in++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      in_valid = 1'($urandom_range(0, 2) != 0);
      in_data  = 8'($urandom);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_out != (n_in + 1) / 2 || dropped == 0) begin
      failures++; $display("FAIL in=%0d out=%0d", n_in, n_out);
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
