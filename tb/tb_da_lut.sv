// tb_da_lut: exhaustive check of the partial DA look-up table. Two instances,
// the default coefficients and a set of extreme values, are read at all 16
// addresses and compared with the sum of the selected coefficients.
module tb_da_lut;
  int checks = 0, failures = 0;

  localparam logic [3:0][7:0] C_DEF = {-8'd2, 8'd40, 8'd46, 8'd15};
  localparam logic [3:0][7:0] C_EXT = {-8'd128, -8'd128, 8'd127, -8'd128};

  logic [3:0]        addr;
  logic signed [9:0] p_def, p_ext;

  da_lut u_def (.addr, .p(p_def));
  da_lut #(.COEFS(C_EXT)) u_ext (.addr, .p(p_ext));

  function automatic int expect_sum(logic [3:0][7:0] c, int a);
    int s = 0;
    for (int i = 0; i < 4; i++) if (a[i]) s += int'($signed(c[i]));
    return s;
  endfunction

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      checks += 2;
      if (int'(p_def) != expect_sum(C_DEF, a)) begin
        failures++; $display("FAIL default addr=%0d p=%0d exp=%0d", a, p_def, expect_sum(C_DEF, a));
      end
      if (int'(p_ext) != expect_sum(C_EXT, a)) begin
        failures++; $display("FAIL extreme addr=%0d p=%0d exp=%0d", a, p_ext, expect_sum(C_EXT, a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
