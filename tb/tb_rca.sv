// tb_rca: checks the ripple-carry adder at its default 8-bit width and at the
// 11-bit width used inside the filter, against the + operator, with corner
// values and random operands.
module tb_rca;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic [10:0] a11, b11, s11;
  logic        cin, co8, co11;

  rca u8 (.a(a8), .b(b8), .cin, .s(s8), .cout(co8));
  rca #(.W(11)) u11 (.a(a11), .b(b11), .cin, .s(s11), .cout(co11));

  task automatic check_once();
    logic [8:0]  e8  = {1'b0, a8} + {1'b0, b8} + 9'(cin);
    logic [11:0] e11 = {1'b0, a11} + {1'b0, b11} + 12'(cin);
    #1;
    checks += 2;
    if ({co8, s8} != e8) begin
      failures++; $display("FAIL w8 %0d+%0d+%0d got %0d", a8, b8, cin, {co8, s8});
    end
    if ({co11, s11} != e11) begin
      failures++; $display("FAIL w11 %0d+%0d+%0d got %0d", a11, b11, cin, {co11, s11});
    end
  endtask

  initial begin
    a8 = 8'hFF; b8 = 8'h01; a11 = 11'h7FF; b11 = 11'h001; cin = 0; check_once();
    a8 = 8'hFF; b8 = 8'hFF; a11 = 11'h7FF; b11 = 11'h7FF; cin = 1; check_once();
    a8 = 8'h00; b8 = 8'h00; a11 = 11'h000; b11 = 11'h000; cin = 1; check_once();
    repeat (2000) begin
      a8 = 8'($urandom); b8 = 8'($urandom); a11 = 11'($urandom); b11 = 11'($urandom);
      cin = 1'($urandom);
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
