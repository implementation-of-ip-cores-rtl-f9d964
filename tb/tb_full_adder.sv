// Self-checking testbench of full_adder.
//
// Applies all eight input combinations and compares (co, s) with the
// full-adder truth table written out below, row by row, and with the
// arithmetic identity a + b + ci == 2*co + s.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0;
  int failures = 0;

  // Truth table rows {a, b, ci} -> {co, s}.
  localparam logic [1:0] TABLE [8] = '{2'b00, 2'b01, 2'b01, 2'b10,
                                       2'b01, 2'b10, 2'b10, 2'b11};

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      {a, b, ci} = 3'(r);
      #1;
      checks++;
      if ({co, s} != TABLE[r] || int'(a) + int'(b) + int'(ci) != 2 * int'(co) + int'(s)) begin
        failures++;
        $display("FAIL: a=%b b=%b ci=%b gave co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
