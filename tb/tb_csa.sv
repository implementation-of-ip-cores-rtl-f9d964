// Self-checking testbench of csa, the one-level carry-save adder.
//
// The 6-bit instance is checked on the worked example A = 40, B = 25,
// C = 20 (S = 37, C' = 48) and then exhaustively over all 2^18 input
// triples: sum must be the bitwise XOR, carry the bitwise majority moved up
// one place, and sum + carry must equal a + b + c.  A 67-bit instance is
// checked on random words.
module tb_csa;
  logic [5:0]  a6, b6, c6, s6;
  logic [6:0]  k6;
  logic [66:0] a67, b67, c67, s67;
  logic [67:0] k67;
  int checks = 0;
  int failures = 0;

  csa #(.W(6))  dut6  (.a(a6),  .b(b6),  .c(c6),  .sum(s6),  .carry(k6));
  csa #(.W(67)) dut67 (.a(a67), .b(b67), .c(c67), .sum(s67), .carry(k67));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  initial begin
    a6 = 6'd40; b6 = 6'd25; c6 = 6'd20;
    #1;
    check(s6 == 6'd37 && k6 == 7'd48, $sformatf("example: S=%0d C=%0d", s6, k6));

    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        for (int k = 0; k < 64; k++) begin
          int unsigned tot, maj;
          a6 = 6'(i); b6 = 6'(j); c6 = 6'(k);
          #1;
          tot = i + j + k;
          maj = (i & j) | (i & k) | (j & k);
          check(int'(s6) == (i ^ j ^ k) && int'(k6) == (maj << 1) &&
                int'(s6) + int'(k6) == tot,
                $sformatf("%0d+%0d+%0d gave S=%0d C=%0d", i, j, k, s6, k6));
        end

    for (int n = 0; n < 200; n++) begin
      a67 = {$urandom, $urandom, $urandom};
      b67 = {$urandom, $urandom, $urandom};
      c67 = {$urandom, $urandom, $urandom};
      #1;
      check(68'(s67) + k67 == 68'(a67) + 68'(b67) + 68'(c67), "67-bit sum");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
