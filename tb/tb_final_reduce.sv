// Self-checking testbench of final_reduce, the compare/subtract/select
// stage.
//
// An 8-bit instance is checked exhaustively over all (p_in, m) pairs: the
// output must be p_in - m exactly when p_in >= m (equality included) and
// p_in otherwise, and `sub` must report the choice.  A 1025-bit instance,
// the width used at the output of the 1024-bit Montgomery cores, is checked
// on random values in [0, 2M) and on the boundary values M - 1, M, 2M - 1.
module tb_final_reduce;
  logic [7:0]    p8, m8, o8;
  logic          s8;
  logic [1024:0] pw, mw, ow;
  logic          sw;
  int checks = 0;
  int failures = 0;

  final_reduce #(.W(8))    dut8 (.p_in(p8), .m(m8), .p_out(o8), .sub(s8));
  final_reduce #(.W(1025)) dutw (.p_in(pw), .m(mw), .p_out(ow), .sub(sw));

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

  task automatic wide(input logic [1024:0] p, m);
    logic [1024:0] want;
    pw = p; mw = m;
    #1;
    want = (p >= m) ? p - m : p;
    check(ow == want && sw == (p >= m), "1025-bit reduction");
  endtask

  initial begin
    for (int p = 0; p < 256; p++)
      for (int m = 0; m < 256; m++) begin
        p8 = 8'(p); m8 = 8'(m);
        #1;
        check(int'(o8) == ((p >= m) ? p - m : p) && s8 == (p >= m),
              $sformatf("p=%0d m=%0d gave %0d", p, m, o8));
      end

    for (int n = 0; n < 100; n++) begin
      logic [1024:0] m, p;
      m = '0;
      for (int k = 0; k < 32; k++) m[k*32 +: 32] = $urandom;
      m[0] = 1'b1;
      p = '0;
      for (int k = 0; k < 32; k++) p[k*32 +: 32] = $urandom;
      p = p % (m << 1);
      wide(p, m);
      wide(m, m);
      wide(m - 1, m);
      wide((m << 1) - 1, m);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
