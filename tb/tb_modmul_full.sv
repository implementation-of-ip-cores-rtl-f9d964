// Full-size testbench of modmul_top: every core at its default width of
// 1024 bits.
//
// One complete modular multiplication X * Y mod M on random 1024-bit
// operands runs on each core: two passes on each Montgomery core (domain
// conversion with 2^2048 mod M, then the product) and one pass on the
// interleaved core.  Results are compared with X * Y mod M formed with wide
// integer arithmetic, and each pass must take exactly 1024 clock cycles.
// At the same time the exponentiator computes base^e mod n for a random
// 1024-bit base and exponent, checked against a square-and-multiply
// reference; it must take (1024 + 2) * (1024 + 2) clock cycles.
module tb_modmul_full;
  localparam int unsigned N = 1024;
  typedef logic [N-1:0] word_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  fm_reset, sm_reset, il_reset;
  word_t fm_x, fm_y, fm_m, fm_p, sm_x, sm_y, sm_m, sm_p, il_x, il_y, il_m, il_p;
  logic  fm_done, sm_done, il_done;
  logic  ex_reset, ex_done;
  word_t ex_base, ex_e, ex_n, ex_r2, ex_c;

  int checks = 0;
  int failures = 0;

  modmul_top dut (.*);

  initial begin
    repeat (1100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  function automatic word_t rnd();
    word_t w;
    for (int k = 0; k < N / 32; k++) w[k*32 +: 32] = $urandom;
    return w;
  endfunction

  function automatic word_t mulmod(word_t a, word_t b, word_t m);
    logic [2*N:0] t;
    t = ((2*N+1)'(a) * (2*N+1)'(b)) % (2*N+1)'(m);
    return word_t'(t);
  endfunction

  function automatic word_t powmod(word_t b, word_t e, word_t m);
    word_t r = 1 % m;
    for (int i = N - 1; i >= 0; i--) begin
      r = mulmod(r, r, m);
      if (e[i]) r = mulmod(r, b, m);
    end
    return r;
  endfunction

  bit exp_finished = 1'b0;

  // One full-size exponentiation.
  initial begin
    word_t b, e, m, want;
    logic [2*N+1:0] t;
    int cyc;
    m = rnd();
    m[N-1] = 1'b1;
    m[0] = 1'b1;
    b = rnd() % m;
    e = rnd();
    t = ((2*N+2)'(1) << (2*N)) % (2*N+2)'(m);
    want = powmod(b, e, m);
    ex_base = b; ex_e = e; ex_n = m; ex_r2 = word_t'(t); ex_reset = 1'b1;
    repeat (2) @(negedge clk);
    ex_reset = 1'b0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!ex_done);
    check(cyc == (N + 2) * (N + 2), $sformatf("exponentiation took %0d cycles", cyc));
    check(ex_c == want, "exponentiator: base^e mod n");
    exp_finished = 1'b1;
  end

  // All three cores start together; the Montgomery cores run twice.
  initial begin
    word_t x, y, m, r2, want;
    int cyc;
    logic [2*N+1:0] t;

    m = rnd();
    m[N-1] = 1'b1;
    m[0] = 1'b1;
    x = rnd() % m;
    y = rnd() % m;
    t = ((2*N+2)'(1) << (2*N)) % (2*N+2)'(m);
    r2 = word_t'(t);
    want = mulmod(x, y, m);

    fm_reset = 1'b1; sm_reset = 1'b1; il_reset = 1'b1;
    fm_x = x; fm_y = r2; fm_m = m;
    sm_x = x; sm_y = r2; sm_m = m;
    il_x = x; il_y = y;  il_m = m;
    repeat (2) @(negedge clk);
    fm_reset = 1'b0; sm_reset = 1'b0; il_reset = 1'b0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!fm_done);
    check(cyc == N && sm_done && il_done, $sformatf("first pass took %0d cycles", cyc));
    check(il_p == want, "interleaved core: X * Y mod M");
    check(fm_p == sm_p, "Montgomery cores agree on X * 2^N mod M");

    // Second pass: Mont(X * 2^N mod M, Y) = X * Y mod M.
    fm_x = fm_p; fm_y = y; fm_reset = 1'b1;
    sm_x = sm_p; sm_y = y; sm_reset = 1'b1;
    @(negedge clk);
    fm_reset = 1'b0; sm_reset = 1'b0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!fm_done);
    check(cyc == N && sm_done, $sformatf("second pass took %0d cycles", cyc));
    check(fm_p == want, "faster Montgomery core: X * Y mod M");
    check(sm_p == want, "standard Montgomery core: X * Y mod M");

    wait (exp_finished);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
