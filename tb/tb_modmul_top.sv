// End-to-end testbench of modmul_top at N = 32.
//
// All three cores are exercised at once, each with its own operands.  The
// two Montgomery cores are used the way a modular multiplication is done
// with them: first X is taken into the Montgomery domain with
// Mont(X, 2^2N mod M) = X * 2^N mod M, then Mont(X * 2^N mod M, Y) gives
// X * Y mod M.  The interleaved core computes X * Y mod M in one pass.
// Every result is compared with X * Y mod M formed here with wide integer
// arithmetic, and every operation must take exactly N clock cycles.
//
// The testbench also counts how often each mechanism of the cores
// happened and fails if one never did: the four choices of the faster
// core's operand table (0, M, Y, Y + M), the final subtraction taken and
// not taken in both Montgomery cores, the interleaved core's first and
// second subtraction stage, a reset in the middle of an operation, and
// exponent bits of both values in the exponentiator (a bit of 1 keeps the
// multiplier's product, a bit of 0 discards it).  The exponentiator runs
// in parallel with the multipliers on its own operands, its result is
// compared with a square-and-multiply reference and its latency must be
// (N + 2) * (N + 2) clock cycles.
module tb_modmul_top;
  import modmul_pkg::*;
  localparam int unsigned N = 32;
  localparam int unsigned NOPS = 200;
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

  modmul_top #(.N(N)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---------------------------------------------------------------- counters
  int n_sel[4];
  int n_fm_sub, n_fm_nosub, n_sm_sub, n_sm_nosub;
  int n_il_sub1, n_il_sub2, n_il_none, n_restart;
  int n_ebit1, n_ebit0, n_exp;

  always @(posedge clk) begin
    if (dut.u_fast.step) n_sel[int'(dut.u_fast.sel)]++;
    if (!ex_reset && !dut.u_exp.kick && dut.u_exp.state == EX_LOOP &&
        dut.u_exp.mul_done) begin
      if (dut.u_exp.e_sr[0]) n_ebit1++; else n_ebit0++;
    end
    if (dut.u_il.step) begin
      if (dut.u_il.sub1) n_il_sub1++;
      if (dut.u_il.sub2) n_il_sub2++;
      if (!dut.u_il.sub1 && !dut.u_il.sub2) n_il_none++;
    end
  end

  // ---------------------------------------------------------------- helpers
  function automatic word_t mulmod(word_t a, word_t b, word_t m);
    logic [2*N:0] t;
    t = ((2*N+1)'(a) * (2*N+1)'(b)) % (2*N+1)'(m);
    return word_t'(t);
  endfunction

  function automatic word_t r2mod(word_t m);
    logic [2*N+1:0] t;
    t = ((2*N+2)'(1) << (2*N)) % (2*N+2)'(m);
    return word_t'(t);
  endfunction

  // Run one operation on a core; which: 0 fast, 1 standard, 2 interleaved.
  task automatic run(input int which, input word_t x, y, m, output word_t p);
    int cyc;
    @(negedge clk);
    case (which)
      0: begin fm_x = x; fm_y = y; fm_m = m; fm_reset = 1'b1; end
      1: begin sm_x = x; sm_y = y; sm_m = m; sm_reset = 1'b1; end
      default: begin il_x = x; il_y = y; il_m = m; il_reset = 1'b1; end
    endcase
    @(negedge clk);
    case (which)
      0: fm_reset = 1'b0;
      1: sm_reset = 1'b0;
      default: il_reset = 1'b0;
    endcase
    cyc = 0;
    forever begin
      @(negedge clk);
      cyc++;
      if ((which == 0 && fm_done) || (which == 1 && sm_done) ||
          (which == 2 && il_done) || cyc > 4 * N) break;
    end
    check(cyc == N, $sformatf("core %0d latency %0d, expected %0d", which, cyc, N));
    case (which)
      0: begin p = fm_p; if (dut.u_fast.u_reduce.sub) n_fm_sub++; else n_fm_nosub++; end
      1: begin p = sm_p; if (dut.u_std.u_reduce.sub) n_sm_sub++; else n_sm_nosub++; end
      default: p = il_p;
    endcase
  endtask

  // X * Y mod M on a Montgomery core: convert X, then multiply.
  task automatic mont_mulmod(input int which, input word_t x, y, m, output word_t p);
    word_t xm;
    run(which, x, r2mod(m), m, xm);
    check(xm == mulmod(x, word_t'(((2*N+1)'(1) << N) % (2*N+1)'(m)), m),
          $sformatf("core %0d domain conversion", which));
    run(which, xm, y, m, p);
  endtask

  function automatic word_t powmod(word_t b, word_t e, word_t m);
    word_t r = 1 % m;
    for (int i = N - 1; i >= 0; i--) begin
      r = mulmod(r, r, m);
      if (e[i]) r = mulmod(r, b, m);
    end
    return r;
  endfunction

  // Exponentiations, back to back, until the multiplier tests finish.
  bit stop_exp = 1'b0;
  initial begin
    word_t b, e, m;
    int cyc;
    ex_reset = 1'b1;
    ex_base = '0; ex_e = '0; ex_n = 32'd3; ex_r2 = '0;
    repeat (3) @(negedge clk);
    while (!stop_exp) begin
      m = ($urandom >> ($urandom % 20)) | 32'd1;
      if (m < 32'd3) m = 32'd3;
      b = $urandom % m;
      e = $urandom;
      ex_base = b; ex_e = e; ex_n = m; ex_r2 = r2mod(m); ex_reset = 1'b1;
      @(negedge clk);
      ex_reset = 1'b0;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!ex_done && cyc < 4 * (N + 2) * (N + 2));
      check(cyc == (N + 2) * (N + 2), $sformatf("exponentiation latency %0d", cyc));
      check(ex_c == powmod(b, e, m), $sformatf("%h^%h mod %h: got %h", b, e, m, ex_c));
      n_exp++;
    end
  end

  task automatic one_op(input word_t x, y, m);
    word_t want, pf, ps, pi;
    want = mulmod(x, y, m);
    fork
      mont_mulmod(0, x, y, m, pf);
      mont_mulmod(1, x, y, m, ps);
      run(2, x, y, m, pi);
    join
    check(pf == want, $sformatf("fast: %h*%h mod %h = %h, got %h", x, y, m, want, pf));
    check(ps == want, $sformatf("std: %h*%h mod %h = %h, got %h", x, y, m, want, ps));
    check(pi == want, $sformatf("il: %h*%h mod %h = %h, got %h", x, y, m, want, pi));
  endtask

  initial begin
    word_t x, y, m, p;
    fm_reset = 1'b1; sm_reset = 1'b1; il_reset = 1'b1;
    fm_x = '0; fm_y = '0; fm_m = 32'd1;
    sm_x = '0; sm_y = '0; sm_m = 32'd1;
    il_x = '0; il_y = '0; il_m = 32'd1;
    repeat (3) @(negedge clk);

    // Worked example of the published cores, widened to 32 bits.
    one_op(32'd234, 32'd167, 32'd293);

    // Reset in the middle of an operation on every core.
    @(negedge clk);
    fm_reset = 1'b1; sm_reset = 1'b1; il_reset = 1'b1;
    fm_x = '1; sm_x = '1; il_x = '1;
    @(negedge clk);
    fm_reset = 1'b0; sm_reset = 1'b0; il_reset = 1'b0;
    repeat (N / 3) @(negedge clk);
    run(0, 32'd5, 32'd7, 32'd11, p);
    check(mulmod(p, word_t'(((2*N+1)'(1) << N) % (2*N+1)'(11)), 32'd11) == 32'd2,
          "restart fast: Mont(5, 7) * 2^N mod 11 must be 35 mod 11");
    run(2, 32'd5, 32'd7, 32'd11, p);
    check(p == 32'd2, "restart interleaved: 35 mod 11");
    n_restart++;

    for (int i = 0; i < NOPS; i++) begin
      m = $urandom;
      if (i % 4 == 3) m = m >> ($urandom % 28);
      m = m | 32'd1;
      if (m < 32'd3) m = 32'd3;
      x = $urandom % m;
      y = $urandom % m;
      one_op(x, y, m);
    end

    stop_exp = 1'b1;
    wait (n_exp > 0 && ex_done);
    $display("exponentiations %0d, exponent bits 1/0: %0d %0d", n_exp, n_ebit1, n_ebit0);
    check(n_exp > 0 && n_ebit1 > 0 && n_ebit0 > 0, "exponent bit values not both seen");
    $display("table choices 0/M/Y/Y+M: %0d %0d %0d %0d", n_sel[0], n_sel[1], n_sel[2], n_sel[3]);
    $display("fast final subtraction taken/not: %0d %0d", n_fm_sub, n_fm_nosub);
    $display("std final subtraction taken/not: %0d %0d", n_sm_sub, n_sm_nosub);
    $display("interleaved stage1/stage2/none: %0d %0d %0d", n_il_sub1, n_il_sub2, n_il_none);
    for (int s = 0; s < 4; s++) check(n_sel[s] > 0, $sformatf("table choice %0d never used", s));
    check(n_fm_sub > 0 && n_fm_nosub > 0, "fast final subtraction not seen both ways");
    check(n_sm_sub > 0 && n_sm_nosub > 0, "std final subtraction not seen both ways");
    check(n_il_sub1 > 0 && n_il_sub2 > 0 && n_il_none > 0, "interleaved subtraction stages");
    check(n_restart > 0, "restart never exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
