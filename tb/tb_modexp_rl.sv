// Self-checking testbench of modexp_rl, the right-to-left exponentiator.
//
// A 16-bit instance computes base^55 mod 293 (the exponent 55 = 110111b is
// the worked example of the binary methods) for several bases, and a
// 64-bit instance runs edge cases (e = 0, e = 1, base = 0, base = n - 1,
// all-ones exponent) and random operands.  The reference is computed here
// by repeated squaring with wide integer arithmetic and the % operator.
// Every exponentiation must take (H + 2) * (N + 2) clock cycles.
module tb_modexp_rl;
  localparam int unsigned NA = 16, HA = 16;
  localparam int unsigned NB = 64, HB = 64;
  localparam int unsigned NRAND = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          ra, rb, da, db;
  logic [NA-1:0] ba, na, r2a, ca;
  logic [HA-1:0] ea;
  logic [NB-1:0] bb, nb, r2b, cb;
  logic [HB-1:0] eb;

  modexp_rl #(.N(NA), .H(HA)) dut_a (.clk(clk), .reset(ra), .base(ba), .e(ea), .n(na), .r2(r2a), .c(ca), .done(da));
  modexp_rl #(.N(NB), .H(HB)) dut_b (.clk(clk), .reset(rb), .base(bb), .e(eb), .n(nb), .r2(r2b), .c(cb), .done(db));

  initial begin
    repeat (2000000) @(posedge clk);
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

  function automatic logic [NB-1:0] mulmod(logic [NB-1:0] a, b, m);
    logic [2*NB:0] t;
    t = ((2*NB+1)'(a) * (2*NB+1)'(b)) % (2*NB+1)'(m);
    return NB'(t);
  endfunction

  function automatic logic [NB-1:0] powmod(logic [NB-1:0] b, logic [HB-1:0] e,
                                           logic [NB-1:0] m);
    logic [NB-1:0] r = 1 % m;
    for (int i = HB - 1; i >= 0; i--) begin
      r = mulmod(r, r, m);
      if (e[i]) r = mulmod(r, b, m);
    end
    return r;
  endfunction

  function automatic logic [NB-1:0] r2of(logic [NB-1:0] m, int n);
    logic [2*NB+1:0] t;
    t = ((2*NB+2)'(1) << (2 * n)) % (2*NB+2)'(m);
    return NB'(t);
  endfunction

  task automatic test_a(input logic [NA-1:0] b, input logic [HA-1:0] e, input logic [NA-1:0] m);
    int cyc;
    @(negedge clk);
    ba = b; ea = e; na = m; r2a = NA'(r2of(NB'(m), NA)); ra = 1'b1;
    @(negedge clk);
    ra = 1'b0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!da && cyc < 10 * (HA + 2) * (NA + 2));
    check(cyc == (HA + 2) * (NA + 2), $sformatf("16-bit latency %0d", cyc));
    check(NB'(ca) == powmod(NB'(b), HB'(e), NB'(m)),
          $sformatf("%0d^%0d mod %0d gave %0d", b, e, m, ca));
  endtask

  task automatic test_b(input logic [NB-1:0] b, input logic [HB-1:0] e, input logic [NB-1:0] m);
    int cyc;
    @(negedge clk);
    bb = b; eb = e; nb = m; r2b = r2of(m, NB); rb = 1'b1;
    @(negedge clk);
    rb = 1'b0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!db && cyc < 10 * (HB + 2) * (NB + 2));
    check(cyc == (HB + 2) * (NB + 2), $sformatf("64-bit latency %0d", cyc));
    check(cb == powmod(b, e, m), $sformatf("%h^%h mod %h gave %h", b, e, m, cb));
  endtask

  initial begin
    logic [NB-1:0] m, b;
    ra = 1'b1; rb = 1'b1;
    ba = '0; ea = '0; na = 16'd3; r2a = '0;
    bb = '0; eb = '0; nb = 64'd3; r2b = '0;
    repeat (3) @(negedge clk);

    test_a(16'd234, 16'd55, 16'd293);
    test_a(16'd2, 16'd55, 16'd293);
    test_a(16'd292, 16'd55, 16'd293);
    test_a(16'd167, 16'hffff, 16'd65521);

    m = {$urandom, $urandom} | 64'h8000_0000_0000_0001;
    test_b(64'd12345, 64'd0, m);
    test_b(64'd12345, 64'd1, m);
    test_b(64'd0, 64'd7, m);
    test_b(m - 1, 64'd3, m);
    test_b(64'd3, '1, m);
    for (int i = 0; i < NRAND; i++) begin
      m = {$urandom, $urandom};
      if (i % 3 == 2) m = m >> ($urandom % 50);
      m = m | 64'd1;
      if (m < 64'd3) m = 64'd3;
      b = {$urandom, $urandom} % m;
      test_b(b, {$urandom, $urandom}, m);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
