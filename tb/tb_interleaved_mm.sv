// Self-checking testbench of interleaved_mm (standard interleaved multiplier).
//
// Two instances run side by side: a 16-bit one for the worked example of
// the published cores (X = 234, Y = 167, M = 293, expected P = 109) and a
// 64-bit one for edge cases and random operands.  Each result is compared
// with a reference formed here with wide integer arithmetic:
// P must equal X * Y mod M.  The latency from the fall of reset to done must be exactly N
// clock cycles, the result must stay stable while done is high, and a
// reset in the middle of an operation must restart it cleanly.
module tb_interleaved_mm;
  localparam int unsigned NA = 16;
  localparam int unsigned NB = 64;
  localparam int unsigned NRAND = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          ra, rb;
  logic [NA-1:0] xa, ya, ma, pa;
  logic [NB-1:0] xb, yb, mb, pb;
  logic          da, db;

  interleaved_mm #(.N(NA)) dut_a (.clk(clk), .reset(ra), .x(xa), .y(ya), .m(ma), .p(pa), .done(da));
  interleaved_mm #(.N(NB)) dut_b (.clk(clk), .reset(rb), .x(xb), .y(yb), .m(mb), .p(pb), .done(db));

  initial begin
    repeat (400000) @(posedge clk);
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

  // Reference: is p the right answer for x, y, m at width n?
  function automatic bit ref_ok(logic [NB-1:0] x, logic [NB-1:0] y,
                                logic [NB-1:0] m, logic [NB-1:0] p, int n);
    logic [3*NB:0] xy, pr, mm;
    mm = (3*NB+1)'(m);
    xy = ((3*NB+1)'(x) * (3*NB+1)'(y)) % mm;
    if (p >= m) return 1'b0;
    // Interleaved: p must equal x * y mod m.
    pr = (3*NB+1)'(p);
    return (pr == xy) && (n > 0);
  endfunction

  task automatic run_a(input logic [NA-1:0] x, y, m, output logic [NA-1:0] p,
                       output int cyc);
    @(negedge clk);
    xa = x; ya = y; ma = m; ra = 1'b1;
    @(negedge clk);
    ra = 1'b0;
    cyc = 0;
    while (!da && cyc < 4 * NA) begin
      @(negedge clk);
      cyc++;
    end
    p = pa;
  endtask

  task automatic run_b(input logic [NB-1:0] x, y, m, output logic [NB-1:0] p,
                       output int cyc);
    @(negedge clk);
    xb = x; yb = y; mb = m; rb = 1'b1;
    @(negedge clk);
    rb = 1'b0;
    cyc = 0;
    while (!db && cyc < 4 * NB) begin
      @(negedge clk);
      cyc++;
    end
    p = pb;
  endtask

  task automatic test_b(input logic [NB-1:0] x, y, m);
    logic [NB-1:0] p;
    int cyc;
    run_b(x, y, m, p, cyc);
    check(cyc == NB, $sformatf("64-bit latency %0d, expected %0d", cyc, NB));
    check(ref_ok(x, y, m, p, NB),
          $sformatf("64-bit x=%h y=%h m=%h p=%h", x, y, m, p));
  endtask

  function automatic logic [NB-1:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    logic [NA-1:0] p16, hold16;
    logic [NB-1:0] m, x, y;
    int cyc;
    ra = 1'b1; rb = 1'b1;
    xa = '0; ya = '0; ma = 16'd1;
    xb = '0; yb = '0; mb = 64'd1;
    repeat (3) @(negedge clk);

    // Worked example of the published cores.
    run_a(16'd234, 16'd167, 16'd293, p16, cyc);
    check(p16 == 16'd109, $sformatf("worked example gave %0d, expected 109", p16));
    check(cyc == NA, $sformatf("16-bit latency %0d, expected %0d", cyc, NA));
    hold16 = pa;
    repeat (5) @(negedge clk);
    check(da && pa == hold16, "result not held while done");

    // Restart: reset in the middle of an operation.
    @(negedge clk);
    xa = 16'd200; ya = 16'd100; ma = 16'd293; ra = 1'b1;
    @(negedge clk);
    ra = 1'b0;
    repeat (NA / 2) @(negedge clk);
    run_a(16'd234, 16'd167, 16'd293, p16, cyc);
    check(p16 == 16'd109 && cyc == NA, "restart in the middle of an operation");

    // Edge cases at 64 bits.
    test_b(64'd0, 64'd5, 64'd7);
    test_b(64'd2, 64'd2, 64'd3);
    test_b(64'd6, 64'd6, 64'd7);
    m = {1'b1, 62'h0, 1'b1};
    test_b(m - 1, m - 1, m);
    m = '1;
    test_b(m - 1, m - 1, m);
    test_b(m - 1, 64'd1, m);

    // Random operands: full-size and short odd moduli.
    for (int i = 0; i < NRAND; i++) begin
      m = rnd64();
      if (i % 3 == 1) m = m >> ($urandom % 60);
      m = m | 64'd1;
      if (m < 64'd3) m = 64'd3;
      x = rnd64() % m;
      y = rnd64() % m;
      test_b(x, y, m);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
