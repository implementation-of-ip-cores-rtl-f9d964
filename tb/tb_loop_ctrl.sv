// Self-checking testbench of loop_ctrl, the iteration counter.
//
// For N = 5 and for the default N = 1024 it checks that `step` is high for
// exactly N clock cycles after reset falls, that `idx` counts 0, 1, ... in
// those cycles, that `done` rises on the edge ending the N-th step and
// stays high, and that a reset in the middle of a run starts a fresh count.
module tb_loop_ctrl;
  localparam int unsigned NS = 5;
  localparam int unsigned NL = 1024;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rs, rl;
  logic ss, sl, ds, dl;
  logic [$clog2(NS+1)-1:0] is_;
  logic [$clog2(NL+1)-1:0] il;
  int checks = 0;
  int failures = 0;

  loop_ctrl #(.N(NS)) dut_s (.clk(clk), .reset(rs), .step(ss), .idx(is_), .done(ds));
  loop_ctrl #(.N(NL)) dut_l (.clk(clk), .reset(rl), .step(sl), .idx(il), .done(dl));

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    int steps;
    rs = 1'b1; rl = 1'b1;
    repeat (2) @(negedge clk);
    check(!ss && !ds && !sl && !dl, "idle during reset");

    // Small controller: watch every cycle.
    rs = 1'b0;
    #1;
    steps = 0;
    while (ss) begin
      check(int'(is_) == steps && !ds, $sformatf("idx %0d at step %0d", is_, steps));
      steps++;
      @(negedge clk);
    end
    check(steps == NS, $sformatf("%0d steps, expected %0d", steps, NS));
    check(ds, "done after the last step");
    repeat (4) @(negedge clk);
    check(ds && !ss, "done held");

    // Restart in the middle of a run.
    rs = 1'b1;
    @(negedge clk);
    rs = 1'b0;
    #1;
    repeat (2) @(negedge clk);
    rs = 1'b1;
    @(negedge clk);
    check(!ds && is_ == 0, "reset clears a run in progress");
    rs = 1'b0;
    #1;
    steps = 0;
    while (ss) begin steps++; @(negedge clk); end
    check(steps == NS && ds, "full count after restart");

    // Default-size controller.
    rl = 1'b0;
    #1;
    steps = 0;
    while (sl) begin
      if (int'(il) != steps) check(1'b0, "large idx sequence");
      steps++;
      @(negedge clk);
    end
    check(steps == NL && dl, $sformatf("%0d steps, expected %0d", steps, NL));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
