// Operand-length sweep of the three multiplier cores.
//
// For each of the operand lengths 64, 128, 160, 256, 512, 1024 and 2048
// bits, one instance of each core is built at that width and performs one
// full modular multiplication X * Y mod M on random operands with an odd,
// full-length modulus: two passes on each Montgomery core (conversion with
// 2^2N mod M, then the product) and one pass on the interleaved core.
// Results are compared with X * Y mod M formed here limb by limb (Horner's
// rule on 32-bit limbs of Y, each step reduced with the % operator), and
// every pass must take exactly N clock cycles.
module tb_modmul_widths;
  localparam int NW = 7;
  localparam int WIDTHS [NW] = '{64, 128, 160, 256, 512, 1024, 2048};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int finished = 0;

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

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int unsigned N = WIDTHS[g];
    typedef logic [N-1:0] word_t;

    logic  fr, sr, ir, fd, sd, id;
    word_t fx, fy, sx, sy, ix, iy, m, fp, sp, ip;

    mont_fast      #(.N(N)) u_fast (.clk(clk), .reset(fr), .x(fx), .y(fy), .m(m), .p(fp), .done(fd));
    mont_std       #(.N(N)) u_std  (.clk(clk), .reset(sr), .x(sx), .y(sy), .m(m), .p(sp), .done(sd));
    interleaved_mm #(.N(N)) u_il   (.clk(clk), .reset(ir), .x(ix), .y(iy), .m(m), .p(ip), .done(id));

    function automatic word_t rnd();
      word_t w;
      for (int k = 0; k < (N + 31) / 32; k++) w[k*32 +: 32] = 32'($urandom);
      return w;
    endfunction

    // X * Y mod M, one 32-bit limb of Y at a time.
    function automatic word_t mulmod(word_t a, word_t b);
      logic [N+33:0] acc = '0;
      for (int k = (N + 31) / 32 - 1; k >= 0; k--)
        acc = ((acc << 32) + (N+34)'(a) * (N+34)'(b[k*32 +: 32])) % (N+34)'(m);
      return word_t'(acc);
    endfunction

    // 2^(2N) mod M.
    function automatic word_t r2mod();
      logic [N+33:0] acc;
      acc = ((N+34)'(1) << N) % (N+34)'(m);
      for (int k = 0; k < N / 32; k++) acc = (acc << 32) % (N+34)'(m);
      return word_t'(acc);
    endfunction

    initial begin
      word_t x, y, r2, want;
      int cyc;
      m = rnd();
      m[N-1] = 1'b1;
      m[0] = 1'b1;
      x = rnd() % m;
      y = rnd() % m;
      want = mulmod(x, y);
      r2 = r2mod();

      fr = 1'b1; sr = 1'b1; ir = 1'b1;
      fx = x; fy = r2; sx = x; sy = r2; ix = x; iy = y;
      repeat (2) @(negedge clk);
      fr = 1'b0; sr = 1'b0; ir = 1'b0;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!fd);
      check(cyc == N && sd && id, $sformatf("N=%0d: first pass took %0d cycles", N, cyc));
      check(ip == want, $sformatf("N=%0d: interleaved core", N));

      fx = fp; fy = y; fr = 1'b1;
      sx = sp; sy = y; sr = 1'b1;
      @(negedge clk);
      fr = 1'b0; sr = 1'b0;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!fd);
      check(cyc == N && sd, $sformatf("N=%0d: second pass took %0d cycles", N, cyc));
      check(fp == want, $sformatf("N=%0d: faster Montgomery core", N));
      check(sp == want, $sformatf("N=%0d: standard Montgomery core", N));
      finished++;
    end
  end

  initial begin
    wait (finished == NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
