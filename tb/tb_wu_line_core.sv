// tb_wu_line_core: self-checking test of the Wu line core.
//
// Runs directed lines (the 7-pixel example line (0,0)-(6,1), horizontal,
// vertical, 45-degree, steep, reversed, a single point), random lines, and
// lines with sub-pixel endpoints (one worked by hand: end-pixel coverage 0.25).
// Every emitted pair is compared with wu_ref_pkg, the index sequence and the
// pair count are checked, the two shares of every interior pair must add up
// to INT_MAX, and the clock count from start to done must be
// FRAC_W + 2 + max(xend2 - xend1, 1).
module tb_wu_line_core;
  import wu_pkg::*;
  import wu_ref_pkg::*;

  localparam int IDX_W = COORD_W + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  fxcoord_t x0, y0, x1, y1;
  logic busy, done, steep, out_valid;
  logic [IDX_W-1:0] count, out_idx;
  pixel_pair_t out_pair;

  int checks = 0, failures = 0;

  wu_line_core dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // endpoints in units of 2^-SUB_W
  task automatic run_line_fx(int ax0, int ay0, int ax1, int ay1);
    int n, seen, cyc, exp_cyc;
    norm_t nm;
    pixel_pair_t e;
    nm = normalise_fx(ax0, ay0, ax1, ay1);
    n = npairs_fx(ax0, ay0, ax1, ay1);
    exp_cyc = FRAC_W + 2 + ((nm.dx > 1) ? nm.dx : 1);
    @(negedge clk);
    x0 = fxcoord_t'(ax0); y0 = fxcoord_t'(ay0); x1 = fxcoord_t'(ax1); y1 = fxcoord_t'(ay1);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    seen = 0;
    cyc = 0;   // clock edges since the one that took start
    while (!done) begin
      if (out_valid) begin
        e = pair_fx(ax0, ay0, ax1, ay1, seen);
        check(out_idx == IDX_W'(seen), $sformatf("line (%0d,%0d)-(%0d,%0d) idx %0d got %0d", ax0, ay0, ax1, ay1, seen, out_idx));
        check(out_pair == e, $sformatf("line (%0d,%0d)-(%0d,%0d) pair %0d got %h exp %h",
                                       ax0, ay0, ax1, ay1, seen, out_pair, e));
        if (seen >= 2)
          check(int'(out_pair.a.i) + int'(out_pair.b.i) == INT_MAX, "pair intensities do not sum to INT_MAX");
        seen++;
      end
      @(negedge clk);
      cyc++;
      if (cyc > 10000) break;
    end
    check(seen == n, $sformatf("line (%0d,%0d)-(%0d,%0d) pairs %0d exp %0d", ax0, ay0, ax1, ay1, seen, n));
    check(count == IDX_W'(n), "count output");
    check(steep == nm.steep, "steep flag");
    check(cyc == exp_cyc, $sformatf("line (%0d,%0d)-(%0d,%0d) latency %0d exp %0d", ax0, ay0, ax1, ay1, cyc, exp_cyc));
    @(negedge clk);
    check(!busy, "busy after done");
  endtask

  task automatic run_line(int ax0, int ay0, int ax1, int ay1);
    run_line_fx(ax0 << SUB_W, ay0 << SUB_W, ax1 << SUB_W, ay1 << SUB_W);
  endtask

  // Sub-pixel endpoints: a horizontal line from x = 2.25 to x = 9.75 at
  // y = 5.5 covers 0.75 of its first and last pixel, and lies half way between
  // rows 5 and 6.
  task automatic subpixel_check();
    int ia[2], ib[2], xa[2];
    @(negedge clk);
    x0 = fxcoord_t'(36); y0 = fxcoord_t'(88); x1 = fxcoord_t'(156); y1 = fxcoord_t'(88);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      if (out_valid && out_idx < 2) begin
        ia[out_idx] = out_pair.a.i; ib[out_idx] = out_pair.b.i; xa[out_idx] = out_pair.a.x;
      end
      @(negedge clk);
    end
    check(xa[0] == 2 && xa[1] == 10, $sformatf("end pixels %0d, %0d", xa[0], xa[1]));
    // first end: xgap = 1 - fpart(2.75) = 0.25; last: fpart(10.25) = 0.25
    check(ia[0] == (127 * 4) / 16 && ib[0] == (128 * 4) / 16, $sformatf("first end %0d/%0d", ia[0], ib[0]));
    check(ia[1] == (127 * 4) / 16 && ib[1] == (128 * 4) / 16, $sformatf("last end %0d/%0d", ia[1], ib[1]));
    check(count == 9, "pairs of the sub-pixel line");
  endtask

  // The example line of the document: at x = 3 the line passes exactly half
  // way between the two pixels, so both get (nearly) half the intensity.
  task automatic half_way_check();
    int got_a = -1, got_b = -1;
    @(negedge clk);
    x0 = 0; y0 = 0; x1 = fxcoord_t'(6 << SUB_W); y1 = fxcoord_t'(1 << SUB_W);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      if (out_valid && out_idx == IDX_W'(4)) begin   // interior step x = 3
        got_a = out_pair.a.i;
        got_b = out_pair.b.i;
        check(out_pair.a.x == 3 && out_pair.a.y == 0 && out_pair.b.y == 1, "x=3 pixel positions");
      end
      @(negedge clk);
    end
    check(got_a >= 0 && (got_a - got_b <= 2) && (got_b - got_a <= 2),
          $sformatf("x=3 split %0d/%0d is not half/half", got_a, got_b));
  endtask

  initial begin
    x0 = '0; y0 = '0; x1 = '0; y1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    half_way_check();
    run_line(0, 0, 6, 1);
    run_line(10, 20, 50, 20);      // horizontal
    run_line(7, 3, 7, 40);         // vertical (steep)
    run_line(5, 5, 25, 25);        // 45 degrees, gradient exactly 1
    run_line(30, 10, 2, 17);       // reversed
    run_line(100, 4, 90, 60);      // steep, reversed in y
    run_line(9, 9, 9, 9);          // single point
    run_line(3, 3, 4, 3);          // dx = 1
    run_line(0, 4095, 4094, 0);    // long, full range
    subpixel_check();
    run_line_fx(36, 88, 156, 88);
    run_line_fx(37, 90, 40, 91);   // shorter than a pixel
    run_line_fx(8, 8, 8, 8);       // a point half way between pixels
    for (int t = 0; t < 60; t++)
      run_line_fx($urandom_range(16, 4000), $urandom_range(16, 4000), $urandom_range(16, 4000), $urandom_range(16, 4000));
    for (int t = 0; t < 40; t++)
      run_line($urandom_range(0, 300), $urandom_range(0, 300), $urandom_range(0, 300), $urandom_range(0, 300));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
