// tb_line_splitter: splits directed and random lines into N segments, N
// given on nseg (1..NSEG; 0 and values above NSEG must act as NSEG), and
// checks that seg_pt[0] and seg_pt[N] are the endpoints, that every
// boundary k is the Bresenham pixel after ceil(k*L/N) steps, that boundaries
// past N repeat the last endpoint, that the segment lengths differ by at most
// one step, and that done comes 3*COORD_W + N + 4 clock edges after start
// whatever the length (N + 2 for a single pixel). The reference pixels come from replaying the
// Bresenham iteration, so the closed form of the splitter is checked against
// the step-by-step algorithm. Lines shorter than NSEG put several boundaries
// on one pixel.
module tb_line_splitter;
  import wu_pkg::*;
  import wu_ref_pkg::*;

  localparam int NSEG = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [$clog2(NSEG+1)-1:0] nseg = '0;
  coord_t x0 = '0, y0 = '0, x1 = '0, y1 = '0;
  logic busy, done;
  point_t seg_pt [NSEG+1];
  int checks = 0, failures = 0;

  line_splitter #(.NSEG(NSEG)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic split_n(int ax0, int ay0, int ax1, int ay1, int nin);
    int len, cyc, sk, exp_cyc, lo, hi, n;
    int prev;
    point_t r;
    len = bres_len(ax0, ay0, ax1, ay1);
    n = (nin == 0 || nin > NSEG) ? NSEG : nin;
    nseg = ($bits(nseg))'(nin);
    @(negedge clk);
    x0 = coord_t'(ax0); y0 = coord_t'(ay0); x1 = coord_t'(ax1); y1 = coord_t'(ay1);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;   // clock edges since the one that took start
    while (!done && cyc < 20000) begin @(negedge clk); cyc++; end
    nseg = '0;
    exp_cyc = (len == 0) ? n + 2 : 3 * COORD_W + n + 4;
    check(cyc == exp_cyc, $sformatf("(%0d,%0d)-(%0d,%0d)/%0d split time %0d exp %0d", ax0, ay0, ax1, ay1, n, cyc, exp_cyc));
    check(seg_pt[0].x == coord_t'(ax0) && seg_pt[0].y == coord_t'(ay0), "first endpoint");
    check(seg_pt[NSEG].x == coord_t'(ax1) && seg_pt[NSEG].y == coord_t'(ay1), "last endpoint");
    prev = 0;
    for (int k = 1; k <= NSEG; k++) begin
      sk = (k <= n) ? (k * len + n - 1) / n : len;
      r = bres_point(ax0, ay0, ax1, ay1, sk);
      if (k == 1) lo = sk; if (k == 1) hi = sk;
      if (k <= n && sk - prev < lo) lo = sk - prev;
      if (k <= n && sk - prev > hi) hi = sk - prev;
      prev = sk;
      check(seg_pt[k] == r, $sformatf("(%0d,%0d)-(%0d,%0d) boundary %0d got (%0d,%0d) exp (%0d,%0d)",
                                      ax0, ay0, ax1, ay1, k, seg_pt[k].x, seg_pt[k].y, r.x, r.y));
    end
    check(hi - lo <= 1, "segment lengths differ by more than one step");
    check(!busy, "busy after done");
  endtask

  task automatic split(int ax0, int ay0, int ax1, int ay1);
    split_n(ax0, ay0, ax1, ay1, NSEG);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    split(0, 0, 100, 37);
    split(300, 20, 20, 200);
    split(5, 5, 5, 105);
    split(0, 0, 4, 1);       // shorter than NSEG
    split(7, 7, 7, 7);       // a single pixel
    split(0, 0, 4095, 4095);
    split(4095, 0, 0, 4094);
    split(0, 4095, 1, 0);
    split(100, 100, 100, 91);  // 9 steps
    for (int t = 0; t < 200; t++)
      split($urandom_range(0, 4095), $urandom_range(0, 4095), $urandom_range(0, 4095), $urandom_range(0, 4095));
    for (int t = 0; t < 200; t++)
      split($urandom_range(0, 40), $urandom_range(0, 40), $urandom_range(0, 40), $urandom_range(0, 40));
    // fewer segments, and the out-of-range counts 0 and above NSEG
    split_n(0, 0, 480, 100, 1);
    split_n(0, 0, 480, 100, 0);
    split_n(0, 0, 480, 100, 15);
    split_n(9, 9, 9, 9, 3);
    for (int t = 0; t < 300; t++)
      split_n($urandom_range(0, 4095), $urandom_range(0, 4095), $urandom_range(0, 4095), $urandom_range(0, 4095),
              $urandom_range(0, 15));
    for (int t = 0; t < 100; t++)
      split_n($urandom_range(0, 20), $urandom_range(0, 20), $urandom_range(0, 20), $urandom_range(0, 20),
              $urandom_range(1, NSEG));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
