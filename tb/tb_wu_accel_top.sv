// tb_wu_accel_top: end-to-end test of the multi-core accelerator at its
// default size (10 cores, 1024 pairs per core).
//
// Parallel runs: a line is given on the line port; after line_done every
// core's interrupt must be up, and each core's COUNT and pixel pairs (read
// over that core's AXI4-Lite port) must equal the Wu reference for its
// segment, whose endpoints are the Bresenham pixels after ceil(k*L/10) steps.
// The run time must be the split time (3*COORD_W + NCORES + 4, or NCORES + 2
// for a one-pixel line) + FRAC_W + 5 + the longest segment's max(dx,1)
// clocks, independent of the line length except through the segment length. Host runs: one core is programmed over AXI4-Lite with a
// whole line, as in the single-core system, and its time is compared with
// the parallel run of the same line. Mechanisms counted, each must occur:
// parallel split runs, host-programmed runs, runs with sub-pixel endpoints, steep segments, single-point
// segments (line shorter than the core count), truncation of a result longer
// than the memory, a line_start ignored while busy, interrupts. A fan of
// twelve equal-length lines at 30-degree steps covers every octant. Runs on
// fewer cores (line_ncores = 1..9) must leave the other cores untouched.
module tb_wu_accel_top;
  import wu_pkg::*;
  import wu_ref_pkg::*;

  localparam int NC = 10;

  logic ap_clk = 1'b0, ap_rst_n = 1'b0;
  logic line_start = 1'b0, line_busy, line_done;
  point_t line_p0 = '0, line_p1 = '0;
  logic [$clog2(NC+1)-1:0] line_ncores = '0;   // 0: all cores
  axil_req_t s_axi_req [NC];
  axil_rsp_t s_axi_rsp [NC];
  logic [NC-1:0] interrupt;

  int checks = 0, failures = 0;
  int n_fewer = 0, n_subpix = 0, n_split = 0, n_host = 0, n_steep = 0, n_point = 0, n_trunc = 0, n_ignored = 0, n_irq = 0;
  int t_parallel = 0, t_single = 0, n_fan = 0;
  // 600*cos and 600*sin of 0, 30, ... 330 degrees, rounded
  localparam int fan_dx [12] = '{600, 520, 300, 0, -300, -520, -600, -520, -300, 0, 300, 520};
  localparam int fan_dy [12] = '{0, 300, 520, 600, 520, 300, 0, -300, -520, -600, -520, -300};

  wu_accel_top dut (.*);

  always #5 ap_clk = ~ap_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic axi_write(int c, logic [15:0] addr, logic [31:0] data);
    s_axi_req[c].awaddr = addr; s_axi_req[c].awvalid = 1'b1;
    s_axi_req[c].wdata = data; s_axi_req[c].wstrb = 4'hF; s_axi_req[c].wvalid = 1'b1;
    s_axi_req[c].bready = 1'b1;
    do @(posedge ap_clk); while (!s_axi_rsp[c].awready);
    @(negedge ap_clk);
    s_axi_req[c].awvalid = 1'b0; s_axi_req[c].wvalid = 1'b0;
    while (!s_axi_rsp[c].bvalid) @(negedge ap_clk);
    @(negedge ap_clk);
    s_axi_req[c].bready = 1'b0;
  endtask

  task automatic axi_read(int c, logic [15:0] addr, output logic [31:0] data);
    s_axi_req[c].araddr = addr; s_axi_req[c].arvalid = 1'b1; s_axi_req[c].rready = 1'b1;
    do @(posedge ap_clk); while (!s_axi_rsp[c].arready);
    @(negedge ap_clk);
    s_axi_req[c].arvalid = 1'b0;
    while (!s_axi_rsp[c].rvalid) @(negedge ap_clk);
    data = s_axi_rsp[c].rdata;
    @(negedge ap_clk);
    s_axi_req[c].rready = 1'b0;
  endtask

  // compare the pairs of core c with the reference for segment (a)-(b)
  task automatic check_core(int c, point_t a, point_t b, int full_x0, int full_y0, int full_x1, int full_y1);
    logic [31:0] d;
    int n, nstore;
    pixel_pair_t e;
    norm_t nm;
    nm = normalise(a.x, a.y, b.x, b.y);
    n = npairs(a.x, a.y, b.x, b.y);
    axi_read(c, REG_COUNT, d);
    check(d == 32'(n), $sformatf("core %0d COUNT %0d exp %0d", c, d, n));
    axi_read(c, REG_STATUS, d);
    check(d[0] == nm.steep, "STATUS steep");
    check(d[1] == (n > 1024), "STATUS truncated");
    if (d[1]) n_trunc++;
    if (nm.steep) n_steep++;
    if (nm.dx == 0) n_point++;
    nstore = (n > 1024) ? 1024 : n;
    for (int k = 0; k < nstore; k++) begin
      e = pair(a.x, a.y, b.x, b.y, k);
      axi_read(c, 16'h8000 + 16'(8 * k), d);
      check(d == e.a, $sformatf("line (%0d,%0d)-(%0d,%0d) core %0d pair %0d A %h exp %h",
                                full_x0, full_y0, full_x1, full_y1, c, k, d, e.a));
      axi_read(c, 16'h8000 + 16'(8 * k + 4), d);
      check(d == e.b, $sformatf("core %0d pair %0d B", c, k));
    end
  endtask

  task automatic parallel_run_n(int x0, int y0, int x1, int y1, int nin);
    int len, cyc, exp_cyc, dmax, sk0, sk1, n;
    logic [NC-1:0] used;
    point_t bp [NC+1];
    norm_t nm;
    logic [31:0] d;
    len = bres_len(x0, y0, x1, y1);
    n = (nin == 0 || nin > NC) ? NC : nin;
    for (int c = 0; c < NC; c++) used[c] = c < n;
    dmax = 1;
    for (int k = 0; k <= n; k++) bp[k] = bres_point(x0, y0, x1, y1, (k * len + n - 1) / n);
    for (int k = 0; k < n; k++) begin
      nm = normalise(bp[k].x, bp[k].y, bp[k+1].x, bp[k+1].y);
      if (nm.dx > dmax) dmax = nm.dx;
    end
    exp_cyc = ((len == 0) ? n + 2 : 3 * COORD_W + n + 4) + FRAC_W + 5 + dmax;
    @(negedge ap_clk);
    line_p0 = '{x: coord_t'(x0), y: coord_t'(y0)};
    line_p1 = '{x: coord_t'(x1), y: coord_t'(y1)};
    line_ncores = ($bits(line_ncores))'(nin);
    line_start = 1'b1;
    @(negedge ap_clk);
    line_start = 1'b0;
    line_ncores = '0;
    cyc = 0;
    while (!line_done && cyc < 100000) begin
      @(negedge ap_clk);
      cyc++;
      if (cyc == 5) begin
        // a second request while busy must be ignored
        line_p0 = '0; line_p1 = '{x: 3, y: 3};
        line_start = 1'b1;
        @(negedge ap_clk);
        cyc++;
        line_start = 1'b0;
        if (!line_done) n_ignored++;
      end
    end
    check(cyc == exp_cyc, $sformatf("line (%0d,%0d)-(%0d,%0d) on %0d cores: time %0d exp %0d", x0, y0, x1, y1, n, cyc, exp_cyc));
    t_parallel = cyc;
    @(negedge ap_clk);
    check(interrupt == used, $sformatf("interrupts %b after line_done, exp %b", interrupt, used));
    if (interrupt == used) n_irq++;
    if (n < NC) n_fewer++;
    for (int c = n; c < NC; c++) begin
      axi_read(c, REG_ISR, d);
      check(!d[0], $sformatf("core %0d not used by a %0d-core run", c, n));
    end
    for (int c = 0; c < n; c++) begin
      check_core(c, bp[c], bp[c+1], x0, y0, x1, y1);
      axi_read(c, REG_CTRL, d);
      check(d[1] && d[2], "ap_done and ap_idle after run");
      axi_write(c, REG_ISR, 32'h1);
    end
    check(interrupt == '0, "interrupts cleared");
    check(!line_busy, "line_busy after done");
    n_split++;
  endtask

  task automatic parallel_run(int x0, int y0, int x1, int y1);
    parallel_run_n(x0, y0, x1, y1, NC);
  endtask

  task automatic host_run(int c, int x0, int y0, int x1, int y1);
    int cyc;
    axi_write(c, REG_X0, 32'(x0 << SUB_W));
    axi_write(c, REG_Y0, 32'(y0 << SUB_W));
    axi_write(c, REG_X1, 32'(x1 << SUB_W));
    axi_write(c, REG_Y1, 32'(y1 << SUB_W));
    s_axi_req[c].awaddr = REG_CTRL; s_axi_req[c].awvalid = 1'b1;
    s_axi_req[c].wdata = 32'h1; s_axi_req[c].wstrb = 4'hF; s_axi_req[c].wvalid = 1'b1;
    s_axi_req[c].bready = 1'b1;
    @(negedge ap_clk);
    s_axi_req[c].awvalid = 1'b0; s_axi_req[c].wvalid = 1'b0;
    cyc = 0;
    while (!interrupt[c] && cyc < 100000) begin @(negedge ap_clk); cyc++; end
    s_axi_req[c].bready = 1'b0;
    check(interrupt == NC'(1) << c, "only the programmed core interrupts");
    if (interrupt[c]) n_irq++;
    t_single = cyc;
    check_core(c, '{x: coord_t'(x0), y: coord_t'(y0)}, '{x: coord_t'(x1), y: coord_t'(y1)}, x0, y0, x1, y1);
    axi_write(c, REG_ISR, 32'h1);
    n_host++;
  endtask

  // host run with sub-pixel endpoints, in units of 2^-SUB_W
  task automatic host_run_fx(int c, int x0, int y0, int x1, int y1);
    logic [31:0] d;
    int n;
    pixel_pair_t e;
    axi_write(c, REG_X0, 32'(x0));
    axi_write(c, REG_Y0, 32'(y0));
    axi_write(c, REG_X1, 32'(x1));
    axi_write(c, REG_Y1, 32'(y1));
    axi_write(c, REG_CTRL, 32'h1);
    while (!interrupt[c]) @(negedge ap_clk);
    n = npairs_fx(x0, y0, x1, y1);
    axi_read(c, REG_COUNT, d);
    check(d == 32'(n), $sformatf("sub-pixel run COUNT %0d exp %0d", d, n));
    for (int k = 0; k < n; k++) begin
      e = pair_fx(x0, y0, x1, y1, k);
      axi_read(c, 16'h8000 + 16'(8 * k), d);
      check(d == e.a, $sformatf("sub-pixel pair %0d A %h exp %h", k, d, e.a));
      axi_read(c, 16'h8000 + 16'(8 * k + 4), d);
      check(d == e.b, $sformatf("sub-pixel pair %0d B", k));
    end
    axi_write(c, REG_ISR, 32'h1);
    n_subpix++;
  endtask

  initial begin
    for (int c = 0; c < NC; c++) s_axi_req[c] = '0;
    repeat (3) @(negedge ap_clk);
    ap_rst_n = 1'b1;
    @(negedge ap_clk);
    for (int c = 0; c < NC; c++) begin
      axi_write(c, REG_GIE, 32'h1);
      axi_write(c, REG_IER, 32'h1);
    end
    // the same line drawn by 10 cores and by one core
    parallel_run(20, 10, 500, 290);
    host_run(0, 20, 10, 500, 290);
    $display("line of 480 steps: 10 cores %0d clocks, 1 core %0d clocks", t_parallel, t_single);
    check(t_single > 4 * t_parallel, "10 cores at least 4x faster than one core on a 480-step line");
    parallel_run(300, 40, 120, 700);      // steep, reversed
    parallel_run(4000, 3, 10, 4090);      // long diagonal-ish
    parallel_run(50, 50, 54, 51);         // shorter than the core count
    parallel_run(77, 77, 77, 77);         // one pixel
    host_run(7, 0, 100, 1500, 900);       // 1501 pairs: more than one memory holds
    host_run_fx(2, 164, 56, 3212, 1234);  // (10.25, 3.5) to (200.75, 77.125)
    host_run_fx(5, 999, 2001, 950, 40);   // steep, reversed, fractional
    // a fan of twelve 600-pixel lines from one centre, 30 degrees apart
    for (int a = 0; a < 12; a++) begin
      parallel_run(2048, 2048, 2048 + fan_dx[a], 2048 + fan_dy[a]);
      n_fan++;
    end
    // the same line on fewer cores; 0 and 15 select all ten
    parallel_run_n(20, 10, 500, 290, 1);
    parallel_run_n(20, 10, 500, 290, 4);
    parallel_run_n(600, 3000, 100, 2900, 7);
    parallel_run_n(50, 50, 54, 51, 3);
    parallel_run_n(10, 10, 300, 30, 0);
    parallel_run_n(10, 10, 300, 30, 15);
    for (int t = 0; t < 3; t++)
      parallel_run($urandom_range(0, 4095), $urandom_range(0, 4095), $urandom_range(0, 4095), $urandom_range(0, 4095));
    $display("mechanisms: fewer=%0d fan=%0d subpix=%0d split=%0d host=%0d steep=%0d point=%0d trunc=%0d ignored=%0d irq=%0d",
             n_fewer, n_fan, n_subpix, n_split, n_host, n_steep, n_point, n_trunc, n_ignored, n_irq);
    check(n_split > 0, "parallel split run happened");
    check(n_host > 0, "host-programmed run happened");
    check(n_subpix > 0, "sub-pixel endpoint run happened");
    check(n_fan == 12, "fan of lines drawn");
    check(n_fewer > 0, "run on fewer cores happened");
    check(n_steep > 0, "steep segment happened");
    check(n_point > 0, "single-point segment happened");
    check(n_trunc > 0, "truncation happened");
    check(n_ignored > 0, "ignored line_start happened");
    check(n_irq > 0, "interrupt happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge ap_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
