// tb_core_count_sweep: draws the same line on 1, 2, ... 10 cores of one
// default-size accelerator (line_ncores = 1..10) and measures the time from
// line_start to line_done for each, to show how the run time falls with the
// core count. The published system reports 3100 ns with one core and about
// 3100/N ns with N cores at 156.25 MHz; the line length used there is not
// given, so a 480-step line is used, which is about that one-core time at
// one pair per clock.
//
// For each core count N the testbench checks: the run time equals the split
// time (3*COORD_W + N + 4) + FRAC_W + 5 + the longest segment's length, where
// the segment boundaries are the Bresenham pixels after ceil(k*L/N) steps;
// exactly the cores below N raise ap_done; every used core's COUNT, read over
// its AXI4-Lite port, is its segment length plus one; the counts add up to
// L + N (neighbouring segments share a pixel); and the run time does not grow
// with N. The measured times are printed next to the published 3100/N ns.
module tb_core_count_sweep;
  import wu_pkg::*;
  import wu_ref_pkg::*;

  localparam int NC = 10;
  localparam int X0 = 20, Y0 = 10, X1 = 500, Y1 = 290;   // 480 steps

  logic ap_clk = 1'b0, ap_rst_n = 1'b0;
  logic line_start = 1'b0, line_busy, line_done;
  point_t line_p0, line_p1;
  logic [$clog2(NC+1)-1:0] line_ncores = '0;
  axil_req_t s_axi_req [NC];
  axil_rsp_t s_axi_rsp [NC];
  logic [NC-1:0] interrupt;
  int cyc_of [NC+1];
  int checks = 0, failures = 0;

  assign line_p0 = '{x: coord_t'(X0), y: coord_t'(Y0)};
  assign line_p1 = '{x: coord_t'(X1), y: coord_t'(Y1)};

  wu_accel_top dut (.*);

  always #5 ap_clk = ~ap_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
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

  // segment k of a line of len steps cut into n pieces, in steps
  function automatic int seg_len(int len, int n, int k);
    return ((k + 1) * len + n - 1) / n - (k * len + n - 1) / n;
  endfunction

  initial begin
    int len, dmax, exp_cyc, cyc, sum;
    logic [31:0] d;
    for (int c = 0; c < NC; c++) s_axi_req[c] = '0;
    repeat (3) @(negedge ap_clk);
    ap_rst_n = 1'b1;
    @(negedge ap_clk);
    len = bres_len(X0, Y0, X1, Y1);
    check(len == 480, "test line is 480 steps");
    for (int n = 1; n <= NC; n++) begin
      line_ncores = ($bits(line_ncores))'(n);
      line_start = 1'b1;
      @(negedge ap_clk);
      line_start = 1'b0;
      cyc = 0;
      while (!line_done && cyc < 10000) begin @(negedge ap_clk); cyc++; end
      cyc_of[n] = cyc;
      dmax = 1;
      for (int k = 0; k < n; k++) if (seg_len(len, n, k) > dmax) dmax = seg_len(len, n, k);
      exp_cyc = (3 * COORD_W + n + 4) + FRAC_W + 5 + dmax;
      check(cyc == exp_cyc, $sformatf("%0d cores: %0d clocks, exp %0d", n, cyc, exp_cyc));
      // interrupts are disabled; ap_done in CTRL shows which cores ran (the read clears it)
      sum = 0;
      for (int c = 0; c < NC; c++) begin
        axi_read(c, REG_CTRL, d);
        check(d[1] == (c < n), $sformatf("%0d cores: core %0d ap_done %0d", n, c, d[1]));
        if (c < n) begin
          axi_read(c, REG_COUNT, d);
          check(d == 32'((seg_len(len, n, c) > 1) ? seg_len(len, n, c) + 1 : 2),
                $sformatf("%0d cores: core %0d COUNT %0d", n, c, d));
          sum += int'(d);
        end
      end
      check(sum == len + n, $sformatf("%0d cores: pairs in all %0d exp %0d", n, sum, len + n));
      if (n > 1) check(cyc_of[n] <= cyc_of[n-1], $sformatf("%0d cores not slower than %0d", n, n - 1));
    end
    check(2 * cyc_of[NC] < cyc_of[1], "10 cores at least twice as fast as one");
    $display("cores  clocks  ns at 156.25 MHz  published ns");
    for (int n = 1; n <= NC; n++)
      $display("%5d  %6d  %16.1f  %12.1f", n, cyc_of[n], real'(cyc_of[n]) * 6.4, 3100.0 / n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge ap_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
