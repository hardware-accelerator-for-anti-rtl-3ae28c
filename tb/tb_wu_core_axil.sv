// tb_wu_core_axil: drives one Xiaolin core peripheral over AXI4-Lite as the
// host would: program the endpoints, set ap_start, wait for the interrupt,
// read CTRL (ap_done set, then cleared by the read), COUNT and STATUS, and read
// every result pair back against wu_ref_pkg, for whole-pixel and sub-pixel
// endpoints. Also checks the interrupt
// enables and the write-1-to-clear ISR, the splitter load port (ext_start),
// register read-back, the truncation flag when a line has more pairs than the
// memory (DEPTH is reduced to 64 for that), and the run time from ap_start to
// interrupt (FRAC_W + 2 + max(dx,1) core clocks plus the register stage).
// Response ready signals are delayed at random.
module tb_wu_core_axil;
  import wu_pkg::*;
  import wu_ref_pkg::*;

  localparam int DEPTH = 64;

  logic ap_clk = 1'b0, ap_rst_n = 1'b0;
  axil_req_t s_axi_req;
  axil_rsp_t s_axi_rsp;
  logic interrupt, ext_start, idle;
  point_t ext_p0, ext_p1;
  int checks = 0, failures = 0;

  wu_core_axil #(.DEPTH(DEPTH)) dut (.*);

  always #5 ap_clk = ~ap_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic axi_write(logic [15:0] addr, logic [31:0] data);
    s_axi_req.awaddr = addr; s_axi_req.awvalid = 1'b1;
    s_axi_req.wdata = data; s_axi_req.wstrb = 4'hF; s_axi_req.wvalid = 1'b1;
    do @(posedge ap_clk); while (!(s_axi_rsp.awready && s_axi_rsp.wready));
    @(negedge ap_clk);
    s_axi_req.awvalid = 1'b0; s_axi_req.wvalid = 1'b0;
    repeat ($urandom_range(0, 2)) @(negedge ap_clk);
    s_axi_req.bready = 1'b1;
    while (!s_axi_rsp.bvalid) @(negedge ap_clk);
    check(s_axi_rsp.bresp == AXI_OKAY, "bresp");
    @(negedge ap_clk);
    s_axi_req.bready = 1'b0;
  endtask

  task automatic axi_read(logic [15:0] addr, output logic [31:0] data);
    s_axi_req.araddr = addr; s_axi_req.arvalid = 1'b1;
    do @(posedge ap_clk); while (!s_axi_rsp.arready);
    @(negedge ap_clk);
    s_axi_req.arvalid = 1'b0;
    repeat ($urandom_range(0, 2)) @(negedge ap_clk);
    s_axi_req.rready = 1'b1;
    while (!s_axi_rsp.rvalid) @(negedge ap_clk);
    data = s_axi_rsp.rdata;
    @(negedge ap_clk);
    s_axi_req.rready = 1'b0;
  endtask

  task automatic check_results(int ax0, int ay0, int ax1, int ay1);  // units of 2^-SUB_W
    logic [31:0] d;
    int n, nstore;
    pixel_pair_t e;
    norm_t nm;
    nm = normalise_fx(ax0, ay0, ax1, ay1);
    n = npairs_fx(ax0, ay0, ax1, ay1);
    axi_read(REG_COUNT, d);
    check(d == 32'(n), $sformatf("COUNT %0d exp %0d", d, n));
    axi_read(REG_STATUS, d);
    check(d[0] == nm.steep, "STATUS steep");
    check(d[1] == (n > DEPTH), "STATUS truncated");
    nstore = (n > DEPTH) ? DEPTH : n;
    for (int k = 0; k < nstore; k++) begin
      e = pair_fx(ax0, ay0, ax1, ay1, k);
      axi_read(16'h8000 + 16'(8 * k), d);
      check(d == e.a, $sformatf("(%0d,%0d)-(%0d,%0d) pair %0d A %h exp %h", ax0, ay0, ax1, ay1, k, d, e.a));
      axi_read(16'h8000 + 16'(8 * k + 4), d);
      check(d == e.b, $sformatf("(%0d,%0d)-(%0d,%0d) pair %0d B %h exp %h", ax0, ay0, ax1, ay1, k, d, e.b));
    end
  endtask

  task automatic host_run_fx(int ax0, int ay0, int ax1, int ay1);  // units of 2^-SUB_W
    logic [31:0] d;
    int cyc, exp_cyc;
    norm_t nm;
    nm = normalise_fx(ax0, ay0, ax1, ay1);
    axi_write(REG_X0, 32'(ax0));
    axi_write(REG_Y0, 32'(ay0));
    axi_write(REG_X1, 32'(ax1));
    axi_write(REG_Y1, 32'(ay1));
    axi_read(REG_X1, d);
    check(d == 32'(ax1), "X1 read-back");
    // start: count from the clock edge that stores ap_start to the interrupt
    s_axi_req.awaddr = REG_CTRL; s_axi_req.awvalid = 1'b1;
    s_axi_req.wdata = 32'h1; s_axi_req.wstrb = 4'hF; s_axi_req.wvalid = 1'b1;
    s_axi_req.bready = 1'b1;
    @(negedge ap_clk);
    s_axi_req.awvalid = 1'b0; s_axi_req.wvalid = 1'b0;
    cyc = 0;
    while (!interrupt && cyc < 10000) begin @(negedge ap_clk); cyc++; end
    s_axi_req.bready = 1'b0;
    // ap_start edge, core start edge, core latency, ISR register
    exp_cyc = 1 + FRAC_W + 2 + ((nm.dx > 1) ? nm.dx : 1) + 1;
    check(cyc == exp_cyc, $sformatf("start-to-interrupt %0d exp %0d", cyc, exp_cyc));
    axi_read(REG_CTRL, d);
    check(d[1] == 1'b1 && d[2] == 1'b1, $sformatf("CTRL after run %h", d));
    axi_read(REG_CTRL, d);
    check(d[1] == 1'b0, "ap_done clear on read");
    check_results(ax0, ay0, ax1, ay1);
    axi_write(REG_ISR, 32'h1);
    check(!interrupt, "ISR write-1-to-clear");
  endtask

  task automatic host_run(int ax0, int ay0, int ax1, int ay1);          // whole pixels
    host_run_fx(ax0 << SUB_W, ay0 << SUB_W, ax1 << SUB_W, ay1 << SUB_W);
  endtask

  initial begin
    logic [31:0] d;
    s_axi_req = '0;
    ext_start = 1'b0; ext_p0 = '0; ext_p1 = '0;
    repeat (3) @(negedge ap_clk);
    ap_rst_n = 1'b1;
    @(negedge ap_clk);
    axi_read(REG_CTRL, d);
    check(d == 32'h4, "idle after reset");
    axi_write(REG_GIE, 32'h1);
    axi_write(REG_IER, 32'h1);
    host_run(0, 0, 6, 1);
    host_run(40, 10, 3, 30);
    host_run(12, 50, 20, 2);
    host_run(0, 0, 100, 20);             // 101 pairs > DEPTH: truncated
    for (int t = 0; t < 6; t++)
      host_run($urandom_range(0, 60), $urandom_range(0, 60), $urandom_range(0, 60), $urandom_range(0, 60));
    host_run_fx(36, 88, 156, 90);         // (2.25, 5.5) to (9.75, 5.625): sub-pixel endpoints
    for (int t = 0; t < 6; t++)
      host_run_fx($urandom_range(0, 960), $urandom_range(0, 960), $urandom_range(0, 960), $urandom_range(0, 960));
    // interrupt masked: ISR still records done, the line stays low
    axi_write(REG_IER, 32'h0);
    axi_write(REG_CTRL, 32'h1);
    repeat (60) @(negedge ap_clk);
    check(!interrupt, "masked interrupt");
    axi_read(REG_ISR, d);
    check(d[0] == 1'b1, "ISR set while masked");
    axi_write(REG_ISR, 32'h1);
    axi_write(REG_IER, 32'h1);
    // load from the splitter port
    @(negedge ap_clk);
    ext_p0 = '{x: 5, y: 9}; ext_p1 = '{x: 30, y: 1}; ext_start = 1'b1;
    @(negedge ap_clk);
    ext_start = 1'b0;
    check(!idle, "not idle after ext_start");
    while (!interrupt) @(negedge ap_clk);
    check(idle, "idle after run");
    check_results(5 << SUB_W, 9 << SUB_W, 30 << SUB_W, 1 << SUB_W);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge ap_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
