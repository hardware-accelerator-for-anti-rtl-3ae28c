// wu_accel_top: multi-core accelerator for anti-aliased (Wu) lines.
//
// Drawing a long line with Wu's algorithm takes one clock per pixel pair, so
// the time grows with the line length. This accelerator cuts the line into
// NCORES equal-length pieces along its Bresenham path and draws all pieces at
// once, each on its own Wu line core with its own result memory; the run time
// falls roughly as 1/NCORES.
//
// Parts: line_splitter (segment endpoints on the Bresenham line), NCORES
// wu_core_axil peripherals (Wu core + result RAM + AXI4-Lite slave + interrupt)
// and a small dispatcher. Two ways to run:
//   * line port: pulse line_start with line_p0/line_p1 and line_ncores (how
//     many cores to use, N = 1..NCORES; 0 or more than NCORES mean NCORES)
//     while line_busy is low. The splitter finds the N+1 boundary pixels,
//     then in one clock each core k < N is loaded with boundary k and k+1 and
//     started. line_done pulses when those cores are idle again; the host
//     then reads each core's pairs over its AXI4-Lite port. Cores k >= N are
//     not touched and stay free for the host port.
//   * host port: a host programs any core directly over its AXI4-Lite port
//     (endpoints, ap_start) and waits for its interrupt, as with a single core.
// One AXI4-Lite slave port and one interrupt per core are brought out; in the
// document's system they are joined to the processor by an AXI interconnect.
//
// Timing, for a line of major-axis length L > 0 on N cores: line_done is high
// (3*COORD_W + N + 4) + FRAC_W + 5 + ceil(L/N) clock edges after the edge
// that takes line_start: the split (independent of L), the slowest core, and
// three clocks of hand-over (load, start, done-to-idle).
//
// The core count (10), the use of up to that many cores per line, one core
// and one block memory per segment, and the AXI4-Lite control follow the
// document. The document splits the line in
// processor software; here the same split is also available in logic through
// the line port.
module wu_accel_top
  import wu_pkg::*;
#(
  parameter int unsigned NCORES = 10,
  parameter int unsigned DEPTH  = 1024,
  localparam int unsigned N_W   = $clog2(NCORES + 1)
) (
  input  logic      ap_clk,
  input  logic      ap_rst_n,
  // line port
  input  logic      line_start,
  input  point_t    line_p0,
  input  point_t    line_p1,
  input  logic [N_W-1:0] line_ncores,
  output logic      line_busy,
  output logic      line_done,
  // one AXI4-Lite slave and one interrupt per core
  input  axil_req_t s_axi_req [NCORES],
  output axil_rsp_t s_axi_rsp [NCORES],
  output logic [NCORES-1:0] interrupt
);

  typedef enum logic [1:0] {D_IDLE, D_SPLIT, D_RUN} dstate_t;
  dstate_t dstate;

  logic               sp_busy, sp_done;
  point_t             seg_pt [NCORES+1];
  logic [NCORES-1:0]  core_idle;
  logic [NCORES-1:0]  used;            // cores taking part in the current line
  logic [N_W-1:0]     n_in;

  assign n_in = (line_ncores == '0 || line_ncores > N_W'(NCORES)) ? N_W'(NCORES) : line_ncores;

  line_splitter #(.NSEG(NCORES)) u_split (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .start(line_start && dstate == D_IDLE),
    .nseg(line_ncores),
    .x0(line_p0.x), .y0(line_p0.y), .x1(line_p1.x), .y1(line_p1.y),
    .busy(sp_busy), .done(sp_done), .seg_pt(seg_pt)
  );

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    wu_core_axil #(.DEPTH(DEPTH)) u_xiaolin (
      .ap_clk, .ap_rst_n,
      .s_axi_req(s_axi_req[c]),
      .s_axi_rsp(s_axi_rsp[c]),
      .interrupt(interrupt[c]),
      .ext_start(sp_done && used[c]),
      .ext_p0(seg_pt[c]),
      .ext_p1(seg_pt[c+1]),
      .idle(core_idle[c])
    );
  end

  always_ff @(posedge ap_clk or negedge ap_rst_n) begin
    if (!ap_rst_n) begin
      dstate    <= D_IDLE;
      line_done <= 1'b0;
      used      <= '0;
    end else begin
      line_done <= 1'b0;
      unique case (dstate)
        D_IDLE:  if (line_start) begin
          for (int c = 0; c < NCORES; c++) used[c] <= (N_W'(c) < n_in);
          dstate <= D_SPLIT;
        end
        D_SPLIT: if (sp_done) dstate <= D_RUN;      // cores loaded this clock
        D_RUN:   if (&(core_idle | ~used)) begin
          line_done <= 1'b1;
          dstate    <= D_IDLE;
        end
        default: dstate <= D_IDLE;
      endcase
    end
  end

  assign line_busy = (dstate != D_IDLE) || sp_busy;

endmodule
