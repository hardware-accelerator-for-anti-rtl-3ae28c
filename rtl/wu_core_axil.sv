// wu_core_axil: one Xiaolin Wu line core as a memory-mapped peripheral.
//
// The host writes the two endpoints of a segment into argument registers,
// sets ap_start, waits for ap_done (by polling or by the interrupt) and reads
// the pixel pairs back. Inside are the Wu line core (wu_line_core) and its
// result memory (pixel_pair_ram); every pair the core emits is written to
// the memory at its pair index.
//
// AXI4-Lite slave, 32-bit data, one transaction at a time:
//   write: AW and W are taken together in one clock; B follows the next clock.
//   read : AR is taken when no read is in flight; R follows two clocks later.
// Register map (wu_pkg): CTRL 0x00 (b0 ap_start, set by writing 1, cleared
// when the core takes it; b1 ap_done, cleared when CTRL is read; b2 ap_idle),
// GIE 0x04, IER 0x08, ISR 0x0C (b0 set at done, write 1 to clear), X0 0x10,
// Y0 0x14, X1 0x18, Y1 0x1C (endpoints, fixed point COORD_W.SUB_W in bits
// 15:0, written when both low byte strobes are set), COUNT 0x20 (pairs of
// the last run), STATUS 0x24
// (b0 steep, b1 truncated). Results at 0x8000 + 8*n: pixel A of pair n, and
// at +4 pixel B, each packed {x[31:20], y[19:8], intensity[7:0]}.
// interrupt = GIE & IER & ISR, a level.
//
// ext_start/ext_p0/ext_p1 let the on-chip splitter load whole-pixel endpoints
// (fraction 0) and set ap_start in one clock, the same as the host's register
// writes would.
// Pairs beyond DEPTH are not stored; STATUS.b1 then reports the truncation.
//
// The core with its AXI4-Lite port "s_axi_AXILiteS", ap_clk, ap_rst_n and an
// interrupt output follows the document's block design. The register
// addresses, the clear rules and the result layout are this design's own,
// modelled on the control block that high-level synthesis generates.
module wu_core_axil
  import wu_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic      ap_clk,
  input  logic      ap_rst_n,
  input  axil_req_t s_axi_req,
  output axil_rsp_t s_axi_rsp,
  output logic      interrupt,
  input  logic      ext_start,
  input  point_t    ext_p0,
  input  point_t    ext_p1,
  output logic      idle
);

  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned IDX_W = COORD_W + 1;

  // ---- registers -------------------------------------------------------------
  logic   ap_start, ap_done, gie, ier, isr;
  fxcoord_t r_x0, r_y0, r_x1, r_y1;

  // ---- core and result memory ----------------------------------------------
  logic              c_busy, c_done, c_steep, c_valid;
  logic [IDX_W-1:0]  c_count, c_idx;
  pixel_pair_t       c_pair, m_rdata;
  logic              c_start;
  logic [AW-1:0]     m_raddr;

  assign c_start = ap_start && !c_busy;

  wu_line_core #(.IDX_W(IDX_W)) u_core (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .start(c_start), .x0(r_x0), .y0(r_y0), .x1(r_x1), .y1(r_y1),
    .busy(c_busy), .done(c_done), .count(c_count), .steep(c_steep),
    .out_valid(c_valid), .out_idx(c_idx), .out_pair(c_pair)
  );

  pixel_pair_ram #(.DEPTH(DEPTH)) u_ram (
    .clk(ap_clk),
    .we(c_valid && c_idx < IDX_W'(DEPTH)),
    .waddr(c_idx[AW-1:0]),
    .wdata(c_pair),
    .raddr(m_raddr),
    .rdata(m_rdata)
  );

  assign idle = !ap_start && !c_busy;

  // ---- AXI4-Lite ---------------------------------------------------------------
  logic              wr_go, rd_go, rd_pend, rd_res, rd_half;
  logic [AXIL_AW-1:0] rd_addr;
  logic [AXIL_DW-1:0] reg_val;
  logic               bvalid_q, rvalid_q;
  logic [AXIL_DW-1:0] rdata_q;

  assign wr_go   = s_axi_req.awvalid && s_axi_req.wvalid && !bvalid_q;
  assign rd_go   = s_axi_req.arvalid && !rd_pend && !rvalid_q;
  assign m_raddr = s_axi_req.araddr[3 +: AW];

  always_comb begin
    s_axi_rsp.awready = wr_go;
    s_axi_rsp.wready  = wr_go;
    s_axi_rsp.arready = rd_go;
    s_axi_rsp.bvalid  = bvalid_q;
    s_axi_rsp.bresp   = AXI_OKAY;
    s_axi_rsp.rvalid  = rvalid_q;
    s_axi_rsp.rresp   = AXI_OKAY;
    s_axi_rsp.rdata   = rdata_q;
  end

  always_comb begin
    unique case (rd_addr)
      REG_CTRL:   reg_val = AXIL_DW'({idle, ap_done, ap_start});
      REG_GIE:    reg_val = AXIL_DW'(gie);
      REG_IER:    reg_val = AXIL_DW'(ier);
      REG_ISR:    reg_val = AXIL_DW'(isr);
      REG_X0:     reg_val = AXIL_DW'(r_x0);
      REG_Y0:     reg_val = AXIL_DW'(r_y0);
      REG_X1:     reg_val = AXIL_DW'(r_x1);
      REG_Y1:     reg_val = AXIL_DW'(r_y1);
      REG_COUNT:  reg_val = AXIL_DW'(c_count);
      REG_STATUS: reg_val = AXIL_DW'({c_count > IDX_W'(DEPTH), c_steep});
      default:    reg_val = '0;
    endcase
  end

  always_ff @(posedge ap_clk or negedge ap_rst_n) begin
    if (!ap_rst_n) begin
      ap_start <= 1'b0; ap_done <= 1'b0;
      gie <= 1'b0; ier <= 1'b0; isr <= 1'b0;
      r_x0 <= '0; r_y0 <= '0; r_x1 <= '0; r_y1 <= '0;
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
      rd_pend <= 1'b0; rd_res <= 1'b0; rd_half <= 1'b0; rd_addr <= '0;
    end else begin
      // core handshake
      if (c_start) ap_start <= 1'b0;
      if (c_done) begin
        ap_done <= 1'b1;
        isr     <= 1'b1;
      end

      // write channel
      if (bvalid_q && s_axi_req.bready) bvalid_q <= 1'b0;
      if (wr_go) begin
        bvalid_q <= 1'b1;
        if (s_axi_req.wstrb[0]) begin
          unique case (s_axi_req.awaddr)
            REG_CTRL: if (s_axi_req.wdata[0]) ap_start <= 1'b1;
            REG_GIE:  gie <= s_axi_req.wdata[0];
            REG_IER:  ier <= s_axi_req.wdata[0];
            REG_ISR:  if (s_axi_req.wdata[0] && !c_done) isr <= 1'b0;
            default: ;
          endcase
        end
        if (&s_axi_req.wstrb[1:0]) begin
          unique case (s_axi_req.awaddr)
            REG_X0: r_x0 <= s_axi_req.wdata[COORD_W+SUB_W-1:0];
            REG_Y0: r_y0 <= s_axi_req.wdata[COORD_W+SUB_W-1:0];
            REG_X1: r_x1 <= s_axi_req.wdata[COORD_W+SUB_W-1:0];
            REG_Y1: r_y1 <= s_axi_req.wdata[COORD_W+SUB_W-1:0];
            default: ;
          endcase
        end
      end

      // load from the on-chip splitter
      if (ext_start) begin
        r_x0 <= {ext_p0.x, SUB_W'(0)}; r_y0 <= {ext_p0.y, SUB_W'(0)};
        r_x1 <= {ext_p1.x, SUB_W'(0)}; r_y1 <= {ext_p1.y, SUB_W'(0)};
        ap_start <= 1'b1;
      end

      // read channel
      if (rvalid_q && s_axi_req.rready) rvalid_q <= 1'b0;
      if (rd_go) begin
        rd_pend <= 1'b1;
        rd_res  <= s_axi_req.araddr[RES_BASE_BIT];
        rd_half <= s_axi_req.araddr[2];
        rd_addr <= s_axi_req.araddr;
      end
      if (rd_pend) begin
        rd_pend          <= 1'b0;
        rvalid_q <= 1'b1;
        rdata_q  <= rd_res ? (rd_half ? m_rdata.b : m_rdata.a) : reg_val;
        if (!rd_res && rd_addr == REG_CTRL && !c_done) ap_done <= 1'b0;
      end
    end
  end

  assign interrupt = gie && ier && isr;

  // AXI4-Lite rules: a response stays valid until it is taken.
  assert property (@(posedge ap_clk) disable iff (!ap_rst_n)
                   bvalid_q && !s_axi_req.bready |=> bvalid_q);
  assert property (@(posedge ap_clk) disable iff (!ap_rst_n)
                   rvalid_q && !s_axi_req.rready |=> rvalid_q && $stable(rdata_q));

endmodule
