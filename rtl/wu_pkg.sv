// wu_pkg: types and constants shared by the Wu anti-aliased line accelerator.
//
// A pixel is an (x, y, intensity) triple. The line core emits pixels in pairs,
// one pair per step along the major axis: pixel A is the one at ipart(y), pixel
// B the neighbour at ipart(y)+1, and their intensities add up to INT_MAX
// ("the total intensity stays constant"). With 12-bit coordinates and an
// 8-bit intensity a pixel packs into one 32-bit AXI word. Line endpoints may
// lie between pixel centres: they are fixed-point numbers with SUB_W
// fractional bits (fxcoord_t).
//
// The document gives neither widths nor the register map; the 12-bit
// coordinates, 4 sub-pixel bits, 8-bit intensity, 16 fractional gradient
// bits and the HLS-style AXI4-Lite register layout are this design's own
// choices.
package wu_pkg;

  localparam int unsigned COORD_W = 12;          // pixel coordinate width
  localparam int unsigned INT_W   = 8;           // intensity width
  localparam int unsigned SUB_W   = 4;           // sub-pixel bits of endpoint coordinates
  localparam int unsigned FRAC_W  = 16;          // fractional bits of gradient / intery
  localparam int unsigned INT_MAX = (1 << INT_W) - 1;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [INT_W-1:0]   inten_t;
  typedef logic [COORD_W+SUB_W-1:0] fxcoord_t;   // endpoint coordinate, COORD_W.SUB_W fixed point

  typedef struct packed {
    coord_t x;
    coord_t y;
    inten_t i;
  } pixel_t;                                     // 32 bits

  typedef struct packed {
    pixel_t a;                                   // pixel at ipart(y), intensity rfpart
    pixel_t b;                                   // pixel at ipart(y)+1, intensity fpart
  } pixel_pair_t;                                // 64 bits

  typedef struct packed {
    coord_t x;
    coord_t y;
  } point_t;

  // AXI4-Lite, 32-bit data, as used by every Xiaolin core slave port.
  localparam int unsigned AXIL_AW = 16;
  localparam int unsigned AXIL_DW = 32;

  typedef struct packed {
    logic [AXIL_AW-1:0]   awaddr;
    logic                 awvalid;
    logic [AXIL_DW-1:0]   wdata;
    logic [AXIL_DW/8-1:0] wstrb;
    logic                 wvalid;
    logic                 bready;
    logic [AXIL_AW-1:0]   araddr;
    logic                 arvalid;
    logic                 rready;
  } axil_req_t;

  typedef struct packed {
    logic                 awready;
    logic                 wready;
    logic [1:0]           bresp;
    logic                 bvalid;
    logic                 arready;
    logic [AXIL_DW-1:0]   rdata;
    logic [1:0]           rresp;
    logic                 rvalid;
  } axil_rsp_t;

  // Register map of one core (byte addresses), modelled on the control block
  // that high-level synthesis puts in front of a kernel.
  localparam logic [AXIL_AW-1:0] REG_CTRL   = 16'h0000; // b0 ap_start, b1 ap_done (clear on read), b2 ap_idle
  localparam logic [AXIL_AW-1:0] REG_GIE    = 16'h0004; // b0 global interrupt enable
  localparam logic [AXIL_AW-1:0] REG_IER    = 16'h0008; // b0 done-interrupt enable
  localparam logic [AXIL_AW-1:0] REG_ISR    = 16'h000C; // b0 done-interrupt status, write 1 to clear
  localparam logic [AXIL_AW-1:0] REG_X0     = 16'h0010; // first endpoint x, fxcoord_t
  localparam logic [AXIL_AW-1:0] REG_Y0     = 16'h0014; // first endpoint y, fxcoord_t
  localparam logic [AXIL_AW-1:0] REG_X1     = 16'h0018; // last endpoint x, fxcoord_t
  localparam logic [AXIL_AW-1:0] REG_Y1     = 16'h001C; // last endpoint y, fxcoord_t
  localparam logic [AXIL_AW-1:0] REG_COUNT  = 16'h0020; // pixel pairs written by the last run
  localparam logic [AXIL_AW-1:0] REG_STATUS = 16'h0024; // b0 steep flag, b1 result truncated (more pairs than RAM words)
  localparam int unsigned        RES_BASE_BIT = 15;     // results window at 0x8000: pair n at 0x8000 + 8n (A), +4 (B)

  localparam logic [1:0] AXI_OKAY   = 2'b00;

endpackage
