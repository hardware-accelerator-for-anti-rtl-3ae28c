// wu_line_core: Xiaolin Wu anti-aliased line generator for one line segment.
//
// Given two endpoints it produces, one pair per clock, the two pixels that
// straddle the ideal line at each step along the major axis. The pixel nearer
// the line gets the larger share of the intensity; in the interior the two
// shares of a pair always add up to INT_MAX, so the line keeps a constant
// brightness. Endpoints are fixed-point (COORD_W.SUB_W) and may lie between
// pixel centres; the partial coverage of the end pixels is then weighted.
//
// How it works (Wu's algorithm: steep test, gradient, endpoint handling, then
// an incremental loop on "intery"):
//   * start: the endpoints are latched. A line is "steep" when |dy| > |dx|;
//     a steep line has x and y swapped internally and swapped back on output.
//     If the first endpoint lies after the last one the two are exchanged.
//     Internally coordinates carry SP = SUB_W+1 fractional bits, so that
//     "x + 0.5" is exact.
//   * DIV: gradient = dy/dx as an unsigned fixed-point number with FRAC_W
//     fractional bits, from a restoring divider, one bit per clock. Because
//     |dy| <= dx after the swap it is at most 1.0; 0 when dx = 0.
//   * END1 / END2: for each endpoint (x, y)
//       xend = round(x) = floor(x + 0.5)
//       yend = y + gradient * (xend - x)
//       xgap = 1 - fpart(x + 0.5) at the first endpoint, fpart(x + 0.5) at
//              the last
//       A = (xend, ipart(yend),   (INT_MAX - fpart(yend)) * xgap)
//       B = (xend, ipart(yend)+1, fpart(yend) * xgap)
//     With integer endpoints xgap = 0.5 and fpart(yend) = 0, so A gets
//     INT_MAX/2 and B gets 0.
//   * LOOP: for x = xend1+1 .. xend2-1, one pair per clock:
//       A = (x, ipart(intery),   INT_MAX - fpart(intery))
//       B = (x, ipart(intery)+1, fpart(intery))
//     then intery += gradient. intery starts at yend1 + gradient.
//   fpart() keeps the top INT_W fractional bits; all rounding is truncation
//   (floor for the signed endpoint correction).
//
// Interface: start is taken only while busy is low. out_valid qualifies
// out_pair/out_idx; pairs come in the order first endpoint, last endpoint,
// then the interior from xend1+1 upward. done pulses for one clock after the
// last pair; count then holds the number of pairs (2 + max(0, xend2-xend1-1))
// and steep the steep flag.
// Timing: done is high FRAC_W + 2 + max(xend2 - xend1, 1) clock edges after
// the edge that takes start. The loop runs at one pair per clock.
//
// The algorithm and the pair order follow the document's flowchart of Wu's
// algorithm. The fixed-point formats, truncation, the 8-bit intensity and the
// handshake are this design's choices. A coordinate that leaves 0..2^COORD_W-1
// (pixel B above the top row, an end pixel rounded past the edge) wraps.
module wu_line_core
  import wu_pkg::*;
#(
  parameter int unsigned IDX_W = COORD_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  fxcoord_t          x0,
  input  fxcoord_t          y0,
  input  fxcoord_t          x1,
  input  fxcoord_t          y1,
  output logic              busy,
  output logic              done,
  output logic [IDX_W-1:0]  count,
  output logic              steep,
  output logic              out_valid,
  output logic [IDX_W-1:0]  out_idx,
  output pixel_pair_t       out_pair
);

  localparam int unsigned SP   = SUB_W + 1;                // internal fraction bits of coordinates
  localparam int unsigned XW   = COORD_W + SP;             // internal coordinate width
  localparam int unsigned IY_W = COORD_W + FRAC_W + 2;     // signed intery / gradient
  localparam int unsigned DIVCNT_W = $clog2(FRAC_W + 1);
  localparam logic [SP:0] HALF = (SP+1)'(1) << (SP - 1);   // 0.5 in internal units
  localparam logic [SP:0] ONE  = (SP+1)'(1) << SP;         // 1.0 in internal units

  typedef logic [XW-1:0] xi_t;

  typedef enum logic [2:0] {S_IDLE, S_DIV, S_END1, S_END2, S_LOOP, S_DONE} state_t;
  state_t state;

  // ---- start-time endpoint normalisation (combinational) -------------------
  xi_t  ix0, iy0, ix1, iy1, adx, ady, sx0, sy0, sx1, sy1;
  logic st_in;
  always_comb begin
    ix0 = {x0, 1'b0}; iy0 = {y0, 1'b0}; ix1 = {x1, 1'b0}; iy1 = {y1, 1'b0};
    adx   = (ix1 >= ix0) ? xi_t'(ix1 - ix0) : xi_t'(ix0 - ix1);
    ady   = (iy1 >= iy0) ? xi_t'(iy1 - iy0) : xi_t'(iy0 - iy1);
    st_in = ady > adx;
    if (st_in) begin
      sx0 = iy0; sy0 = ix0; sx1 = iy1; sy1 = ix1;
    end else begin
      sx0 = ix0; sy0 = iy0; sx1 = ix1; sy1 = iy1;
    end
    if (sx0 > sx1) begin
      {sx0, sx1} = {sx1, sx0};
      {sy0, sy1} = {sy1, sy0};
    end
  end

  // ---- registered line state ------------------------------------------------
  xi_t                    px0, py0, px1, py1, dx;
  coord_t                 x, xe1;
  logic                   neg;
  xi_t                    rem;        // remainder, always < dx
  logic [FRAC_W:0]        q;          // unsigned gradient magnitude, 1.FRAC_W
  logic [DIVCNT_W-1:0]    divcnt;
  logic signed [IY_W-1:0] intery;
  logic [IDX_W-1:0]       idx;

  logic signed [IY_W-1:0] grad;
  assign grad = neg ? -$signed(IY_W'(q)) : $signed(IY_W'(q));

  logic [XW:0] rem2;
  assign rem2 = {rem, 1'b0};

  coord_t ip;      // ipart(intery)
  inten_t fp;      // fpart(intery), top INT_W bits
  assign ip = intery[FRAC_W +: COORD_W];
  assign fp = intery[FRAC_W-1 -: INT_W];

  function automatic pixel_t mkpix(input logic stp, input coord_t mx, input coord_t my,
                                   input inten_t i);
    mkpix = stp ? '{x: my, y: mx, i: i} : '{x: mx, y: my, i: i};
  endfunction

  // ---- endpoint handling (combinational, used in END1 / END2) ---------------
  typedef struct packed {
    coord_t                 xend;     // round(x)
    logic signed [IY_W-1:0] yend;     // y + gradient * (xend - x), FRAC_W fraction bits
    inten_t                 ia, ib;   // weighted intensities of A and B
  } endpt_t;

  function automatic endpt_t endpoint(input xi_t px, input xi_t py, input logic first,
                                      input logic signed [IY_W-1:0] g);
    endpt_t e;
    xi_t                      xh;
    logic [SP-1:0]            fr;
    logic signed [SP+1:0]     d;        // xend - x, in (-0.5, 0.5]
    logic [SP:0]              xgap;     // (0, 1]
    logic signed [IY_W+SP+1:0] corr;
    inten_t                   fy;
    logic [INT_W+SP:0]        wa, wb;
    xh     = px + XW'(HALF);
    fr     = xh[SP-1:0];
    e.xend = xh[SP +: COORD_W];
    d      = $signed({1'b0, HALF}) - $signed({2'b00, fr});
    xgap   = first ? ONE - (SP+1)'(fr) : (SP+1)'(fr);
    corr   = (IY_W+SP+2)'(g) * (IY_W+SP+2)'(d);
    e.yend = $signed({2'b00, py, {(FRAC_W-SP){1'b0}}}) + IY_W'(corr >>> SP);
    fy     = e.yend[FRAC_W-1 -: INT_W];
    wa     = (INT_W+SP+1)'(inten_t'(INT_MAX) - fy) * (INT_W+SP+1)'(xgap);
    wb     = (INT_W+SP+1)'(fy) * (INT_W+SP+1)'(xgap);
    e.ia   = inten_t'(wa >> SP);
    e.ib   = inten_t'(wb >> SP);
    return e;
  endfunction

  endpt_t e1, e2;
  assign e1 = endpoint(px0, py0, 1'b1, grad);
  assign e2 = endpoint(px1, py1, 1'b0, grad);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      px0 <= '0; py0 <= '0; px1 <= '0; py1 <= '0; dx <= '0; x <= '0; xe1 <= '0;
      neg       <= 1'b0;
      rem       <= '0;
      q         <= '0;
      divcnt    <= '0;
      intery    <= '0;
      idx       <= '0;
      steep     <= 1'b0;
      count     <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_pair  <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          px0   <= sx0; py0 <= sy0; px1 <= sx1; py1 <= sy1;
          dx    <= xi_t'(sx1 - sx0);
          neg   <= sy1 < sy0;
          steep <= st_in;
          // integer bit of |dy|/dx: 1 only when |dy| == dx (and dx != 0)
          if (st_in ? (adx >= ady && ady != 0) : (ady >= adx && adx != 0)) begin
            q   <= (FRAC_W+1)'(1);
            rem <= '0;
          end else begin
            q   <= '0;
            rem <= st_in ? adx : ady;
          end
          divcnt <= '0;
          idx    <= '0;
          state  <= S_DIV;
        end
        S_DIV: begin
          if (rem2 >= {1'b0, dx} && dx != '0) begin
            rem <= xi_t'(rem2 - {1'b0, dx});
            q   <= {q[FRAC_W-1:0], 1'b1};
          end else begin
            rem <= rem2[XW-1:0];   // rem2 < dx here, top bit is 0
            q   <= {q[FRAC_W-1:0], 1'b0};
          end
          divcnt <= divcnt + 1'b1;
          if (divcnt == DIVCNT_W'(FRAC_W - 1)) state <= S_END1;
        end
        S_END1: begin
          out_valid <= 1'b1;
          out_idx   <= idx;
          out_pair  <= '{a: mkpix(steep, e1.xend, e1.yend[FRAC_W +: COORD_W], e1.ia),
                         b: mkpix(steep, e1.xend, coord_t'(e1.yend[FRAC_W +: COORD_W] + 1'b1), e1.ib)};
          idx       <= idx + 1'b1;
          intery    <= e1.yend + grad;
          xe1       <= e1.xend;
          x         <= coord_t'(e1.xend + 1'b1);
          state     <= S_END2;
        end
        S_END2: begin
          out_valid <= 1'b1;
          out_idx   <= idx;
          out_pair  <= '{a: mkpix(steep, e2.xend, e2.yend[FRAC_W +: COORD_W], e2.ia),
                         b: mkpix(steep, e2.xend, coord_t'(e2.yend[FRAC_W +: COORD_W] + 1'b1), e2.ib)};
          idx       <= idx + 1'b1;
          state     <= ((COORD_W+1)'(e2.xend) >= (COORD_W+1)'(xe1) + (COORD_W+1)'(2)) ? S_LOOP : S_DONE;
        end
        S_LOOP: begin
          out_valid <= 1'b1;
          out_idx   <= idx;
          out_pair  <= '{a: mkpix(steep, x, ip, inten_t'(INT_MAX) - fp),
                         b: mkpix(steep, x, coord_t'(ip + 1'b1), fp)};
          idx       <= idx + 1'b1;
          intery    <= intery + grad;
          x         <= coord_t'(x + 1'b1);
          if (x == coord_t'(e2.xend - 1'b1)) state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          count <= idx;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
