// line_splitter: divides a line into N equal-length segments whose
// endpoints are pixels of the Bresenham line. N is given per line on the nseg
// input, from 1 up to the NSEG parameter (0 or more than NSEG mean NSEG).
//
// With L = max(|dx|,|dy|) the major-axis length, boundary k (k = 0..N) is
// the Bresenham pixel after s_k = ceil(k*L/N) steps, so segment lengths
// differ by at most one step; seg_pt[0] is the first endpoint and seg_pt[N]
// the last, and segment k runs from seg_pt[k] to seg_pt[k+1] (neighbours share
// their joint pixel). Boundaries past N repeat the last endpoint.
//
// Instead of walking the line pixel by pixel, the pixel after s steps is
// computed in closed form. For the all-octant Bresenham iteration (err = dx+dy,
// move the major axis every step, the minor axis when the error says so) the
// minor coordinate has moved
//     m(s) = floor((2*s*amin + amaj) / (2*amaj))
// pixels after s steps (amaj/amin = major/minor absolute extents), i.e.
// s*amin/amaj rounded half up. Writing s*amin = Q*amaj + R with R < amaj this
// is m = Q + (2R >= amaj). The boundaries are then produced one per clock by
// adding fixed increments:
//   * q = L / N, r = L % N (divider 1, COORD_W clocks); each step
//     s_k - s_(k-1) is q or q+1, chosen by a remainder counter t that tracks
//     k*r - N*ceil(k*r/N);
//   * (Qq, Rq) = divmod(q*amin, amaj) (divider 2, 2*COORD_W clocks) and
//     (Qq1, Rq1) = divmod((q+1)*amin, amaj), formed from the first with one
//     conditional subtraction; the running (Q, R) adds one of the two pairs
//     and carries when R overflows amaj.
// A line of a single pixel (L = 0) skips the dividers; every boundary is then
// that pixel.
//
// Interface: start (with the endpoints and nseg) is taken while busy is low;
// done pulses for one clock when seg_pt is complete, and seg_pt holds until
// the next start.
// Timing: done is high 3*COORD_W + N + 4 clock edges after the edge that
// takes start (N + 2 for a single pixel), whatever the line length.
//
// The document splits the line on the processor, using Bresenham's algorithm
// to compute the segment endpoints (and names a "binary tree" method it does
// not describe), into up to 10 parts, one per core. Doing the split in logic, and the closed form that finds the
// same Bresenham pixels without walking the line, are this design's own.
module line_splitter
  import wu_pkg::*;
#(
  parameter int unsigned NSEG = 10,
  localparam int unsigned K_W = $clog2(NSEG + 1)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic [K_W-1:0] nseg,
  input  coord_t x0,
  input  coord_t y0,
  input  coord_t x1,
  input  coord_t y1,
  output logic   busy,
  output logic   done,
  output point_t seg_pt [NSEG+1]
);

  localparam int unsigned P_W = 2 * COORD_W;

  typedef enum logic [2:0] {S_IDLE, S_DIV1, S_DIV2, S_PREP, S_EMIT, S_DONE} state_t;
  state_t state;

  // line description, latched at start
  logic   xmaj, maj_neg, min_neg;
  logic [K_W-1:0] n_q, n_in;         // segment count: latched, and as given
  assign n_in = (nseg == '0 || nseg > K_W'(NSEG)) ? K_W'(NSEG) : nseg;
  coord_t amaj, amin, maj0, min0;

  coord_t adx, ady;
  assign adx = (x1 >= x0) ? coord_t'(x1 - x0) : coord_t'(x0 - x1);
  assign ady = (y1 >= y0) ? coord_t'(y1 - y0) : coord_t'(y0 - y1);

  // ---- dividers ------------------------------------------------------------------
  logic            d1_start, d1_done, d2_start, d2_done;
  logic [COORD_W-1:0] d1_quo;
  logic [K_W-1:0]  d1_rem;
  logic [P_W-1:0]  d2_quo;     // < 2^COORD_W, as q*amin/amaj <= q; upper bits stay 0
  coord_t          d2_rem;
  coord_t          q;
  logic [K_W-1:0]  r;

  seq_divider #(.NW(COORD_W), .DW(K_W)) u_div_len (
    .clk, .rst_n, .start(d1_start),
    .num((state == S_IDLE) ? ((adx >= ady) ? adx : ady) : amaj),
    .den((state == S_IDLE) ? n_in : n_q),
    .done(d1_done), .quo(d1_quo), .rem(d1_rem)
  );

  seq_divider #(.NW(P_W), .DW(COORD_W)) u_div_min (
    .clk, .rst_n, .start(d2_start),
    .num(P_W'(d1_quo) * P_W'(amin)),
    .den(amaj),
    .done(d2_done), .quo(d2_quo), .rem(d2_rem)
  );

  logic line_is_point;
  assign line_is_point = (adx == '0) && (ady == '0);
  assign d1_start = (state == S_IDLE) && start && !line_is_point;
  assign d2_start = (state == S_DIV1) && d1_done;

  // ---- boundary accumulation -----------------------------------------------------
  coord_t            qq, qq1, rq, rq1;      // divmod(q*amin, amaj), divmod((q+1)*amin, amaj)
  coord_t            s, acc_q, acc_r;       // steps taken; s*amin = acc_q*amaj + acc_r
  logic signed [K_W+1:0] t;                 // k*r - N*ceil(k*r/N), in (-N, 0]
  logic [K_W-1:0]    k;

  // next boundary, combinational
  logic signed [K_W+1:0] t_try, t_nxt;
  logic              inc;
  coord_t            s_nxt, aq_nxt, ar_nxt, m_nxt;
  logic [COORD_W:0]  ar_sum;
  point_t            p_nxt;

  always_comb begin
    t_try  = t + $signed({2'b00, r});
    inc    = t_try > 0;
    t_nxt  = inc ? t_try - $signed({2'b00, n_q}) : t_try;
    s_nxt  = coord_t'(s + q + coord_t'(inc));
    ar_sum = {1'b0, acc_r} + {1'b0, inc ? rq1 : rq};
    aq_nxt = coord_t'(acc_q + (inc ? qq1 : qq));
    ar_nxt = ar_sum[COORD_W-1:0];
    if (ar_sum >= {1'b0, amaj} && amaj != '0) begin
      aq_nxt = coord_t'(aq_nxt + 1'b1);
      ar_nxt = coord_t'(ar_sum - {1'b0, amaj});
    end
    m_nxt = coord_t'(aq_nxt + coord_t'(({ar_nxt, 1'b0} >= {1'b0, amaj}) && amaj != '0));
    begin
      coord_t pmaj, pmin;
      pmaj = maj_neg ? coord_t'(maj0 - s_nxt) : coord_t'(maj0 + s_nxt);
      pmin = min_neg ? coord_t'(min0 - m_nxt) : coord_t'(min0 + m_nxt);
      p_nxt = xmaj ? '{x: pmaj, y: pmin} : '{x: pmin, y: pmaj};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      xmaj <= 1'b0; maj_neg <= 1'b0; min_neg <= 1'b0; n_q <= K_W'(NSEG);
      amaj <= '0; amin <= '0; maj0 <= '0; min0 <= '0;
      q <= '0; r <= '0; qq <= '0; qq1 <= '0; rq <= '0; rq1 <= '0;
      s <= '0; acc_q <= '0; acc_r <= '0; t <= '0; k <= '0;
      done <= 1'b0;
      for (int i = 0; i <= NSEG; i++) seg_pt[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xmaj    <= adx >= ady;
          amaj    <= (adx >= ady) ? adx : ady;
          amin    <= (adx >= ady) ? ady : adx;
          maj0    <= (adx >= ady) ? x0 : y0;
          min0    <= (adx >= ady) ? y0 : x0;
          maj_neg <= (adx >= ady) ? (x1 < x0) : (y1 < y0);
          min_neg <= (adx >= ady) ? (y1 < y0) : (x1 < x0);
          seg_pt[0] <= '{x: x0, y: y0};
          n_q       <= n_in;
          q <= '0; r <= '0; qq <= '0; qq1 <= '0; rq <= '0; rq1 <= '0;
          state   <= line_is_point ? S_PREP : S_DIV1;
        end
        S_DIV1: if (d1_done) begin
          q     <= d1_quo;
          r     <= d1_rem;
          state <= S_DIV2;
        end
        S_DIV2: if (d2_done) begin
          // (q+1)*amin = q*amin + amin: one more conditional subtraction
          automatic logic [COORD_W:0] sum = {1'b0, d2_rem} + {1'b0, amin};
          qq <= d2_quo[COORD_W-1:0];
          rq <= d2_rem;
          if (sum >= {1'b0, amaj}) begin
            qq1 <= coord_t'(d2_quo[COORD_W-1:0] + 1'b1);
            rq1 <= coord_t'(sum - {1'b0, amaj});
          end else begin
            qq1 <= d2_quo[COORD_W-1:0];
            rq1 <= sum[COORD_W-1:0];
          end
          state <= S_PREP;
        end
        S_PREP: begin
          s <= '0; acc_q <= '0; acc_r <= '0; t <= '0;
          k <= K_W'(1);
          state <= S_EMIT;
        end
        S_EMIT: begin
          // boundary k; those past N take the last endpoint when k = N
          for (int i = 1; i <= NSEG; i++)
            if (K_W'(i) >= k) seg_pt[i] <= p_nxt;
          s     <= s_nxt;
          acc_q <= aq_nxt;
          acc_r <= ar_nxt;
          t     <= t_nxt;
          k     <= k + 1'b1;
          if (k == n_q) state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // the last boundary is the last endpoint
  assert property (@(posedge clk) disable iff (!rst_n)
                   state == S_EMIT && k == n_q |-> s_nxt == amaj);

endmodule
