// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// quo = num / den and rem = num % den. start (taken in any state) loads num
// and den; the numerator is shifted into a partial remainder one bit per
// clock, most significant first, and den is subtracted whenever it fits.
// done is high NW clock edges after the edge that takes start, for one clock,
// and quo/rem hold until the next start. den = 0 gives an all-ones quotient;
// callers avoid it. A helper of the line splitter; the document gives no
// divider, this is the plainest one.
module seq_divider #(
  parameter int unsigned NW = 24,   // numerator / quotient width
  parameter int unsigned DW = 12    // divisor / remainder width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          done,
  output logic [NW-1:0] quo,
  output logic [DW-1:0] rem
);

  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] n_sh;
  logic [DW-1:0] d;
  logic [CW-1:0] cnt;
  logic          run;
  logic [DW:0]   trial;

  assign trial = {rem, n_sh[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_sh <= '0; d <= '0; cnt <= '0; run <= 1'b0;
      quo <= '0; rem <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n_sh <= num;
        d    <= den;
        quo  <= '0;
        rem  <= '0;
        cnt  <= '0;
        run  <= 1'b1;
      end else if (run) begin
        n_sh <= {n_sh[NW-2:0], 1'b0};
        if (trial >= {1'b0, d}) begin
          rem <= DW'(trial - {1'b0, d});
          quo <= {quo[NW-2:0], 1'b1};
        end else begin
          rem <= trial[DW-1:0];
          quo <= {quo[NW-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == CW'(NW - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
