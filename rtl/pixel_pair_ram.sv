// pixel_pair_ram: the block memory that holds one core's output pixel pairs.
//
// Each core writes the pairs it generates here, one word per step along the
// line, at the pair index; the host reads them back afterwards. A word is one
// pixel_pair_t: pixel A (x, y, intensity) and pixel B, so one entry carries the
// six output arrays of a core (x, y and intensity of both pixels) side by side.
//
// Simple dual-port RAM: one synchronous write port, one read port with a
// registered output (data appears the clock after raddr is presented), both on
// the same clock. Contents are not reset. DEPTH is this design's choice: the
// document gives no array size; 1024 pairs cover a 1023-pixel segment.
module pixel_pair_ram
  import wu_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        we,
  input  logic [AW-1:0] waddr,
  input  pixel_pair_t wdata,
  input  logic [AW-1:0] raddr,
  output pixel_pair_t rdata
);

  pixel_pair_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
