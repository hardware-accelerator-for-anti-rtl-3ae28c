// tb_pixel_pair_ram: writes random pairs to random addresses, keeps a shadow
// copy, and checks every read one clock after the address is applied,
// including a read of an address written in the same clock (old data).
module tb_pixel_pair_ram;
  import wu_pkg::*;

  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  pixel_pair_t wdata = '0, rdata;
  pixel_pair_t shadow [DEPTH];
  int checks = 0, failures = 0;

  pixel_pair_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    pixel_pair_t expv;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = {$urandom, $urandom};
      shadow[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // read back every word
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata != shadow[a]) begin failures++; $display("FAIL: addr %0d", a); end
    end
    // mixed traffic
    for (int t = 0; t < 500; t++) begin
      raddr = AW'($urandom_range(0, DEPTH-1));
      we = $urandom_range(0, 1) == 1;
      waddr = ($urandom_range(0, 3) == 0) ? raddr : AW'($urandom_range(0, DEPTH-1));
      wdata = {$urandom, $urandom};
      expv = shadow[raddr];
      @(negedge clk);
      if (we) shadow[waddr] = wdata;
      checks++;
      if (rdata != expv) begin failures++; $display("FAIL: mixed read %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
