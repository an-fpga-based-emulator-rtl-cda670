// tb_ipb_slave_dac: writes frames to slave 1 and decodes the serial lines
// like the DAC does (DIN taken on each falling SCLK edge while SYNC_n is
// low). Checks the 32 bits, MSB first, the frame length, that a second
// write during a frame is refused with err, busy and the frame count.
module tb_ipb_slave_dac;
  import cpv4_pkg::*;
  localparam int DIV = 3;
  logic clk = 0, rst_n = 0, dac_sclk, dac_sync_n, dac_din;
  ipb_wbus_t ipb_w;
  ipb_rbus_t ipb_r;
  int checks = 0, failures = 0;

  ipb_slave_dac #(.CLK_DIV(DIV)) dut (.clk, .rst_n, .ipb_in(ipb_w), .ipb_out(ipb_r),
                                      .dac_sclk, .dac_sync_n, .dac_din);
  ipb_master_bfm u_bfm (.clk, .ipb_w, .ipb_r);

  always #5 clk = ~clk;

  // DAC side decoder
  logic [31:0] shift = 0, frames[$];
  int nbits = 0, low_cycles = 0, lens[$];
  logic sclk_q = 1, sync_q = 1;
  always @(posedge clk) begin
    sclk_q <= dac_sclk;
    sync_q <= dac_sync_n;
    if (!dac_sync_n) low_cycles <= low_cycles + 1;
    if (rst_n && !dac_sync_n && sclk_q && !dac_sclk) begin
      shift <= {shift[30:0], dac_din};
      nbits <= nbits + 1;
    end
    if (rst_n && dac_sync_n && !sync_q) begin
      frames.push_back(shift);
      lens.push_back(nbits);
      nbits <= 0;
      low_cycles <= 0;
    end
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] d, v[3];
    logic e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    v = '{32'h0030_1234, 32'h8421_F00F, 32'hFFFF_0001};
    for (int i = 0; i < 3; i++) begin
      u_bfm.write(32'h0, v[i], e); chk(!e, "frame write");
      u_bfm.read(32'h1, d, e);     chk(d[0], "busy during frame");
      u_bfm.write(32'h0, 32'h0, e); chk(e, "write during frame refused");
      repeat (64*DIV + 10) @(negedge clk);
    end
    chk(frames.size() == 3, "frame count");
    foreach (frames[i]) begin
      chk(frames[i] == v[i], $sformatf("frame %0d %h", i, frames[i]));
      chk(lens[i] == 32, "32 bits");
    end
    u_bfm.read(32'h1, d, e); chk(d == {16'd3, 16'd0}, "frames counted, idle");
    u_bfm.read(32'h0, d, e); chk(d == v[2], "last frame readback");
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
