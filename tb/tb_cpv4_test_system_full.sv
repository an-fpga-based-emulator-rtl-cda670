// tb_cpv4_test_system_full: one complete operation of the test system at
// full size (128 x 128 pixel emulator, every parameter and register at its
// default), driven through IPbus: the pulse enable of 14 pixels spread over
// the array (corners included) is set and one of them is masked through the
// WFIFO; one electronic pulse is sent with the default timing (continuous
// mode, 3 us pulse, Read every 4 us, 2.2 us wide, 0.2 us after Valid, at
// 100 cycles per us); the RFIFO is drained and decoded to column and row.
// Checks: the hit map over all 16384 pixels, addresses in priority order,
// Read_Width and Read_Period measured on the chip's Read line, and the
// number of reads.
module tb_cpv4_test_system_full;
  import cpv4_pkg::*;
  localparam int ROWS = 128, COLS = 128, NPIX = ROWS * COLS;
  localparam logic [31:0] S2 = 32'h40;

  logic clk = 0, rst_n = 0;
  ipb_wbus_t ipb_w;
  ipb_rbus_t ipb_r;
  logic [NPIX-1:0] dout = '0;
  logic dac_sclk, dac_sync_n, dac_din;
  logic chip_valid, chip_read, chip_strobe, chip_pulse_d, chip_freeze, chip_sync;
  logic [13:0] chip_addr;
  int checks = 0, failures = 0;

  cpv4_test_system dut (
    .clk, .rst_n, .ipb_in(ipb_w), .ipb_out(ipb_r), .dout,
    .dac_sclk, .dac_sync_n, .dac_din,
    .chip_valid, .chip_addr, .chip_read, .chip_strobe, .chip_pulse_d, .chip_freeze, .chip_sync);
  ipb_master_bfm u_bfm (.clk, .ipb_w, .ipb_r);

  always #5 clk = ~clk;

  int cyc = 0;
  int r_rise[$], r_fall[$];
  logic rd_q = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    rd_q <= chip_read;
    if (chip_read && !rd_q) r_rise.push_back(cyc);
    if (!chip_read && rd_q) r_fall.push_back(cyc);
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic e;
    u_bfm.write(a, d, e);
    chk(!e, $sformatf("write %h", a));
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    logic e;
    u_bfm.read(a, d, e);
    chk(!e, $sformatf("read %h", a));
  endtask

  int pc [14] = '{0, 127, 0, 127, 1, 2, 3, 64, 65, 100, 31, 32, 77, 90};
  int pr [14] = '{0, 127, 127, 0, 0, 5, 5, 64, 64, 3, 120, 8, 77, 90};
  bit expect_hit [NPIX];
  int map [NPIX];

  initial begin
    logic [31:0] st, lo, hi;
    int n, prev_a, nexp;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    for (int i = 0; i < 14; i++) begin
      wr(S2 + R_WFIFO, {16'd0, 1'b1, 1'b1, 7'(pc[i]), 7'(pr[i])});
      expect_hit[pc[i]*ROWS + pr[i]] = 1;
    end
    wr(S2 + R_WFIFO, {16'd0, 1'b0, 1'b1, 7'(pc[12]), 7'(pr[12])});   // mask one
    expect_hit[pc[12]*ROWS + pr[12]] = 0;
    repeat (300) @(negedge clk);

    wr(S2 + R_CTRL, 32'b110);            // start, readout on, continuous
    repeat (8000) @(negedge clk);

    // drain the RFIFO
    foreach (map[i]) map[i] = 0;
    n = 0; prev_a = -1;
    rd(S2 + R_STATUS, st);
    while (!st[2]) begin
      int a, c, r;
      rd(S2 + R_RFIFO_LO, lo);
      rd(S2 + R_RFIFO_HI, hi);
      a = int'(lo[13:0]);
      r = (a >> 1) & 127;
      c = ((a >> 8) << 1) | (a & 1);
      chk(a > prev_a, "priority order");
      prev_a = a;
      map[c*ROWS + r]++;
      n++;
      rd(S2 + R_STATUS, st);
    end
    nexp = 0;
    for (int i = 0; i < NPIX; i++) begin
      nexp += int'(expect_hit[i]);
      if (map[i] != int'(expect_hit[i])) begin
        chk(0, $sformatf("hit map col %0d row %0d: %0d", i / ROWS, i % ROWS, map[i]));
      end
    end
    checks++;
    chk(n == nexp, $sformatf("hits %0d expected %0d", n, nexp));
    chk(r_rise.size() == nexp, $sformatf("reads %0d", r_rise.size()));
    foreach (r_fall[i]) chk(r_fall[i] - r_rise[i] == 220, "Read_Width 2.2 us");
    for (int i = 1; i < r_rise.size(); i++) chk(r_rise[i] - r_rise[i-1] == 400, "Read_Period 4 us");
    $display("full size: %0d hits read, %0d cycles", n, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
