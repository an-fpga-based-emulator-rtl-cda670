// tb_full_array_readout: the full-array readout run of the test system, in
// trigger mode, with the emulator timing set of the readout firmware
// (Pulse_Width 3 us, Strobe_Delay 2.5 us, Strobe_Width 0.6 us, Read_Delay
// 0.5 us, Read_Width 0.2 us, Read_Period 0.4 us at 100 cycles per us).
// The array is reduced to 32 x 32 (DC_LVL 3, EOC_LVL 2) and the RFIFO to
// 256 words. That keeps the full array four times larger than the RFIFO,
// the same ratio as 16384 pixels against 4096 words at full size, so the
// run only completes because the host drains the RFIFO while the chip is
// being read.
// Sequence, all through IPbus: the pulse enable of every pixel is set
// through the WFIFO; the timing registers are written; one pulse is
// started; the host polls STATUS and pops hit words until it has them all.
// Checks: configuration words applied, Strobe delay and width against the
// pulse, every pixel read exactly once in increasing address order (with
// every pixel hit, the n-th word carries address n), no word dropped, Read
// width and period on the chip's Read line, timestamps one Read_Period
// apart, and Valid low at the end.
module tb_full_array_readout;
  import cpv4_pkg::*;
  localparam int DCL = 3, EOCL = 2;
  localparam int ROWS = (4 ** DCL) / 2, COLS = 2 * (4 ** EOCL), NPIX = ROWS * COLS;
  localparam int RF = 256;
  localparam logic [31:0] S2 = 32'h40;
  // emulator timing set, in cycles
  localparam int PW = 300, SD = 250, SW = 60, RP = 40, RD = 50, RWID = 20;

  logic clk = 0, rst_n = 0;
  ipb_wbus_t ipb_w;
  ipb_rbus_t ipb_r;
  logic [NPIX-1:0] dout = '0;
  logic dac_sclk, dac_sync_n, dac_din;
  logic chip_valid, chip_read, chip_strobe, chip_pulse_d, chip_freeze, chip_sync;
  logic [13:0] chip_addr;
  int checks = 0, failures = 0;

  cpv4_test_system #(.DC_LVL(DCL), .EOC_LVL(EOCL), .RF_DEPTH(RF)) dut (
    .clk, .rst_n, .ipb_in(ipb_w), .ipb_out(ipb_r), .dout,
    .dac_sclk, .dac_sync_n, .dac_din,
    .chip_valid, .chip_addr, .chip_read, .chip_strobe, .chip_pulse_d, .chip_freeze, .chip_sync);
  ipb_master_bfm u_bfm (.clk, .ipb_w, .ipb_r);

  always #5 clk = ~clk;

  // edge times of Read, Strobe and Pulse_d
  int cyc = 0;
  int r_rise[$], r_fall[$], s_rise[$], s_fall[$], p_rise[$];
  logic rd_q = 0, st_q = 0, pd_q = 0;
  always @(posedge clk) if (rst_n) begin
    cyc  <= cyc + 1;
    rd_q <= chip_read;
    st_q <= chip_strobe;
    pd_q <= chip_pulse_d;
    if (chip_read && !rd_q) r_rise.push_back(cyc);
    if (!chip_read && rd_q) r_fall.push_back(cyc);
    if (chip_strobe && !st_q) s_rise.push_back(cyc);
    if (!chip_strobe && st_q) s_fall.push_back(cyc);
    if (chip_pulse_d && !pd_q) p_rise.push_back(cyc);
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

  initial begin
    logic [31:0] st, lo, hi, d;
    logic [47:0] ts, prev_ts;
    int n, bad_addr, bad_ts, idle;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // every pixel pulse-enabled
    // (the host keeps the WFIFO from filling, as a write to a full WFIFO is refused)
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin
        if ((c * ROWS + r) % 256 == 0)
          do rd(S2 + R_WFIFO_COUNT, d); while (d > 512);
        wr(S2 + R_WFIFO, {16'd0, 1'b1, 1'b1, 7'(c), 7'(r)});
      end
    do begin
      repeat (50) @(negedge clk);
      rd(S2 + R_CFG_DONE, d);
    end while (d < NPIX);
    chk(d == NPIX, $sformatf("configuration words applied: %0d", d));

    wr(S2 + R_PULSE_NUM, 1);
    wr(S2 + R_PULSE_WIDTH, PW);
    wr(S2 + R_STROBE_DELAY, SD);
    wr(S2 + R_STROBE_WIDTH, SW);
    wr(S2 + R_READ_PERIOD, RP);
    wr(S2 + R_READ_DELAY, RD);
    wr(S2 + R_READ_WIDTH, RWID);
    wr(S2 + R_CTRL, 32'b011);             // trigger mode, readout on
    repeat (10) @(negedge clk);           // Strobe leaves its continuous-mode level
    s_rise.delete(); s_fall.delete(); p_rise.delete();
    wr(S2 + R_CTRL, 32'b111);             // start

    // host: poll and drain
    n = 0; bad_addr = 0; bad_ts = 0; idle = 0; prev_ts = '0;
    while (n < NPIX && idle < 4000) begin
      rd(S2 + R_STATUS, st);
      if (st[2]) begin
        idle++;
        continue;
      end
      idle = 0;
      rd(S2 + R_RFIFO_LO, lo);
      rd(S2 + R_RFIFO_HI, hi);
      ts = {hi, lo[31:16]};
      if (int'(lo[13:0]) != n) begin
        bad_addr++;
        if (bad_addr < 5) $display("word %0d has address %0d", n, lo[13:0]);
      end
      if (n > 0 && ts - prev_ts != 48'(RP)) begin
        bad_ts++;
        if (bad_ts < 5) $display("word %0d: %0d cycles after the previous", n, ts - prev_ts);
      end
      prev_ts = ts;
      n++;
    end
    chk(n == NPIX, $sformatf("hit words received: %0d of %0d", n, NPIX));
    chk(bad_addr == 0, $sformatf("words out of address order: %0d", bad_addr));
    chk(bad_ts == 0, $sformatf("timestamp steps other than Read_Period: %0d", bad_ts));
    repeat (200) @(negedge clk);
    rd(S2 + R_DROPPED, d);      chk(d == 0, $sformatf("dropped %0d", d));
    rd(S2 + R_READS_DONE, d);   chk(d == NPIX, $sformatf("reads %0d", d));
    rd(S2 + R_STATUS, st);      chk(st[2] && !st[6], "RFIFO empty and Valid low at the end");

    // Strobe against the pulse
    chk(p_rise.size() == 1 && s_rise.size() == 1 && s_fall.size() == 1, "one pulse, one Strobe");
    if (p_rise.size() == 1 && s_rise.size() == 1 && s_fall.size() == 1) begin
      chk(s_rise[0] - p_rise[0] == SD, $sformatf("Strobe_Delay %0d", s_rise[0] - p_rise[0]));
      chk(s_fall[0] - s_rise[0] == SW, $sformatf("Strobe_Width %0d", s_fall[0] - s_rise[0]));
    end
    // Read line
    chk(r_rise.size() == NPIX && r_fall.size() == NPIX, $sformatf("Read pulses %0d", r_rise.size()));
    begin
      int bw = 0, bp = 0;
      for (int i = 0; i < r_fall.size() && i < r_rise.size(); i++) begin
        if (r_fall[i] - r_rise[i] != RWID) bw++;
        if (i > 0 && r_rise[i] - r_rise[i-1] != RP) bp++;
      end
      chk(bw == 0, $sformatf("Reads not %0d cycles wide: %0d", RWID, bw));
      chk(bp == 0, $sformatf("Read starts not %0d cycles apart: %0d", RP, bp));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
