// tb_cpv4_test_system: end-to-end test of the test system with the
// emulated chip at reduced size (8 x 8 pixels) and a 16-word RFIFO, driven
// only through IPbus as the DAQ software would, plus the Dout inputs.
// Sequence: link test on slave 0; a DAC frame through slave 1; pixel masks
// and pulse enables written through the WFIFO; three electronic pulses in
// continuous mode, each followed by a full readout of the RFIFO, with the
// hit map decoded from the addresses and compared pixel by pixel (every
// enabled, unmasked pixel hit once per pulse, no other pixel); trigger
// mode, where a Dout hit outside the Strobe window is lost and a test pulse
// inside it is read; more hits than the RFIFO holds, which must be counted
// as dropped; GRST; the system reset; an access to an unmapped address.
// Each of these mechanisms is counted and must have happened.
module tb_cpv4_test_system;
  import cpv4_pkg::*;
  localparam int DL = 2, EL = 1;
  localparam int ROWS = 4**DL / 2, COLS = 2 * 4**EL, NPIX = ROWS * COLS;
  localparam int RB = 2*DL - 1;                  // row bits in the address
  localparam logic [31:0] S0 = 32'h00, S1 = 32'h20, S2 = 32'h40;

  logic clk = 0, rst_n = 0;
  ipb_wbus_t ipb_w;
  ipb_rbus_t ipb_r;
  logic [NPIX-1:0] dout = '0;
  logic dac_sclk, dac_sync_n, dac_din;
  logic chip_valid, chip_read, chip_strobe, chip_pulse_d, chip_freeze, chip_sync;
  logic [13:0] chip_addr;
  int checks = 0, failures = 0;

  cpv4_test_system #(.DC_LVL(DL), .EOC_LVL(EL), .WF_DEPTH(64), .RF_DEPTH(16), .DAC_DIV(2)) dut (
    .clk, .rst_n, .ipb_in(ipb_w), .ipb_out(ipb_r), .dout,
    .dac_sclk, .dac_sync_n, .dac_din,
    .chip_valid, .chip_addr, .chip_read, .chip_strobe, .chip_pulse_d, .chip_freeze, .chip_sync);
  ipb_master_bfm u_bfm (.clk, .ipb_w, .ipb_r);

  always #5 clk = ~clk;

  // mechanism counters
  int n_freeze = 0, n_sync = 0, n_read = 0, n_dac_bits = 0, n_grst = 0, n_sysrst = 0;
  int n_cfg_m = 0, n_cfg_p = 0, n_trig_lost = 0, n_trig_hit = 0, n_drop = 0, n_err = 0, n_pulse_hits = 0;
  logic fr_q = 0, sy_q = 0, rd_q = 0, ck_q = 1;
  always @(posedge clk) if (rst_n) begin
    fr_q <= chip_freeze; sy_q <= chip_sync; rd_q <= chip_read; ck_q <= dac_sclk;
    if (chip_freeze && !fr_q) n_freeze++;
    if (chip_sync && !sy_q)   n_sync++;
    if (chip_read && !rd_q)   n_read++;
    if (rst_n && !dac_sync_n && ck_q && !dac_sclk) n_dac_bits++;
    if (dut.grst && !$past(dut.grst)) n_grst++;
    if (dut.sys_rst && !$past(dut.sys_rst)) n_sysrst++;
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

  task automatic cfg_pixel(input bit p, input int c, input int r, input bit d);
    wr(S2 + R_WFIFO, {16'd0, p, d, 7'(c), 7'(r)});
    if (p) n_cfg_p++; else n_cfg_m++;
  endtask

  // drain the RFIFO and add every hit to the map
  task automatic drain(ref int map [NPIX], output int n);
    logic [31:0] st, lo, hi;
    n = 0;
    rd(S2 + R_STATUS, st);
    while (!st[2]) begin
      int a, c, r;
      rd(S2 + R_RFIFO_LO, lo);
      rd(S2 + R_RFIFO_HI, hi);
      a = int'(lo[13:0]);
      r = (a >> 1) & ((1 << RB) - 1);
      c = ((a >> (RB + 1)) << 1) | (a & 1);
      map[c*ROWS + r]++;
      n++;
      rd(S2 + R_STATUS, st);
    end
  endtask

  task automatic wait_idle();
    logic [31:0] st;
    int guard = 0;
    do begin
      repeat (20) @(negedge clk);
      rd(S2 + R_STATUS, st);
      guard++;
    end while ((st[5] || st[6] || st[4] || dut.u_slave2.u_chip_ctrl.rs != 0) && guard < 500);
  endtask

  bit pen [NPIX], msk [NPIX];

  initial begin
    logic [31:0] d;
    logic e;
    int map [NPIX];
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // slave 0 link test, slave 1 DAC frame
    wr(S0 + 1, 32'h1234_5678); rd(S0 + 1, d); chk(d == 32'h1234_5678, "scratch");
    wr(S1 + 0, 32'h0031_8000);
    repeat (200) @(negedge clk);
    rd(S1 + 1, d); chk(d == {16'd1, 16'd0}, "DAC frame sent");

    // short timing: pulses 20 cycles, strobe 10 cycles after the pulse, reads 8 wide every 14, delay 3
    wr(S2 + R_PULSE_NUM, 1);   wr(S2 + R_PULSE_WIDTH, 20); wr(S2 + R_PULSE_PERIOD, 40);
    wr(S2 + R_STROBE_DELAY, 10); wr(S2 + R_STROBE_WIDTH, 5);
    wr(S2 + R_READ_PERIOD, 14); wr(S2 + R_READ_DELAY, 3);  wr(S2 + R_READ_WIDTH, 8);

    // pulse-enable pattern and a few masks
    for (int i = 0; i < 10; i++) begin
      int c, r;
      c = $urandom_range(COLS-1);
      r = $urandom_range(ROWS-1);
      pen[c*ROWS + r] = 1;
      cfg_pixel(1, c, r, 1);
    end
    pen[0] = 1; cfg_pixel(1, 0, 0, 1);                   // Pixel[0,0]
    pen[NPIX-1] = 1; cfg_pixel(1, COLS-1, ROWS-1, 1);
    for (int i = 0; i < 3; i++) begin
      int c, r;
      c = $urandom_range(COLS-1);
      r = $urandom_range(ROWS-1);
      if (c*ROWS + r != 0) begin msk[c*ROWS + r] = 1; cfg_pixel(0, c, r, 1); end
    end
    wait_idle();
    rd(S2 + R_CFG_DONE, d); chk(d == 32'(n_cfg_m + n_cfg_p), "configuration words applied");

    // three pulses in continuous mode, each read out
    foreach (map[i]) map[i] = 0;
    for (int p = 0; p < 3; p++) begin
      wr(S2 + R_CTRL, 32'b110);
      wait_idle();
      drain(map, n);
      n_pulse_hits += n;
    end
    for (int i = 0; i < NPIX; i++)
      chk(map[i] == ((pen[i] && !msk[i]) ? 3 : 0), $sformatf("hit map pixel col %0d row %0d: %0d", i / ROWS, i % ROWS, map[i]));

    // trigger mode: Dout outside the strobe window is lost
    wr(S2 + R_CTRL, 32'b011);                 // trigger, readout on, no start
    dout[3*ROWS + 2] = 1; repeat (3) @(negedge clk); dout = '0;
    wait_idle();
    foreach (map[i]) map[i] = 0;
    drain(map, n);
    chk(n == 0, "hit outside strobe lost");
    if (n == 0) n_trig_lost++;
    // a test pulse inside the window is read
    wr(S2 + R_CTRL, 32'b111);
    wait_idle();
    drain(map, n);
    chk(map[0] == 1, "pulse inside strobe window read");
    if (map[0] == 1) n_trig_hit++;

    // overflow: the whole array hit at once, 16-word RFIFO
    wr(S2 + R_CTRL, 32'b010);                 // continuous
    dout = '1; repeat (3) @(negedge clk); dout = '0;
    wait_idle();
    rd(S2 + R_DROPPED, d);
    n = 0;
    foreach (msk[i]) n += int'(!msk[i]);
    chk(d == 32'(n - 16), $sformatf("dropped %0d", d));
    n_drop = int'(d);
    foreach (map[i]) map[i] = 0;
    drain(map, n);
    chk(n == 16, "RFIFO full");

    // GRST clears hits waiting in the array
    wr(S2 + R_CTRL, 32'b000);                 // readout off
    dout = '1; repeat (3) @(negedge clk); dout = '0;
    repeat (6) @(negedge clk);
    chk(chip_valid, "hits waiting");
    wr(S0 + 0, 32'h2);
    repeat (30) @(negedge clk);
    chk(!chip_valid, "GRST cleared the array");

    // system reset restores the registers
    wr(S0 + 0, 32'h1);
    repeat (30) @(negedge clk);
    rd(S2 + R_READ_WIDTH, d); chk(d == 220, "system reset restores defaults");
    rd(S2 + R_DROPPED, d);    chk(d == 0, "system reset clears counters");

    // unmapped address
    u_bfm.read(32'h1000, d, e); chk(e, "unmapped address gives err"); if (e) n_err++;

    // every mechanism happened
    chk(n_cfg_m > 0,  "mask configuration");
    chk(n_cfg_p > 0,  "pulse-enable configuration");
    chk(n_pulse_hits > 0, "pulse hits read");
    chk(n_read > 0,   "Read pulses");
    chk(n_freeze > 0, "Freeze");
    chk(n_sync > 0,   "Sync reset");
    chk(n_trig_lost > 0 && n_trig_hit > 0, "trigger mode gating");
    chk(n_drop > 0,   "RFIFO overflow");
    chk(n_grst > 0,   "GRST");
    chk(n_sysrst > 0, "system reset");
    chk(n_dac_bits == 32, $sformatf("DAC bits %0d", n_dac_bits));
    chk(n_err > 0,    "IPbus error");
    $display("mechanisms: cfg_m=%0d cfg_p=%0d hits=%0d reads=%0d freeze=%0d sync=%0d trig=%0d/%0d dropped=%0d grst=%0d sysrst=%0d dac_bits=%0d err=%0d",
             n_cfg_m, n_cfg_p, n_pulse_hits, n_read, n_freeze, n_sync, n_trig_lost, n_trig_hit, n_drop, n_grst, n_sysrst, n_dac_bits, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
