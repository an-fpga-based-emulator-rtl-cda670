// tb_ipb_slave_cpv4: slave 2 with a small RFIFO (4 words) against a model
// chip. Checks the reset values and read-back of every timing register,
// that WFIFO words appear on the configuration bus with the right enable,
// that the start bit produces the programmed number of pulses, that hits
// presented by the model chip come back through RFIFO_LO/RFIFO_HI in order
// with their addresses (only the RFIFO_HI read pops), and that hits beyond the RFIFO's room are counted as
// dropped.
module tb_ipb_slave_cpv4;
  import cpv4_pkg::*;
  logic clk = 0, rst_n = 0;
  ipb_wbus_t ipb_w;
  ipb_rbus_t ipb_r;
  logic cnfg_data, cnfg_wr_m, cnfg_wr_p, pulse_d, strobe, read, valid;
  logic [6:0] col_sel, row_selm, row_selp;
  logic [13:0] addr;
  int checks = 0, failures = 0;

  ipb_slave_cpv4 #(.WF_DEPTH(8), .RF_DEPTH(4)) dut (
    .clk, .rst_n, .ipb_in(ipb_w), .ipb_out(ipb_r),
    .cnfg_data, .col_sel, .row_selm, .row_selp, .cnfg_wr_m, .cnfg_wr_p,
    .pulse_d, .strobe, .read, .valid, .addr);
  ipb_master_bfm u_bfm (.clk, .ipb_w, .ipb_r);

  always #5 clk = ~clk;

  // model chip: a list of pending addresses; a Read removes the head two
  // cycles after it falls
  int pend[$];
  int rm = 0, pulses = 0;
  logic rd_q = 0, pd_q = 0;
  assign valid = (pend.size() > 0);
  assign addr  = valid ? 14'(pend[0]) : 14'd0;
  always @(negedge clk) begin
    rd_q <= read;
    pd_q <= pulse_d;
    if (rst_n && pulse_d && !pd_q) pulses++;
    if (!read && rd_q) rm = 2;
    else if (rm > 0) begin rm--; if (rm == 0) void'(pend.pop_front()); end
  end

  // configuration writes seen on the bus
  string cfg_log[$];
  logic wm_q = 0, wp_q = 0;
  always @(posedge clk) begin
    wm_q <= cnfg_wr_m; wp_q <= cnfg_wr_p;
    if (rst_n && cnfg_wr_m && !wm_q) cfg_log.push_back($sformatf("M c%0d r%0d d%0d", col_sel, row_selm, cnfg_data));
    if (rst_n && cnfg_wr_p && !wp_q) cfg_log.push_back($sformatf("P c%0d r%0d d%0d", col_sel, row_selp, cnfg_data));
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam logic [31:0] BASE = 32'h40;

  initial begin
    logic [31:0] d, lo, hi;
    logic e;
    logic [31:0] defaults [9];
    defaults = '{32'h2, 32'd1, 32'd300, 32'd1000, 32'd250, 32'd60, 32'd400, 32'd20, 32'd220};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 9; r++) begin
      u_bfm.read(BASE + r, d, e);
      chk(!e && d == defaults[r], $sformatf("reset value of register %0d: %0d", r, d));
    end
    // short timing for the test
    u_bfm.write(BASE + R_PULSE_NUM, 2, e);
    u_bfm.write(BASE + R_PULSE_WIDTH, 5, e);
    u_bfm.write(BASE + R_PULSE_PERIOD, 30, e);
    u_bfm.write(BASE + R_READ_PERIOD, 12, e);
    u_bfm.write(BASE + R_READ_DELAY, 3, e);
    u_bfm.write(BASE + R_READ_WIDTH, 4, e);
    u_bfm.read(BASE + R_READ_WIDTH, d, e);  chk(d == 4, "read-back");

    // configuration: one mask word, one pulse word
    u_bfm.write(BASE + R_WFIFO, {16'd0, 1'b0, 1'b1, 7'd5, 7'd9}, e);  chk(!e, "wfifo write");
    u_bfm.write(BASE + R_WFIFO, {16'd0, 1'b1, 1'b1, 7'd127, 7'd0}, e);
    repeat (30) @(negedge clk);
    chk(cfg_log.size() == 2, "two configuration writes");
    if (cfg_log.size() == 2) begin
      chk(cfg_log[0] == "M c5 r9 d1", cfg_log[0]);
      chk(cfg_log[1] == "P c127 r0 d1", cfg_log[1]);
    end
    u_bfm.read(BASE + R_CFG_DONE, d, e);  chk(d == 2, "configuration words counted");

    // pulses
    u_bfm.write(BASE + R_CTRL, 32'b110, e);   // start, readout on, continuous
    repeat (80) @(negedge clk);
    chk(pulses == 2, $sformatf("pulses %0d", pulses));

    // hits: 6 addresses, only 4 fit in the RFIFO
    pend = '{14'h0012, 14'h0100, 14'h1abc, 14'h2001, 14'h3fff, 14'h0777};
    repeat (120) @(negedge clk);
    chk(pend.size() == 0, "all hits read from the chip");
    u_bfm.read(BASE + R_STATUS, d, e);
    chk(d[31:16] == 4 && d[3] && !d[2], "RFIFO full with 4 words");
    u_bfm.read(BASE + R_DROPPED, d, e);  chk(d == 2, $sformatf("dropped %0d", d));
    begin
      int exp_a [4] = '{'h0012, 'h0100, 'h1abc, 'h2001};
      logic [47:0] last_ts = 0;
      for (int i = 0; i < 4; i++) begin
        u_bfm.read(BASE + R_RFIFO_LO, lo, e);
        u_bfm.read(BASE + R_STATUS, d, e);
        chk(d[31:16] == 32'(4 - i), "reading the low word leaves the RFIFO alone");
        u_bfm.read(BASE + R_RFIFO_HI, hi, e);
        chk(lo[13:0] == 14'(exp_a[i]), $sformatf("hit %0d address %h", i, lo[13:0]));
        chk({hi, lo[31:16]} > last_ts, "timestamps increase");
        last_ts = {hi, lo[31:16]};
      end
    end
    u_bfm.read(BASE + R_STATUS, d, e);  chk(d[2] && d[31:16] == 0, "RFIFO empty");
    u_bfm.read(BASE + R_READS_DONE, d, e);  chk(d == 6, "reads counted");
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
