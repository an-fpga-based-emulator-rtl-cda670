// tb_chip_ctrl: runs the chip control against a simple chip model (a count
// of pending hits; Valid while any is pending; each Read removes one, two
// cycles after Read falls, and moves the address on by one). It measures
// every edge and checks: pulse count, Pulse_Width and Pulse_Period; in
// trigger mode Strobe_Delay and Strobe_Width, in continuous mode Strobe
// held high; Read_Delay from Valid to the first Read, Read_Width, and
// Read_Period between reads; the addresses handed on, in order, once each;
// no reads while readout is disabled.
module tb_chip_ctrl;
  import cpv4_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, readout_en = 1, valid;
  op_mode_e mode = MODE_TRIGGER;
  timing_t tp;
  logic [13:0] addr;
  logic pulse_d, strobe, read, hit_stb, pulse_busy;
  logic [13:0] hit_addr;
  logic [31:0] reads_done;
  int checks = 0, failures = 0;

  chip_ctrl dut (.*);

  always #5 clk = ~clk;

  // chip model
  int pending = 0, next_addr = 0, rm_timer = 0;
  assign valid = (pending > 0);
  assign addr  = 14'(next_addr);

  // edge bookkeeping
  int cyc = 0;
  int p_rise[$], p_fall[$], s_rise[$], s_fall[$], r_rise[$], r_fall[$], v_rise[$];
  logic pd_q = 0, st_q = 0, rd_q = 0, v_q = 0;
  int got_addr[$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    pd_q <= pulse_d; st_q <= strobe; rd_q <= read; v_q <= valid;
    if (pulse_d && !pd_q) p_rise.push_back(cyc);
    if (!pulse_d && pd_q) p_fall.push_back(cyc);
    if (strobe && !st_q)  s_rise.push_back(cyc);
    if (!strobe && st_q)  s_fall.push_back(cyc);
    if (read && !rd_q)    r_rise.push_back(cyc);
    if (!read && rd_q)    r_fall.push_back(cyc);
    if (valid && !v_q)    v_rise.push_back(cyc);
    if (hit_stb) got_addr.push_back(int'(hit_addr));
  end

  always @(negedge clk) begin
    if (!read && rd_q) rm_timer = 2;
    else if (rm_timer > 0) begin
      rm_timer--;
      if (rm_timer == 0) begin pending--; next_addr++; end
    end
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic clear_log();
    p_rise.delete(); p_fall.delete(); s_rise.delete(); s_fall.delete();
    r_rise.delete(); r_fall.delete(); v_rise.delete(); got_addr.delete();
  endtask

  initial begin
    tp = '{pulse_num: 16'd3, pulse_width: 32'd7, pulse_period: 32'd40,
           strobe_delay: 32'd5, strobe_width: 32'd4,
           read_period: 32'd12, read_delay: 32'd3, read_width: 32'd5};
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // ---- trigger mode: pulses and strobe windows, no hits
    clear_log();
    start = 1; @(negedge clk); start = 0;
    repeat (150) @(negedge clk);
    chk(p_rise.size() == 3 && p_fall.size() == 3, $sformatf("pulse count %0d", p_rise.size()));
    foreach (p_rise[i]) begin
      chk(p_fall[i] - p_rise[i] == 7, "Pulse_Width");
      if (i > 0) chk(p_rise[i] - p_rise[i-1] == 40, "Pulse_Period");
      chk(s_rise[i] - p_rise[i] == 5, "Strobe_Delay");
      chk(s_fall[i] - s_rise[i] == 4, "Strobe_Width");
    end
    chk(r_rise.size() == 0, "no read without Valid");
    chk(!pulse_busy, "pulses done");

    // ---- readout of 6 hits
    clear_log();
    pending = 6;
    repeat (150) @(negedge clk);
    chk(r_rise.size() == 6, $sformatf("read count %0d", r_rise.size()));
    chk(v_rise.size() == 1 && r_rise[0] - v_rise[0] == 3, "Read_Delay");
    foreach (r_rise[i]) begin
      chk(r_fall[i] - r_rise[i] == 5, "Read_Width");
      if (i > 0) chk(r_rise[i] - r_rise[i-1] == 12, "Read_Period");
    end
    chk(got_addr.size() == 6, "addresses handed on");
    foreach (got_addr[i]) chk(got_addr[i] == i, $sformatf("address %0d = %0d", i, got_addr[i]));
    chk(reads_done == 32'd6, "reads counted");

    // ---- a read period shorter than the width plus the chip's latency
    clear_log();
    tp.read_period = 32'd5;
    pending = 3;
    repeat (100) @(negedge clk);
    chk(got_addr.size() == 3, "short period: three reads");
    foreach (got_addr[i]) chk(got_addr[i] == 6 + i, "short period: no stale address");
    tp.read_period = 32'd12;

    // ---- readout disabled
    clear_log();
    readout_en = 0;
    pending = 2;
    repeat (60) @(negedge clk);
    chk(r_rise.size() == 0, "no read while disabled");
    readout_en = 1;
    repeat (60) @(negedge clk);
    chk(r_rise.size() == 2, "reads once enabled");

    // ---- continuous mode: Strobe held high
    clear_log();
    mode = MODE_CONTINUOUS;
    start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < 130; i++) begin
      chk(strobe == 1'b1, "continuous strobe");
      @(negedge clk);
    end
    chk(p_rise.size() == 3, "continuous pulses");

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
