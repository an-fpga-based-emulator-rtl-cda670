// tb_cpv4_pixel: directed test of one pixel. It checks the hit latency
// (State_out three cycles after a Dout edge), the hold of State_out while
// Sync is high and its clearing after Sync, masking through Latch_M, the
// select gating of both configuration latches, test-pulse injection through
// Latch_P, the Strobe window, Freeze and GRST.
module tb_cpv4_pixel;
  logic clk = 0, rst_n = 0;
  logic cnfg_data = 0, col_sel = 0, rowsel_m = 0, rowsel_p = 0;
  logic dout = 0, pulse_d = 0, strobe = 1, freeze = 0, grst = 0, sync = 0;
  logic state_out;
  int checks = 0, failures = 0;

  cpv4_pixel dut (.*);

  always #5 clk = ~clk;

  task automatic step(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic check(input logic exp, input string what);
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL %s: state_out=%b expected %b at %0t", what, state_out, exp, $time);
    end
  endtask

  task automatic write_cfg(input logic m, input logic p, input logic d, input logic c);
    cnfg_data = d; col_sel = c; rowsel_m = m; rowsel_p = p;
    step();
    col_sel = 0; rowsel_m = 0; rowsel_p = 0; cnfg_data = 0;
  endtask

  // Dout edge, latency check, then read out with Sync
  task automatic hit_and_read(input string what);
    dout = 1;
    step(); check(0, {what, " +1"});
    step(); check(0, {what, " +2"});
    step(); check(1, {what, " +3"});
    dout = 0;
    sync = 1;
    step(3); check(1, {what, " held during sync"});
    sync = 0;
    step(); check(0, {what, " cleared after sync"});
  endtask

  task automatic no_hit(input string what);
    step(4); check(0, what);
    dout = 0; pulse_d = 0;
    step(2);
  endtask

  initial begin
    step(2);
    rst_n = 1;
    step();
    check(0, "after reset");

    hit_and_read("dout hit");

    // mask: Latch_M = 1 blocks hits
    write_cfg(1, 0, 1, 1);
    dout = 1; no_hit("masked");
    // select gating: without Colsel, or with Rowsel_P, Latch_M keeps 1
    write_cfg(1, 0, 0, 0);
    write_cfg(0, 1, 0, 1);
    dout = 1; no_hit("mask kept");
    write_cfg(1, 0, 0, 1);          // unmask
    hit_and_read("unmasked");

    // test pulse needs Latch_P
    pulse_d = 1; no_hit("pulse without Latch_P");
    write_cfg(0, 1, 1, 0);          // no Colsel: no write
    pulse_d = 1; no_hit("pulse, Latch_P not written");
    write_cfg(0, 1, 1, 1);
    pulse_d = 1;
    step(3); check(1, "pulse hit");
    pulse_d = 0;
    sync = 1; step(); sync = 0; step(); check(0, "pulse hit read");

    // Strobe low clears Latch_1: no hit; opening Strobe with Dout still
    // high lets the hit in
    strobe = 0; dout = 1;
    step(4); check(0, "strobe closed");
    strobe = 1;
    step(3); check(1, "strobe opened");
    dout = 0; sync = 1; step(); sync = 0; step(2);

    // Freeze holds Latch_1: a Dout edge during Freeze waits for its end
    freeze = 1; dout = 1;
    step(4); check(0, "frozen");
    freeze = 0;
    step(3); check(1, "after freeze");
    dout = 0;

    // GRST clears the hit
    grst = 1; step(); grst = 0; step(); check(0, "grst");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
