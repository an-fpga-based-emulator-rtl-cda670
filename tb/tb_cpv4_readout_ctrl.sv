// tb_cpv4_readout_ctrl: drives Read pulses of several widths and checks,
// cycle by cycle, that Freeze = Read(t-1) OR Read(t-1-DELAY) and
// Sync = Read(t-1) AND Read(t-1-DELAY), i.e. Freeze encloses Sync by DELAY
// cycles on both sides.
module tb_cpv4_readout_ctrl;
  localparam int DELAY = 4;
  logic clk = 0, rst_n = 0, read = 0, freeze, sync;
  int checks = 0, failures = 0;
  int sync_cycles = 0, freeze_cycles = 0, exp_freeze;
  logic [63:0] hist = '0;   // hist[k] = Read k+1 cycles ago

  cpv4_readout_ctrl #(.DELAY(DELAY)) dut (.clk, .rst_n, .read, .freeze, .sync);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n) begin
      logic ef, es;
      ef = hist[0] | hist[DELAY];
      es = hist[0] & hist[DELAY];
      checks++;
      if (freeze !== ef || sync !== es) begin
        failures++;
        $display("FAIL t=%0t freeze=%b/%b sync=%b/%b", $time, freeze, ef, sync, es);
      end
      sync_cycles   += int'(sync);
      freeze_cycles += int'(freeze);
    end
    hist <= {hist[62:0], read};
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    foreach (hist[i]) hist[i] = 1'b0;
    for (int w = 1; w <= 12; w++) begin
      @(negedge clk) read = 1;
      repeat (w) @(negedge clk);
      read = 0;
      repeat (10) @(negedge clk);
    end
    // 12 reads of widths 1..12: Sync lasts w-DELAY cycles when w > DELAY
    checks++;
    if (sync_cycles != 36) begin failures++; $display("FAIL sync cycles %0d", sync_cycles); end
    // Freeze lasts w+DELAY cycles, or 2w when the two copies do not overlap
    exp_freeze = 0;
    for (int w = 1; w <= 12; w++) exp_freeze += (w < DELAY) ? 2*w : w + DELAY;
    checks++;
    if (freeze_cycles != exp_freeze) begin failures++; $display("FAIL freeze cycles %0d", freeze_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
