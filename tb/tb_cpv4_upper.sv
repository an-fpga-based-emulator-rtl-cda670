// tb_cpv4_upper: the emulated chip at reduced size (8 x 8 pixels: 2 AERD
// levels per double column, 1 at the end of column). Through the chip's own
// ports it configures masks and pulse enables, injects hits by Dout and by
// the test pulse, reads the array out with Read pulses and checks that each
// hit pixel comes out once, in increasing address order, with address
// {column[2:1], row, column[0]}, that masked pixels never appear, that a
// Strobe window gates hits in trigger mode, that Freeze during a read holds
// back a new hit until the read ends, and that GRST clears the array.
module tb_cpv4_upper;
  localparam int DL = 2, EL = 1, ROWS = 8, COLS = 8, NPIX = 64, AW = 6;
  logic clk = 0, rst_n = 0;
  logic cnfg_data = 0, cnfg_wr_m = 0, cnfg_wr_p = 0;
  logic [2:0] col_sel = 0, row_selm = 0, row_selp = 0;
  logic [NPIX-1:0] dout = 0;
  logic pulse_d = 0, strobe = 1, read = 0, grst = 0, valid, freeze, sync;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  cpv4_upper #(.DC_LEVELS(DL), .EOC_LEVELS(EL)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int addr_of(int c, int r);
    return ((c >> 1) << 4) | (r << 1) | (c & 1);
  endfunction

  task automatic cfg(input bit p, input int c, input int r, input bit d);
    col_sel = 3'(c); cnfg_data = d;
    if (p) begin row_selp = 3'(r); cnfg_wr_p = 1; end
    else   begin row_selm = 3'(r); cnfg_wr_m = 1; end
    @(negedge clk);
    cnfg_wr_m = 0; cnfg_wr_p = 0;
    @(negedge clk);
  endtask

  // read everything out; return the addresses in read order
  task automatic read_all(output int got[$]);
    got.delete();
    repeat (4) @(negedge clk);
    while (valid) begin
      got.push_back(int'(addr));
      read = 1;
      repeat (8) @(negedge clk);
      read = 0;
      repeat (4) @(negedge clk);
      if (got.size() > NPIX) break;
    end
    repeat (4) @(negedge clk);   // let Freeze end
  endtask

  task automatic expect_set(input bit hit[NPIX], input string what);
    int got[$];
    int exp[$];
    for (int a = 0; a < NPIX; a++) if (hit[a]) exp.push_back(a);
    read_all(got);
    chk(got.size() == exp.size(), $sformatf("%s: %0d addresses, expected %0d", what, got.size(), exp.size()));
    foreach (exp[i]) if (i < got.size()) chk(got[i] == exp[i], $sformatf("%s: #%0d = %0d expected %0d", what, i, got[i], exp[i]));
  endtask

  bit masked [NPIX];   // by address
  bit pen    [NPIX];

  initial begin
    bit hit [NPIX];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!valid, "empty after reset");

    // ---- random Dout hits with some masked pixels, in continuous mode
    for (int k = 0; k < 6; k++) begin
      int c, r;
      c = $urandom_range(COLS-1);
      r = $urandom_range(ROWS-1);
      masked[addr_of(c, r)] = 1;
      cfg(0, c, r, 1);
    end
    for (int round = 0; round < 10; round++) begin
      foreach (hit[a]) hit[a] = 0;
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++)
          if ($urandom_range(3) == 0 || round == 0) begin
            dout[c*ROWS + r] = 1;
            hit[addr_of(c, r)] = !masked[addr_of(c, r)];
          end
      @(negedge clk); dout = '0;
      expect_set(hit, $sformatf("round %0d", round));
    end

    // ---- test pulse to three pixels with Latch_P set
    foreach (hit[a]) hit[a] = 0;
    cfg(0, 0, 0, 0); masked[0] = 0;
    cfg(1, 0, 0, 1);  hit[addr_of(0, 0)] = 1;
    cfg(1, 5, 3, 1);  hit[addr_of(5, 3)] = !masked[addr_of(5, 3)];
    cfg(1, 7, 7, 1);  hit[addr_of(7, 7)] = !masked[addr_of(7, 7)];
    pulse_d = 1; repeat (3) @(negedge clk); pulse_d = 0;
    expect_set(hit, "pulse");

    // ---- trigger mode: a hit outside the Strobe window is lost
    strobe = 0;
    pulse_d = 1; repeat (3) @(negedge clk); pulse_d = 0;
    repeat (4) @(negedge clk);
    chk(!valid, "no hit outside the strobe window");
    pulse_d = 1; @(negedge clk); strobe = 1; repeat (2) @(negedge clk); strobe = 0;
    @(negedge clk); pulse_d = 0;
    expect_set(hit, "pulse inside strobe window");
    strobe = 1;

    // ---- Freeze: a hit arriving during a read is held back, not lost
    cfg(0, 2, 6, 0); masked[addr_of(2, 6)] = 0;
    cfg(0, 1, 0, 0); masked[addr_of(1, 0)] = 0;
    dout[2*ROWS + 6] = 1;
    @(negedge clk); dout = '0;
    repeat (4) @(negedge clk);
    chk(valid && addr == AW'(addr_of(2, 6)), "first hit present");
    read = 1; @(negedge clk);
    dout[1*ROWS + 0] = 1;          // arrives while frozen, stays high
    repeat (3) @(negedge clk);
    chk(freeze, "freeze during read");
    chk(addr == AW'(addr_of(2, 6)), "address held during read");
    chk(dut.g_dc[0].u_dc.g_side[1].g_row[0].u_pix.hit == 1'b0, "no hit while frozen");
    repeat (4) @(negedge clk);
    read = 0;
    repeat (8) @(negedge clk);
    dout = '0;
    foreach (hit[a]) hit[a] = 0;
    hit[addr_of(1, 0)] = 1;
    expect_set(hit, "hit after freeze");

    // ---- GRST
    dout = '1; @(negedge clk); dout = '0;
    repeat (4) @(negedge clk);
    chk(valid, "array full of hits");
    grst = 1; @(negedge clk); grst = 0; repeat (2) @(negedge clk);
    chk(!valid, "GRST clears the array");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
