// tb_cpv4_double_column: a reduced double column (2 AERD levels, 2 x 8
// pixels). Random sets of pixels are hit through Dout, some pixels are
// masked; the test then reads the column out with Sync pulses and checks
// that the addresses come out in snake priority order {row, side}, each
// once, that masked pixels never appear, that Valid falls after the last one
// and that the address bus is zero while the column is not granted.
module tb_cpv4_double_column;
  localparam int L = 2, NPIX = 4**L, ROWS = NPIX/2;
  logic clk = 0, rst_n = 0;
  logic cnfg_data = 0;
  logic [1:0] col_sel = 0;
  logic [ROWS-1:0] rowsel_m = 0, rowsel_p = 0;
  logic [NPIX-1:0] dout = 0;
  logic pulse_d = 0, strobe = 1, freeze = 0, grst = 0, en = 1, sync = 0, valid;
  logic [2*L-1:0] addr;
  int checks = 0, failures = 0;

  cpv4_double_column #(.DC_LEVELS(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [NPIX-1:0] masked = '0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      logic [NPIX-1:0] hits;        // by priority index 2*row+side
      // change one mask every few rounds
      if (round % 5 == 4) begin
        int r, s;
        r = $urandom_range(ROWS-1);
        s = $urandom_range(1);
        masked[2*r+s] = ~masked[2*r+s];
        cnfg_data = masked[2*r+s];
        col_sel = 2'(1 << s); rowsel_m[r] = 1;
        @(negedge clk);
        col_sel = 0; rowsel_m = 0; cnfg_data = 0;
      end
      hits = NPIX'({$urandom, $urandom});
      if (round == 0) hits = '1;
      for (int r = 0; r < ROWS; r++)
        for (int s = 0; s < 2; s++) dout[s*ROWS + r] = hits[2*r+s];
      @(negedge clk); dout = '0;
      repeat (4) @(negedge clk);
      en = 0; #1;
      chk(addr == '0, "addr zero without grant");
      en = 1; #1;
      for (int i = 0; i < NPIX; i++) begin
        if (hits[i] && !masked[i]) begin
          chk(valid == 1'b1, "valid");
          chk(addr == (2*L)'(i), $sformatf("address %0d got %0d", i, addr));
          sync = 1;
          repeat (3) @(negedge clk);
          chk(addr == (2*L)'(i), "address held during sync");
          sync = 0;
          repeat (2) @(negedge clk);
        end
      end
      chk(valid == 1'b0, "valid low after last pixel");
    end
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
