// tb_cfg_fifo_ctrl: feeds random configuration words to the FIFO control
// from a queue standing in for the WFIFO and watches the chip-side bus. For
// every word it checks: the selects and data are driven for SETUP cycles
// before the write enable, the enable of the target latch (only) is high for
// exactly WRITE cycles with the word's column, row and data, the selects
// stay put for HOLD cycles after it, and back-to-back words follow each
// other every 1+SETUP+WRITE+HOLD cycles. Idle selects must read 7F.
module tb_cfg_fifo_ctrl;
  import cpv4_pkg::*;
  localparam int SETUP = 2, WRITE = 4, HOLD = 2;
  logic clk = 0, rst_n = 0, fifo_empty, fifo_pop;
  logic [31:0] fifo_dout;
  logic cnfg_data, cnfg_wr_m, cnfg_wr_p, busy;
  logic [6:0] col_sel, row_selm, row_selp;
  logic [31:0] words_done;
  int checks = 0, failures = 0;
  cfg_word_t q[$];

  assign fifo_empty = (q.size() == 0);
  assign fifo_dout  = fifo_empty ? 32'h0 : 32'(q[0]);

  cfg_fifo_ctrl #(.SETUP(SETUP), .WRITE(WRITE), .HOLD(HOLD)) dut (.*);

  always #5 clk = ~clk;
  // the queue moves half a cycle after the pop, away from the DUT's edge
  logic pop_q = 0;
  always @(posedge clk) pop_q <= fifo_pop;
  always @(negedge clk) if (pop_q) void'(q.pop_front());

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic bus_is(cfg_word_t w);
    return col_sel == w.col && cnfg_data == w.data &&
           (w.target_p ? (row_selp == w.row && row_selm == 7'h7f)
                       : (row_selm == w.row && row_selp == 7'h7f));
  endfunction

  initial begin
    cfg_word_t sent[$];
    int first_en[$];
    int cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(col_sel == 7'h7f && row_selm == 7'h7f && row_selp == 7'h7f, "idle 7F");
    for (int n = 0; n < 60; n++) begin
      cfg_word_t w;
      w = cfg_word_t'($urandom);
      w.unused = '0;
      q.push_back(w);
      sent.push_back(w);
    end
    // follow the words one by one
    for (int n = 0; n < 60; n++) begin
      cfg_word_t w;
      int en_cycles, setup_cycles;
      en_cycles = 0;
      w = sent[n];
      // wait for the enable
      setup_cycles = 0;
      while (!(cnfg_wr_m || cnfg_wr_p)) begin
        if (bus_is(w)) setup_cycles++;
        @(negedge clk); cyc++;
      end
      chk(setup_cycles == SETUP, $sformatf("setup length %0d", setup_cycles));
      first_en.push_back(cyc);
      while (cnfg_wr_m || cnfg_wr_p) begin
        en_cycles++;
        chk(cnfg_wr_p == w.target_p && cnfg_wr_m == !w.target_p, "enable of the target latch");
        chk(bus_is(w), "bus during write");
        @(negedge clk); cyc++;
      end
      chk(en_cycles == WRITE, $sformatf("write length %0d", en_cycles));
      for (int h = 0; h < HOLD; h++) begin
        chk(bus_is(w), "bus during hold");
        @(negedge clk); cyc++;
      end
      if (n > 0) chk(first_en[n] - first_en[n-1] == 1 + SETUP + WRITE + HOLD, "word period");
    end
    @(negedge clk);
    chk(col_sel == 7'h7f && !busy, "idle at end");
    chk(words_done == 32'd60, "words counted");
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
