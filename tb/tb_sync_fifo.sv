// tb_sync_fifo: random pushes and pops on a small FIFO (depth 8) compared
// with a queue model: head word, empty, full and count every cycle, with
// runs that fill it to full and drain it to empty.
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  logic [W-1:0] din = 0, dout;
  logic [3:0] count;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      chk(count == 4'(q.size()), "count");
      if (q.size() > 0) chk(dout == q[0], "head");
      fulls   += int'(full);
      empties += int'(empty);
      bias = ((n / 200) % 2 == 0) ? 70 : 30;   // fill, then drain
      pop  = ($urandom_range(99) >= bias) && !empty;
      push = ($urandom_range(99) < bias) && (!full || pop);
      if (full && $urandom_range(3) == 0) begin pop = 1; push = 1; end
      din  = W'($urandom);
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    chk(fulls > 0 && empties > 0, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
