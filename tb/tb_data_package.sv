// tb_data_package: sends addresses to the data package and checks each hit
// word pushed: address in [13:0], zeros in [15:14] and the timestamp in
// [63:16] equal to the cycles since reset at the hit; with the FIFO marked
// full the word must be dropped and counted instead.
module tb_data_package;
  logic clk = 0, rst_n = 0, hit_stb = 0, fifo_full = 0, fifo_push;
  logic [13:0] hit_addr = 0;
  logic [63:0] fifo_din;
  logic [31:0] dropped;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int exp_drop = 0;

  data_package dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      longint ts;
      logic [13:0] a;
      repeat ($urandom_range(5)) @(negedge clk);
      a = 14'($urandom);
      fifo_full = ($urandom_range(9) == 0);
      hit_addr = a; hit_stb = 1;
      ts = cyc;
      @(negedge clk);
      hit_stb = 0;
      if (fifo_full) begin
        exp_drop++;
        chk(!fifo_push, "no push when full");
        chk(dropped == 32'(exp_drop), "drop counted");
      end else begin
        chk(fifo_push, "push");
        chk(fifo_din[13:0] == a, "address");
        chk(fifo_din[15:14] == 2'b00, "zero bits");
        chk(fifo_din[63:16] == 48'(ts), $sformatf("timestamp %0d vs %0d", fifo_din[63:16], ts));
      end
      fifo_full = 0;
      @(negedge clk);
      chk(!fifo_push, "single push");
    end
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
