// tb_aerd_tree: checks the AERD cascade at the in-column size (4 levels,
// 256 inputs) and the end-of-column size (3 levels, 64 inputs) with random
// sparse and dense input patterns. The reference is the lowest set index.
module tb_aerd_tree;
  int checks = 0, failures = 0;

  logic [255:0] st4, en4, sy4;
  logic         e4, s4, v4;
  logic [7:0]   a4;
  logic [63:0]  st3, en3, sy3;
  logic         e3, s3, v3;
  logic [5:0]   a3;

  aerd_tree #(.LEVELS(4)) dut4 (.state(st4), .en(e4), .sync(s4), .valid(v4), .addr(a4), .en_o(en4), .sync_o(sy4));
  aerd_tree #(.LEVELS(3)) dut3 (.state(st3), .en(e3), .sync(s3), .valid(v3), .addr(a3), .en_o(en3), .sync_o(sy3));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int i4, i3;
      st4 = '0; st3 = '0;
      // mostly sparse patterns, some dense, some empty
      if (n % 7 != 0) begin
        int k = (n % 3 == 0) ? 40 : 1 + int'($urandom_range(3));
        for (int j = 0; j < k; j++) begin
          st4[$urandom_range(255)] = 1'b1;
          st3[$urandom_range(63)]  = 1'b1;
        end
      end
      e4 = 1'($urandom); s4 = 1'($urandom); e3 = 1'($urandom); s3 = 1'($urandom);
      if (n < 16) begin e4 = 1; s4 = 1; e3 = 1; s3 = 1; end
      i4 = -1; for (int j = 255; j >= 0; j--) if (st4[j]) i4 = j;
      i3 = -1; for (int j = 63;  j >= 0; j--) if (st3[j]) i3 = j;
      #1;
      check(v4 == (i4 >= 0), "valid4");
      check(a4 == ((e4 && i4 >= 0) ? 8'(i4) : 8'd0), "addr4");
      check(sy4 == ((s4 && i4 >= 0) ? (256'(1) << i4) : '0), "sync4");
      check(en4 == ((e4 && i4 >= 0) ? (256'(1) << i4) : '0), "en4");
      check(v3 == (i3 >= 0), "valid3");
      check(a3 == ((e3 && i3 >= 0) ? 6'(i3) : 6'd0), "addr3");
      check(sy3 == ((s3 && i3 >= 0) ? (64'(1) << i3) : '0), "sync3");
      check(en3 == ((e3 && i3 >= 0) ? (64'(1) << i3) : '0), "en3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
