// tb_aerd: exhaustive check of one 4-input AERD cell. For every state
// pattern and every en/sync value the outputs are compared with a reference
// that scans the inputs from index 0 upward.
module tb_aerd;
  logic [3:0] state, en_o, sync_o;
  logic       en, sync, valid;
  logic [1:0] addr;
  int checks = 0, failures = 0;

  aerd dut (.state, .en, .sync, .valid, .addr, .en_o, .sync_o);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s state=%b en=%b sync=%b", what, state, en, sync);
    end
  endtask

  initial begin
    for (int p = 0; p < 64; p++) begin
      int idx;
      logic [3:0] oh;
      {en, sync, state} = 6'(p);
      idx = -1;
      for (int i = 3; i >= 0; i--) if (state[i]) idx = i;
      oh = (idx >= 0) ? 4'(1 << idx) : 4'b0;
      #1;
      check(valid == (idx >= 0), "valid");
      check(addr == (en && idx >= 0 ? 2'(idx) : 2'd0), "addr");
      check(en_o == (en ? oh : 4'b0), "en_o");
      check(sync_o == (sync ? oh : 4'b0), "sync_o");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
