// tb_ipb_fabric: three model slaves answer after different delays with data
// tagged by their number. Checks that every address reaches the right slave
// and only that one, that the answer comes back, and that addresses no
// slave owns are answered with err.
module tb_ipb_fabric;
  import cpv4_pkg::*;
  logic clk = 0, rst_n = 0;
  ipb_wbus_t m_w, s_w [N_SLAVES];
  ipb_rbus_t m_r, s_r [N_SLAVES];
  int checks = 0, failures = 0;
  int strobes [N_SLAVES];

  ipb_fabric dut (.clk, .rst_n, .ipb_in(m_w), .ipb_out(m_r), .ipb_to_slaves(s_w), .ipb_from_slaves(s_r));
  ipb_master_bfm u_bfm (.clk, .ipb_w(m_w), .ipb_r(m_r));

  always #5 clk = ~clk;

  // model slaves: slave i acks after i+1 cycles
  for (genvar i = 0; i < N_SLAVES; i++) begin : g_slave
    int wait_n = 0;
    always @(posedge clk) begin
      s_r[i].ack <= 1'b0;
      s_r[i].err <= 1'b0;
      if (s_w[i].strobe && !s_r[i].ack) begin
        if (wait_n == i) begin
          s_r[i].ack   <= 1'b1;
          s_r[i].rdata <= {8'(i), s_w[i].addr[23:0]};
          strobes[i]   <= strobes[i] + 1;
          wait_n <= 0;
        end else wait_n <= wait_n + 1;
      end
    end
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    logic e;
    int exp_str [N_SLAVES];
    foreach (strobes[i]) begin strobes[i] = 0; exp_str[i] = 0; end
    foreach (s_r[i]) s_r[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] a;
      int s;
      a = {25'd0, 7'($urandom)};
      if (n % 10 == 9) a[20] = 1'b1;          // outside the map
      s = a[6:5];
      u_bfm.read(a, d, e);
      if (a[31:7] != 0 || s >= N_SLAVES) chk(e, $sformatf("err for %h", a));
      else begin
        exp_str[s]++;
        chk(!e && d == {8'(s), a[23:0]}, $sformatf("read %h -> %h", a, d));
      end
    end
    foreach (strobes[i]) chk(strobes[i] == exp_str[i], $sformatf("slave %0d accesses %0d/%0d", i, strobes[i], exp_str[i]));
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
