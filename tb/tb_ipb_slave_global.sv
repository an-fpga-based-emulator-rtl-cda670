// tb_ipb_slave_global: writes the reset and GRST bits of slave 0 and checks
// that each pulse lasts exactly its number of cycles, that the status
// register shows it, and that the scratch register reads back.
module tb_ipb_slave_global;
  import cpv4_pkg::*;
  logic clk = 0, rst_n = 0, sys_rst, grst;
  ipb_wbus_t ipb_w;
  ipb_rbus_t ipb_r;
  int checks = 0, failures = 0;
  int rst_len = 0, grst_len = 0;

  ipb_slave_global #(.RST_CYCLES(16), .GRST_CYCLES(9)) dut (
    .clk, .rst_n, .ipb_in(ipb_w), .ipb_out(ipb_r), .sys_rst, .grst);
  ipb_master_bfm u_bfm (.clk, .ipb_w, .ipb_r);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    rst_len  <= rst_len  + int'(sys_rst);
    grst_len <= grst_len + int'(grst);
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    logic e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    u_bfm.write(32'h1, 32'hCAFE_0123, e); chk(!e, "scratch write");
    u_bfm.read(32'h1, d, e);              chk(!e && d == 32'hCAFE_0123, "scratch read");
    chk(!sys_rst && !grst, "idle");
    u_bfm.write(32'h0, 32'h2, e);         chk(!e, "grst write");
    u_bfm.read(32'h0, d, e);              chk(d == 32'h2, "grst status");
    repeat (20) @(negedge clk);
    chk(grst_len == 9 && rst_len == 0, $sformatf("GRST length %0d", grst_len));
    u_bfm.write(32'h0, 32'h1, e);
    repeat (30) @(negedge clk);
    chk(rst_len == 16, $sformatf("reset length %0d", rst_len));
    u_bfm.read(32'h0, d, e);              chk(d == 32'h0, "status idle");
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
