// ipb_master_bfm: IPbus master for testbenches. write() and read() put one
// transaction on the bus: address, data and write are set with strobe after
// a falling clock edge and held until ack or err is seen at a rising edge;
// strobe then drops. A transaction not answered in 100 cycles counts as an
// error. Testbenches call the tasks hierarchically (u_bfm.write(...)).
module ipb_master_bfm
  import cpv4_pkg::*;
(
  input  logic      clk,
  output ipb_wbus_t ipb_w,
  input  ipb_rbus_t ipb_r
);

  initial ipb_w = '0;

  task automatic xfer(input logic wr, input logic [31:0] addr, input logic [31:0] wdata,
                      output logic [31:0] rdata, output logic err);
    int n;
    @(negedge clk);
    ipb_w.addr   = addr;
    ipb_w.wdata  = wdata;
    ipb_w.write  = wr;
    ipb_w.strobe = 1'b1;
    n = 0;
    do begin
      @(posedge clk);
      n++;
    end while (!(ipb_r.ack || ipb_r.err) && n < 100);
    rdata = ipb_r.rdata;
    err   = ipb_r.err || !ipb_r.ack;
    @(negedge clk);
    ipb_w.strobe = 1'b0;
    ipb_w.write  = 1'b0;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] data, output logic err);
    logic [31:0] unused;
    xfer(1'b1, addr, data, unused, err);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data, output logic err);
    xfer(1'b0, addr, 32'h0, data, err);
  endtask

endmodule
