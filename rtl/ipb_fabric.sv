// ipb_fabric: IPbus fabric between the IPbus master (the UDP engine) and
// the three slaves of the readout firmware.
//
// The fabric passes the master's bus to every slave but raises the strobe
// only for the slave the address decoder picks, and returns that slave's
// read bus to the master. An access to an address no slave owns is answered
// by the fabric itself with err one cycle after the strobe, so the master
// never waits forever. IPbus handshake: the master holds strobe (with
// address, data and write) until it sees ack or err for one cycle.
// The fabric adds no register stage. Its structure is this design's own,
// following the public IPbus slave bus.
module ipb_fabric
  import cpv4_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  ipb_wbus_t ipb_in,                   // from the master
  output ipb_rbus_t ipb_out,                  // to the master
  output ipb_wbus_t ipb_to_slaves   [N_SLAVES],
  input  ipb_rbus_t ipb_from_slaves [N_SLAVES]
);

  logic [1:0] sel;
  logic       hit;
  logic       err_q;

  ipb_addr_decode u_dec (
    .addr (ipb_in.addr),
    .sel  (sel),
    .hit  (hit)
  );

  always_comb begin
    for (int i = 0; i < N_SLAVES; i++) begin
      ipb_to_slaves[i]        = ipb_in;
      ipb_to_slaves[i].strobe = ipb_in.strobe && hit && (sel == 2'(i));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_q <= 1'b0;
    else        err_q <= ipb_in.strobe && !hit && !err_q;
  end

  always_comb begin
    ipb_out = IPB_RBUS_NULL;
    if (hit) ipb_out = ipb_from_slaves[sel];
    else     ipb_out.err = err_q;
  end

  a_one_reply: assert property (@(posedge clk) disable iff (!rst_n) !(ipb_out.ack && ipb_out.err));

endmodule
