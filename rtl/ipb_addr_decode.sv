// ipb_addr_decode: address decoder of the IPbus fabric. It maps an IPbus
// word address to the number of the slave that owns it.
//
// Address map (this design's choice; the document only names the three
// slaves): bits [6:5] select the slave, bits [4:0] are the register inside
// it, and all other bits must be zero.
//   0x00-0x1F  slave 0, global device (system reset)
//   0x20-0x3F  slave 1, DAC70004 device
//   0x40-0x5F  slave 2, CPV-4 device
// Anything else gives hit = 0 and the fabric answers with an error.
// Combinational.
module ipb_addr_decode
  import cpv4_pkg::*;
(
  input  logic [31:0] addr,
  output logic [1:0]  sel,   // slave number
  output logic        hit    // the address belongs to a slave
);

  always_comb begin
    sel = addr[6:5];
    hit = (addr[31:7] == '0) && (addr[6:5] < 2'(N_SLAVES));
  end

endmodule
