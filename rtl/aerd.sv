// aerd: one 4-input AERD (Asynchronized Encoder Reset Decoder) cell.
//
// Encoder: of the four input states, the one with the lowest index wins
// (index 0 has the highest priority, as in the chip's priority order) and
// its index is the 2-bit address. Valid is the OR of the four states and is
// the state this cell presents to the next level up.
// Reset decoder: the Sync coming down from the level above is passed only to
// the winning input, so only the pixel being read is reset.
// Address bus: the cells of one level share an address bus in the chip.
// Here a cell drives its address only while en (the grant from the level
// above) is high and drives zero otherwise, so the bus is the OR of all
// cells of a level. en_o passes the grant on to the winning input.
// Purely combinational. Which four inputs a cell serves and the 2-bit
// address per level follow the chip description; the lowest-index-first
// rule follows the printed priority arrows; en/en_o are this design's
// stand-in for the shared bus.
module aerd (
  input  logic [3:0] state,   // State_0..State_3 from the level below
  input  logic       en,      // this cell is on the granted path
  input  logic       sync,    // Sync from the level above
  output logic       valid,   // OR of the states
  output logic [1:0] addr,    // encoded address, zero unless en
  output logic [3:0] en_o,    // grant to the winning input
  output logic [3:0] sync_o   // Sync_0..Sync_3 to the level below
);

  logic [1:0] win;
  logic [3:0] onehot;

  always_comb begin
    win = 2'd0;
    if      (state[0]) win = 2'd0;
    else if (state[1]) win = 2'd1;
    else if (state[2]) win = 2'd2;
    else if (state[3]) win = 2'd3;
  end

  assign valid  = |state;
  assign onehot = valid ? (4'b0001 << win) : 4'b0000;
  assign addr   = en ? win : 2'd0;
  assign en_o   = en   ? onehot : 4'b0000;
  assign sync_o = sync ? onehot : 4'b0000;

endmodule
