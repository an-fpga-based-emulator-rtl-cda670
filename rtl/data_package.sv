// data_package: packs each address read from the chip into a 64-bit hit
// word (Hitdata[63:0]) and pushes it into the RFIFO.
//
// The hit word (cpv4_pkg::hit_word_t) carries Addr[13:0] in bits [13:0] and
// a 48-bit timestamp in bits [63:16]: the number of FPGA clock cycles since
// reset at the cycle the address was taken. The DAQ decodes addresses and
// timestamps from these words; the exact layout is this design's choice.
// When the RFIFO is full the word is dropped and counted in `dropped`, so
// the hit stream never stalls the readout.
// Timing: the word is pushed the cycle after hit_stb.
module data_package
  import cpv4_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hit_stb,
  input  logic [13:0] hit_addr,
  input  logic        fifo_full,
  output logic        fifo_push,
  output logic [63:0] fifo_din,
  output logic [31:0] dropped
);

  logic [47:0] timestamp;
  hit_word_t   w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timestamp <= '0;
      fifo_push <= 1'b0;
      w         <= '0;
      dropped   <= '0;
    end else begin
      timestamp <= timestamp + 1'b1;
      fifo_push <= 1'b0;
      if (hit_stb) begin
        w.timestamp <= timestamp;
        w.zero      <= 2'b00;
        w.addr      <= hit_addr;
        if (!fifo_full) fifo_push <= 1'b1;
        else            dropped   <= dropped + 1'b1;
      end
    end
  end

  assign fifo_din = w;

endmodule
