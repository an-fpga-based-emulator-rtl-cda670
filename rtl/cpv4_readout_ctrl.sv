// cpv4_readout_ctrl: the upper chip circuit that turns the firmware's Read
// into the array's Freeze and Sync.
//
// The chip drives Freeze to every pixel and Sync to the root of the AERD
// tree, both derived from Read through a delay module. What the two signals
// must do is clear from the pixel: Freeze stops new hits from entering
// Latch_1 while a pixel is being read, and Sync resets the pixel being read.
// This module makes Freeze a window that encloses Sync with DELAY cycles of
// margin on each side:
//     freeze = Read OR Read delayed by DELAY cycles
//     sync   = Read AND Read delayed by DELAY cycles
// so Sync starts DELAY cycles after Read rises and ends when Read falls, and
// Freeze starts when Read rises and ends DELAY cycles after Read falls. The
// gate-level detail and the delay value are this design's own; the chip
// only specifies a delay module between Read and these outputs.
// Both outputs are registered: they follow Read with one more cycle.
// A Read shorter than DELAY+1 cycles gives Freeze but no Sync.
module cpv4_readout_ctrl #(
  parameter int unsigned DELAY = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic read,    // Read (Sync request) from the firmware
  output logic freeze,  // Freeze to all pixels
  output logic sync     // Sync to the root of the AERD tree
);

  logic [DELAY-1:0] dly;   // delay module: shift register

  initial assert (DELAY >= 2) else $error("cpv4_readout_ctrl: DELAY must be at least 2");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly    <= '0;
      freeze <= 1'b0;
      sync   <= 1'b0;
    end else begin
      dly    <= {dly[DELAY-2:0], read};
      freeze <= read | dly[DELAY-1];
      sync   <= read & dly[DELAY-1];
    end
  end

endmodule
