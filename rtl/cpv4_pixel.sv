// cpv4_pixel: one pixel of the CPV-4 upper tier, modelled in the FPGA clock
// domain.
//
// The chip pixel is built from latches and an edge-triggered DFF:
//   * Latch_M stores Cnfg_data when Colsel and Rowsel_M are both active; its
//     inverted output Mask_en_x is the D input of the hit DFF, so a pixel
//     with Latch_M = 1 never records a hit (masked).
//   * Latch_P stores Cnfg_data when Colsel and Rowsel_P are both active; it
//     lets the electronic test pulse Pulse_d into the pixel.
//   * Latch_1 takes Dout OR (Latch_P AND Pulse_d). It is transparent while
//     Freeze is low, holds while Freeze is high, and is cleared while Strobe
//     is low, so in trigger mode only hits inside the Strobe window pass.
//   * The DFF is clocked by the rising edge of Latch_1 and loads Mask_en_x,
//     giving Hit. It is cleared by GRST or by this pixel's Sync.
//   * Latch_2 passes Hit to State_out while Sync is low and holds it while
//     Sync is high, so the address seen by the readout tree stays still
//     during a read even though Sync has already cleared Hit.
// This structure follows the pixel schematic. On the FPGA every latch is a
// register updated on clk: a latch is transparent one cycle late, and the
// edge on Latch_1 is found by comparing it with its value of the previous
// cycle. Latch_2 is a register too, so State_out never depends on Sync
// within a cycle; this breaks the loop State_out -> AERD tree -> Sync ->
// State_out, which the chip closes asynchronously. The configuration latches are cleared by the FPGA reset
// rst_n, which the chip does not have; this is the design's own choice so
// that simulation starts from a known, unmasked, pulse-disabled array.
//
// Timing: a rising edge of Dout/pulse at cycle t sets Latch_1 at t+1, Hit
// at t+2 and State_out at t+3. A Sync high at cycle t clears Hit at t+1;
// State_out keeps its value while Sync is high and takes Hit again the cycle
// after Sync falls.
module cpv4_pixel (
  input  logic clk,
  input  logic rst_n,      // FPGA reset, clears every register
  // configuration
  input  logic cnfg_data,  // Cnfg_data
  input  logic col_sel,    // decoded Colsel line of this column
  input  logic rowsel_m,   // decoded Rowsel_M line of this row
  input  logic rowsel_p,   // decoded Rowsel_P line of this row
  // hit inputs
  input  logic dout,       // analog front-end discriminator output
  input  logic pulse_d,    // electronic test pulse
  // control
  input  logic strobe,     // Strobe: Latch_1 cleared while low
  input  logic freeze,     // Freeze: Latch_1 holds while high
  input  logic grst,       // global reset of the hit state
  input  logic sync,       // this pixel's Sync from the AERD tree
  // state
  output logic state_out   // State_out to the AERD tree
);

  logic latch_m, latch_p;   // configuration latches
  logic latch_1, latch_1_d; // hit input latch and its previous value
  logic hit;                // DFF output
  logic l1_in;

  // Configuration latches, gated by the column/row select AND
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch_m <= 1'b0;
      latch_p <= 1'b0;
    end else begin
      if (col_sel && rowsel_m) latch_m <= cnfg_data;
      if (col_sel && rowsel_p) latch_p <= cnfg_data;
    end
  end

  assign l1_in = dout | (latch_p & pulse_d);

  // Latch_1: cleared while Strobe is low, transparent while Freeze is low
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch_1   <= 1'b0;
      latch_1_d <= 1'b0;
    end else begin
      latch_1_d <= latch_1;
      if (!strobe)      latch_1 <= 1'b0;
      else if (!freeze) latch_1 <= l1_in;
    end
  end

  // Hit DFF: rising edge of Latch_1 loads Mask_en_x; GRST or Sync clears it
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      hit <= 1'b0;
    else if (grst || sync)           hit <= 1'b0;
    else if (latch_1 && !latch_1_d)  hit <= ~latch_m;
  end

  // Latch_2: follows Hit while Sync is low, holds while Sync is high
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state_out <= 1'b0;
    else if (!sync) state_out <= hit;
  end

endmodule
