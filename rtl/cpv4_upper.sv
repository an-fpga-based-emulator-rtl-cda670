// cpv4_upper: emulator of the CPV-4 upper-tier chip: the pixel array and its
// readout logic, with the chip's interface to the readout firmware.
//
// The array has ROWS rows and COLS columns (128 x 128 in the chip), built as
// COLS/2 double columns, each read by a DC_LEVELS-level AERD tree. The Valid
// outputs of the double columns feed an EOC_LEVELS-level AERD tree at the
// end of column, which gives the chip's Valid and ADDR[13:8] (the double
// column); the granted double column drives ADDR[7:0] = {row, side}. So the
// pixel in column c, row r has address {c[6:1], r[6:0], c[0]}, and pixels
// are read in order of increasing address. Each read (Read high) resets the
// pixel being read through Sync and moves Valid/Addr to the next hit pixel
// when Read falls.
//
// Configuration: Col_sel, Row_selm and Row_selp are binary numbers decoded
// here to one column line and one row line. A decoded line is only active
// while the matching write enable (cnfg_wr_m for Latch_M, cnfg_wr_p for
// Latch_P) is high; the two enables are this design's addition, since a
// binary select alone would write some pixel on every cycle. Cnfg_data is
// common to the whole array.
//
// Hit inputs: dout carries one analog front-end output per pixel, indexed
// c*ROWS + r; pulse_d is the electronic test pulse common to all pixels and
// taken only by pixels whose Latch_P is set.
//
// Timing: a hit edge at cycle t shows on Valid/Addr at t+3. Read at t gives
// Freeze at t+1 and Sync at t+1+DELAY; Sync clears the pixel but Addr holds
// until Sync falls (Read fall + 1 cycle); the next address is on Addr the
// cycle after that.
module cpv4_upper #(
  parameter int unsigned DC_LEVELS  = 4,
  parameter int unsigned EOC_LEVELS = 3,
  parameter int unsigned DELAY      = 4,
  localparam int unsigned ROWS   = (4**DC_LEVELS) / 2,
  localparam int unsigned NDC    = 4**EOC_LEVELS,
  localparam int unsigned COLS   = 2 * NDC,
  localparam int unsigned RW     = $clog2(ROWS),
  localparam int unsigned CW     = $clog2(COLS),
  localparam int unsigned AW     = 2 * (DC_LEVELS + EOC_LEVELS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic                 cnfg_data,  // Cnfg_data
  input  logic [CW-1:0]        col_sel,    // Col_sel
  input  logic [RW-1:0]        row_selm,   // Row_selm
  input  logic [RW-1:0]        row_selp,   // Row_selp
  input  logic                 cnfg_wr_m,  // write Latch_M of the selected pixel
  input  logic                 cnfg_wr_p,  // write Latch_P of the selected pixel
  // hit inputs
  input  logic [ROWS*COLS-1:0] dout,       // analog front-end outputs
  input  logic                 pulse_d,    // Pulse_d
  // control
  input  logic                 strobe,     // Strobe
  input  logic                 read,       // Read
  input  logic                 grst,       // GRST
  // readout
  output logic                 valid,      // Valid
  output logic [AW-1:0]        addr,       // Addr
  output logic                 freeze,     // internal Freeze (observation)
  output logic                 sync        // internal Sync (observation)
);

  logic [COLS-1:0]             col_line;
  logic [ROWS-1:0]             rowm_line, rowp_line;
  logic [NDC-1:0]              dc_valid, dc_en, dc_sync;
  logic [NDC-1:0][2*DC_LEVELS-1:0] dc_addr;
  logic [2*DC_LEVELS-1:0]      low_addr;
  logic [2*EOC_LEVELS-1:0]     high_addr;

  // select decoders
  always_comb begin
    col_line  = '0;
    rowm_line = '0;
    rowp_line = '0;
    if (cnfg_wr_m || cnfg_wr_p) col_line[col_sel] = 1'b1;
    if (cnfg_wr_m)              rowm_line[row_selm] = 1'b1;
    if (cnfg_wr_p)              rowp_line[row_selp] = 1'b1;
  end

  cpv4_readout_ctrl #(.DELAY(DELAY)) u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .read   (read),
    .freeze (freeze),
    .sync   (sync)
  );

  for (genvar d = 0; d < NDC; d++) begin : g_dc
    cpv4_double_column #(.DC_LEVELS(DC_LEVELS)) u_dc (
      .clk       (clk),
      .rst_n     (rst_n),
      .cnfg_data (cnfg_data),
      .col_sel   (col_line[2*d +: 2]),
      .rowsel_m  (rowm_line),
      .rowsel_p  (rowp_line),
      .dout      (dout[2*d*ROWS +: 2*ROWS]),
      .pulse_d   (pulse_d),
      .strobe    (strobe),
      .freeze    (freeze),
      .grst      (grst),
      .en        (dc_en[d]),
      .sync      (dc_sync[d]),
      .valid     (dc_valid[d]),
      .addr      (dc_addr[d])
    );
  end

  aerd_tree #(.LEVELS(EOC_LEVELS)) u_eoc (
    .state  (dc_valid),
    .en     (1'b1),
    .sync   (sync),
    .valid  (valid),
    .addr   (high_addr),
    .en_o   (dc_en),
    .sync_o (dc_sync)
  );

  // shared ADDR[7:0] bus of the double columns
  always_comb begin
    low_addr = '0;
    for (int d = 0; d < NDC; d++) low_addr = low_addr | dc_addr[d];
  end

  assign addr = {high_addr, low_addr};

endmodule
