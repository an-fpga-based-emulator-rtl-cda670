// cpv4_double_column: one double column of the CPV-4 pixel array with its
// in-column AERD tree.
//
// A double column holds two pixel columns of ROWS pixels each, the left
// (even) column and the right (odd) column, read out by one AERD tree of
// DC_LEVELS levels (2*ROWS = 4**DC_LEVELS pixels; the chip has 4 levels and
// 128 rows). The readout priority snakes across the pair: row 0 left, row 0
// right, row 1 left, row 1 right, and so on, as the priority arrow of the
// array drawing shows. The tree input index, and so the in-column address,
// is therefore {row, side} with side 0 for the left column. That address
// layout is this design's reading of the drawing. dout is indexed the way
// the drawing numbers the pixels: side*ROWS + row.
//
// en and sync come from the end-of-column tree. The address output is zero
// unless en is high, so the double columns share ADDR[7:0] by OR.
// Timing: see cpv4_pixel; the tree adds no clock cycles.
module cpv4_double_column #(
  parameter int unsigned DC_LEVELS = 4,
  localparam int unsigned NPIX     = 4**DC_LEVELS,
  localparam int unsigned ROWS     = NPIX / 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cnfg_data,
  input  logic [1:0]             col_sel,   // decoded Colsel, [0] = left
  input  logic [ROWS-1:0]        rowsel_m,  // decoded Rowsel_M lines
  input  logic [ROWS-1:0]        rowsel_p,  // decoded Rowsel_P lines
  input  logic [NPIX-1:0]        dout,      // index side*ROWS + row
  input  logic                   pulse_d,
  input  logic                   strobe,
  input  logic                   freeze,
  input  logic                   grst,
  input  logic                   en,        // grant from end-of-column tree
  input  logic                   sync,      // Sync from end-of-column tree
  output logic                   valid,     // some pixel holds a hit
  output logic [2*DC_LEVELS-1:0] addr       // {row, side} of the winner
);

  logic [NPIX-1:0] st;      // State_out in priority order
  logic [NPIX-1:0] sy;      // Sync in priority order
  logic [NPIX-1:0] unused_en;

  for (genvar side = 0; side < 2; side++) begin : g_side
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      cpv4_pixel u_pix (
        .clk       (clk),
        .rst_n     (rst_n),
        .cnfg_data (cnfg_data),
        .col_sel   (col_sel[side]),
        .rowsel_m  (rowsel_m[r]),
        .rowsel_p  (rowsel_p[r]),
        .dout      (dout[side*ROWS + r]),
        .pulse_d   (pulse_d),
        .strobe    (strobe),
        .freeze    (freeze),
        .grst      (grst),
        .sync      (sy[2*r + side]),
        .state_out (st[2*r + side])
      );
    end
  end

  aerd_tree #(.LEVELS(DC_LEVELS)) u_tree (
    .state  (st),
    .en     (en),
    .sync   (sync),
    .valid  (valid),
    .addr   (addr),
    .en_o   (unused_en),
    .sync_o (sy)
  );

endmodule
