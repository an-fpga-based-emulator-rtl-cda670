// cpv4_test_system: the FPGA design of the CPV-4 test system with the
// upper-tier chip emulator in place of the chip.
//
// The DAQ software talks IPbus to this FPGA. An IPbus fabric with an address
// decoder routes each access to one of three slaves: slave 0 (system reset
// and GRST), slave 1 (serial control of the DAC70004 on the chip board) and
// slave 2 (the CPV-4 device: mode and timing registers, pixel configuration
// through the WFIFO, pulse/strobe/read generation and hit collection into
// the RFIFO). Slave 2 drives the chip interface, here connected to
// cpv4_upper, the emulator of the 128 x 128 pixel upper-tier chip; with the
// real chip the same signals would leave the FPGA.
//
// The IPbus master (UDP engine and Ethernet) is outside this design: its
// bus is brought out as ipb_in/ipb_out. The per-pixel analog front-end
// outputs of the lower tier are brought in as dout. The system reset from
// slave 0 is combined with the board reset and registered before it clears
// slave 2 and the emulator.
module cpv4_test_system
  import cpv4_pkg::*;
#(
  parameter int unsigned DC_LVL  = 4,     // 128 rows
  parameter int unsigned EOC_LVL = 3,     // 128 columns
  parameter int unsigned WF_DEPTH   = 1024,
  parameter int unsigned RF_DEPTH   = 4096,
  parameter int unsigned DAC_DIV    = 4,
  localparam int unsigned NPIX      = (4**DC_LVL / 2) * (2 * 4**EOC_LVL)
) (
  input  logic            clk,
  input  logic            rst_n,       // board reset
  input  ipb_wbus_t       ipb_in,      // IPbus from the UDP engine
  output ipb_rbus_t       ipb_out,     // IPbus to the UDP engine
  input  logic [NPIX-1:0] dout,        // lower-tier front-end outputs
  output logic            dac_sclk,
  output logic            dac_sync_n,
  output logic            dac_din,
  output logic            chip_valid,  // chip interface, for observation
  output logic [13:0]     chip_addr,
  output logic            chip_read,
  output logic            chip_strobe,
  output logic            chip_pulse_d,
  output logic            chip_freeze,
  output logic            chip_sync
);

  localparam int unsigned AW = 2 * (DC_LVL + EOC_LVL);

  ipb_wbus_t ipb_w [N_SLAVES];
  ipb_rbus_t ipb_r [N_SLAVES];

  logic             sys_rst, grst, sub_rst_n;
  logic             cnfg_data, cnfg_wr_m, cnfg_wr_p;
  logic [SEL_W-1:0] col_sel, row_selm, row_selp;
  logic [AW-1:0]    addr_chip;

  ipb_fabric u_fabric (
    .clk             (clk),
    .rst_n           (rst_n),
    .ipb_in          (ipb_in),
    .ipb_out         (ipb_out),
    .ipb_to_slaves   (ipb_w),
    .ipb_from_slaves (ipb_r)
  );

  ipb_slave_global u_slave0 (
    .clk     (clk),
    .rst_n   (rst_n),
    .ipb_in  (ipb_w[0]),
    .ipb_out (ipb_r[0]),
    .sys_rst (sys_rst),
    .grst    (grst)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sub_rst_n <= 1'b0;
    else        sub_rst_n <= !sys_rst;
  end

  ipb_slave_dac #(.CLK_DIV(DAC_DIV)) u_slave1 (
    .clk        (clk),
    .rst_n      (sub_rst_n),
    .ipb_in     (ipb_w[1]),
    .ipb_out    (ipb_r[1]),
    .dac_sclk   (dac_sclk),
    .dac_sync_n (dac_sync_n),
    .dac_din    (dac_din)
  );

  ipb_slave_cpv4 #(.WF_DEPTH(WF_DEPTH), .RF_DEPTH(RF_DEPTH)) u_slave2 (
    .clk       (clk),
    .rst_n     (sub_rst_n),
    .ipb_in    (ipb_w[2]),
    .ipb_out   (ipb_r[2]),
    .cnfg_data (cnfg_data),
    .col_sel   (col_sel),
    .row_selm  (row_selm),
    .row_selp  (row_selp),
    .cnfg_wr_m (cnfg_wr_m),
    .cnfg_wr_p (cnfg_wr_p),
    .pulse_d   (chip_pulse_d),
    .strobe    (chip_strobe),
    .read      (chip_read),
    .valid     (chip_valid),
    .addr      (chip_addr)
  );

  cpv4_upper #(.DC_LEVELS(DC_LVL), .EOC_LEVELS(EOC_LVL)) u_chip (
    .clk       (clk),
    .rst_n     (sub_rst_n),
    .cnfg_data (cnfg_data),
    .col_sel   (col_sel[2*EOC_LVL:0]),
    .row_selm  (row_selm[2*DC_LVL-2:0]),
    .row_selp  (row_selp[2*DC_LVL-2:0]),
    .cnfg_wr_m (cnfg_wr_m),
    .cnfg_wr_p (cnfg_wr_p),
    .dout      (dout),
    .pulse_d   (chip_pulse_d),
    .strobe    (chip_strobe),
    .read      (chip_read),
    .grst      (grst),
    .valid     (chip_valid),
    .addr      (addr_chip),
    .freeze    (chip_freeze),
    .sync      (chip_sync)
  );

  // a reduced array leaves the upper address bits at zero
  assign chip_addr = 14'(addr_chip);

endmodule
