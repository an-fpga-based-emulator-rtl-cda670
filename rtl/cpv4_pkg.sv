// cpv4_pkg: types and constants shared by the CPV-4 upper-tier emulator and
// its readout firmware.
//
// The emulated chip has a 128 x 128 pixel array read out through a tree of
// 4-input AERD (Asynchronized Encoder Reset Decoder) cells: four levels
// inside each double column (256 pixels, ADDR[7:0]) and three levels at the
// end of column (64 double columns, ADDR[13:8]). These numbers follow the
// chip description. The IPbus bus records below follow the public IPbus
// slave bus (32-bit address and data, strobe/write, ack/err); the register
// map and the hit-word layout are this design's own.
package cpv4_pkg;

  // Array geometry of the chip
  localparam int unsigned DC_LEVELS  = 4;   // AERD levels inside a double column
  localparam int unsigned EOC_LEVELS = 3;   // AERD levels at the end of column
  localparam int unsigned ADDR_W     = 2 * (DC_LEVELS + EOC_LEVELS); // 14
  localparam int unsigned SEL_W      = 7;   // Row_selm/Row_selp/Col_sel width

  // Operation mode of the pixel front end
  typedef enum logic {
    MODE_CONTINUOUS = 1'b0,  // Strobe held high: every hit is taken
    MODE_TRIGGER    = 1'b1   // hits are taken only inside the Strobe window
  } op_mode_e;

  // Timing parameters of the chip control, all in FPGA clock cycles
  typedef struct packed {
    logic [15:0] pulse_num;
    logic [31:0] pulse_width;
    logic [31:0] pulse_period;
    logic [31:0] strobe_delay;
    logic [31:0] strobe_width;
    logic [31:0] read_period;
    logic [31:0] read_delay;
    logic [31:0] read_width;
  } timing_t;

  // One pixel configuration word as written into the WFIFO
  //   [6:0]   row, [13:7] column, [14] Cnfg_data,
  //   [15]    target latch: 0 = Latch_M (mask), 1 = Latch_P (pulse enable)
  typedef struct packed {
    logic [15:0] unused;
    logic        target_p;
    logic        data;
    logic [6:0]  col;
    logic [6:0]  row;
  } cfg_word_t;

  // One hit word as stored in the RFIFO (Hitdata[63:0])
  typedef struct packed {
    logic [47:0] timestamp;  // FPGA clock cycles since reset
    logic [1:0]  zero;
    logic [13:0] addr;       // Addr[13:0] from the chip
  } hit_word_t;

  // IPbus slave bus, master to slave
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        strobe;
    logic        write;
  } ipb_wbus_t;

  // IPbus slave bus, slave to master
  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;
    logic        err;
  } ipb_rbus_t;

  localparam ipb_rbus_t IPB_RBUS_NULL = '{rdata: 32'h0, ack: 1'b0, err: 1'b0};

  localparam int unsigned N_SLAVES = 3;

  // Slave 2 register offsets (word addresses inside the slave)
  localparam logic [4:0] R_CTRL         = 5'd0;
  localparam logic [4:0] R_PULSE_NUM    = 5'd1;
  localparam logic [4:0] R_PULSE_WIDTH  = 5'd2;
  localparam logic [4:0] R_PULSE_PERIOD = 5'd3;
  localparam logic [4:0] R_STROBE_DELAY = 5'd4;
  localparam logic [4:0] R_STROBE_WIDTH = 5'd5;
  localparam logic [4:0] R_READ_PERIOD  = 5'd6;
  localparam logic [4:0] R_READ_DELAY   = 5'd7;
  localparam logic [4:0] R_READ_WIDTH   = 5'd8;
  localparam logic [4:0] R_WFIFO        = 5'd9;
  localparam logic [4:0] R_RFIFO_LO     = 5'd10;
  localparam logic [4:0] R_RFIFO_HI     = 5'd11;
  localparam logic [4:0] R_STATUS       = 5'd12;
  localparam logic [4:0] R_DROPPED      = 5'd13;
  localparam logic [4:0] R_CFG_DONE     = 5'd14;
  localparam logic [4:0] R_READS_DONE   = 5'd15;
  localparam logic [4:0] R_WFIFO_COUNT  = 5'd16;

endpackage
