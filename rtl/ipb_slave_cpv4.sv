// ipb_slave_cpv4: IPbus slave 2, the CPV-4 device. It holds the chip's
// working mode and timing parameters (the Read Register), the WFIFO of pixel
// configuration words with the FIFO control that applies them, the chip
// control that drives Pulse_d/Strobe/Read, and the data package and RFIFO
// that collect the hit addresses.
//
// Registers (word offsets, cpv4_pkg::R_*; layout is this design's choice):
//   0  CTRL     [0] Operation_mode (0 continuous, 1 trigger),
//               [1] readout enable, [2] write 1: start the pulse sequence
//   1..8        Pulse_Num, Pulse_Width, Pulse_Period, Strobe_Delay,
//               Strobe_Width, Read_Period, Read_Delay, Read_Width,
//               in FPGA clock cycles (100 MHz assumed: 1 us = 100)
//   9  WFIFO    write: push one configuration word (cpv4_pkg::cfg_word_t);
//               err if the WFIFO is full
//   10 RFIFO_LO read: bits [31:0] of the head hit word
//   11 RFIFO_HI read: bits [63:32] of the head hit word, then pop it
//   12 STATUS   [0] WFIFO empty, [1] WFIFO full, [2] RFIFO empty,
//               [3] RFIFO full, [4] configuration busy, [5] pulses busy,
//               [6] Valid, [31:16] RFIFO count
//   13 DROPPED  hit words lost because the RFIFO was full
//   14 CFG_DONE configuration words applied to the chip
//   15 READS    Read pulses issued to the chip
//   16 WFIFO_COUNT words waiting in the WFIFO
// The reset values of the timing registers are the emulator settings of the
// electronic pulse test (continuous mode, 1 pulse of 3 us, read every 4 us,
// read delay 0.2 us, read width 2.2 us) with the trigger-mode strobe of
// the full-array test (2.5 us delay, 0.6 us wide). Pulse_Period has no
// value in the document; 10 us is assumed.
// Every access is acked one cycle after the strobe.
module ipb_slave_cpv4
  import cpv4_pkg::*;
#(
  parameter int unsigned WF_DEPTH = 1024,
  parameter int unsigned RF_DEPTH = 4096
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ipb_wbus_t        ipb_in,
  output ipb_rbus_t        ipb_out,
  // chip configuration interface
  output logic             cnfg_data,
  output logic [SEL_W-1:0] col_sel,
  output logic [SEL_W-1:0] row_selm,
  output logic [SEL_W-1:0] row_selp,
  output logic             cnfg_wr_m,
  output logic             cnfg_wr_p,
  // chip control interface
  output logic             pulse_d,
  output logic             strobe,
  output logic             read,
  input  logic             valid,
  input  logic [13:0]      addr
);

  op_mode_e    mode;
  logic        readout_en, start;
  timing_t     tp;
  logic        ack_q, err_q;
  logic [31:0] rdata_q;
  logic        access;

  logic        wf_push, wf_pop, wf_empty, wf_full;
  logic [31:0] wf_dout;
  logic [$clog2(WF_DEPTH):0] wf_count;
  logic        rf_push, rf_pop, rf_empty, rf_full;
  logic [63:0] rf_din, rf_dout;
  logic [$clog2(RF_DEPTH):0] rf_count;
  logic        cfg_busy, pulse_busy, hit_stb;
  logic [13:0] hit_addr;
  logic [31:0] dropped, words_done, reads_done;

  assign access = ipb_in.strobe && !ack_q && !err_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode            <= MODE_CONTINUOUS;
      readout_en      <= 1'b1;
      start           <= 1'b0;
      tp.pulse_num    <= 16'd1;
      tp.pulse_width  <= 32'd300;
      tp.pulse_period <= 32'd1000;
      tp.strobe_delay <= 32'd250;
      tp.strobe_width <= 32'd60;
      tp.read_period  <= 32'd400;
      tp.read_delay   <= 32'd20;
      tp.read_width   <= 32'd220;
      ack_q           <= 1'b0;
      err_q           <= 1'b0;
      rdata_q         <= '0;
    end else begin
      ack_q <= 1'b0;
      err_q <= 1'b0;
      start <= 1'b0;
      if (access) begin
        if (ipb_in.write) begin
          rdata_q <= '0;
          if (ipb_in.addr[4:0] == R_WFIFO && wf_full) err_q <= 1'b1;
          else                                        ack_q <= 1'b1;
          unique case (ipb_in.addr[4:0])
            R_CTRL: begin
              mode       <= op_mode_e'(ipb_in.wdata[0]);
              readout_en <= ipb_in.wdata[1];
              start      <= ipb_in.wdata[2];
            end
            R_PULSE_NUM:    tp.pulse_num    <= ipb_in.wdata[15:0];
            R_PULSE_WIDTH:  tp.pulse_width  <= ipb_in.wdata;
            R_PULSE_PERIOD: tp.pulse_period <= ipb_in.wdata;
            R_STROBE_DELAY: tp.strobe_delay <= ipb_in.wdata;
            R_STROBE_WIDTH: tp.strobe_width <= ipb_in.wdata;
            R_READ_PERIOD:  tp.read_period  <= ipb_in.wdata;
            R_READ_DELAY:   tp.read_delay   <= ipb_in.wdata;
            R_READ_WIDTH:   tp.read_width   <= ipb_in.wdata;
            default: ;
          endcase
        end else begin
          ack_q <= 1'b1;
          unique case (ipb_in.addr[4:0])
            R_CTRL:         rdata_q <= {30'd0, readout_en, mode};
            R_PULSE_NUM:    rdata_q <= {16'd0, tp.pulse_num};
            R_PULSE_WIDTH:  rdata_q <= tp.pulse_width;
            R_PULSE_PERIOD: rdata_q <= tp.pulse_period;
            R_STROBE_DELAY: rdata_q <= tp.strobe_delay;
            R_STROBE_WIDTH: rdata_q <= tp.strobe_width;
            R_READ_PERIOD:  rdata_q <= tp.read_period;
            R_READ_DELAY:   rdata_q <= tp.read_delay;
            R_READ_WIDTH:   rdata_q <= tp.read_width;
            R_RFIFO_LO:     rdata_q <= rf_dout[31:0];
            R_RFIFO_HI:     rdata_q <= rf_dout[63:32];
            R_STATUS:       rdata_q <= {16'(rf_count), 9'd0, valid, pulse_busy, cfg_busy,
                                        rf_full, rf_empty, wf_full, wf_empty};
            R_DROPPED:      rdata_q <= dropped;
            R_CFG_DONE:     rdata_q <= words_done;
            R_READS_DONE:   rdata_q <= reads_done;
            R_WFIFO_COUNT:  rdata_q <= 32'(wf_count);
            default:        rdata_q <= '0;
          endcase
        end
      end
    end
  end

  assign wf_push = access && ipb_in.write && (ipb_in.addr[4:0] == R_WFIFO) && !wf_full;
  assign rf_pop  = access && !ipb_in.write && (ipb_in.addr[4:0] == R_RFIFO_HI) && !rf_empty;

  sync_fifo #(.W(32), .DEPTH(WF_DEPTH)) u_wfifo (
    .clk (clk), .rst_n (rst_n),
    .push (wf_push), .din (ipb_in.wdata),
    .pop (wf_pop), .dout (wf_dout),
    .empty (wf_empty), .full (wf_full), .count (wf_count)
  );

  cfg_fifo_ctrl u_fifo_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .fifo_empty (wf_empty),
    .fifo_dout  (wf_dout),
    .fifo_pop   (wf_pop),
    .cnfg_data  (cnfg_data),
    .col_sel    (col_sel),
    .row_selm   (row_selm),
    .row_selp   (row_selp),
    .cnfg_wr_m  (cnfg_wr_m),
    .cnfg_wr_p  (cnfg_wr_p),
    .busy       (cfg_busy),
    .words_done (words_done)
  );

  chip_ctrl u_chip_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .mode       (mode),
    .tp         (tp),
    .start      (start),
    .readout_en (readout_en),
    .valid      (valid),
    .addr       (addr),
    .pulse_d    (pulse_d),
    .strobe     (strobe),
    .read       (read),
    .hit_stb    (hit_stb),
    .hit_addr   (hit_addr),
    .pulse_busy (pulse_busy),
    .reads_done (reads_done)
  );

  data_package u_pack (
    .clk       (clk),
    .rst_n     (rst_n),
    .hit_stb   (hit_stb),
    .hit_addr  (hit_addr),
    .fifo_full (rf_full),
    .fifo_push (rf_push),
    .fifo_din  (rf_din),
    .dropped   (dropped)
  );

  sync_fifo #(.W(64), .DEPTH(RF_DEPTH)) u_rfifo (
    .clk (clk), .rst_n (rst_n),
    .push (rf_push), .din (rf_din),
    .pop (rf_pop), .dout (rf_dout),
    .empty (rf_empty), .full (rf_full), .count (rf_count)
  );

  assign ipb_out.rdata = rdata_q;
  assign ipb_out.ack   = ack_q;
  assign ipb_out.err   = err_q;

endmodule
