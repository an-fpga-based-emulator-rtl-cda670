// chip_ctrl: the chip control of the readout firmware. It generates the
// chip's Pulse_d, Strobe and Read from the timing parameters and the chip's
// Valid, and hands every address read out to the data package.
//
// Pulse and strobe: a start request launches pulse_num electronic pulses,
// one every pulse_period cycles, each pulse_width cycles long. In trigger
// mode each pulse opens a Strobe window strobe_width cycles long,
// strobe_delay cycles after the pulse's rising edge; hits reach the pixels
// only inside that window. In continuous mode Strobe is held high.
// Readout: while readout is enabled and Valid is high, a read sequence
// starts: read_delay cycles after Valid is seen, Read goes high for
// read_width cycles, and further reads start every read_period cycles
// (start to start) for as long as Valid is still high at that time. The
// address is taken on the first cycle of each Read, while the chip holds it
// steady. These timing relations follow the chip's readout timing diagram;
// the parameter names are the document's.
// Own choices: all times are in FPGA clock cycles (with the 100 MHz clock
// assumed here, 1 us = 100 cycles); a zero width or count disables the
// signal; Read rises max(read_delay, 2) cycles after Valid; the gap between the end of one Read and the start of the next is
// at least MIN_GAP cycles whatever read_period says, because the chip needs
// two cycles after Read falls to present the next address.
module chip_ctrl
  import cpv4_pkg::*;
#(
  parameter int unsigned MIN_GAP = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  op_mode_e    mode,        // Operation_mode
  input  timing_t     tp,          // timing parameters (Read Register)
  input  logic        start,       // one-cycle request: send the pulses
  input  logic        readout_en,  // allow reads
  // chip side
  input  logic        valid,       // Valid from the chip
  input  logic [13:0] addr,        // Addr[13:0] from the chip
  output logic        pulse_d,     // Pulse_d
  output logic        strobe,      // Strobe
  output logic        read,        // Read
  // to the data package
  output logic        hit_stb,     // one cycle: hit_addr is a new address
  output logic [13:0] hit_addr,
  // status
  output logic        pulse_busy,
  output logic [31:0] reads_done
);

  // ---------------- pulse and strobe generator ----------------
  logic [15:0] pulses_left;
  logic [31:0] t;              // cycle inside the current pulse period
  logic        trig_strobe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pulses_left <= '0;
      t           <= '0;
      pulse_d     <= 1'b0;
      trig_strobe <= 1'b0;
    end else begin
      if (pulses_left == '0) begin
        pulse_d     <= 1'b0;
        trig_strobe <= 1'b0;
        t           <= '0;
        if (start && tp.pulse_num != '0) pulses_left <= tp.pulse_num;
      end else begin
        pulse_d     <= (t < tp.pulse_width);
        trig_strobe <= (t >= tp.strobe_delay) && (t < tp.strobe_delay + tp.strobe_width);
        if (t + 1 >= tp.pulse_period) begin
          t           <= '0;
          pulses_left <= pulses_left - 1'b1;
        end else begin
          t <= t + 1'b1;
        end
      end
    end
  end

  assign pulse_busy = (pulses_left != '0);
  assign strobe     = (mode == MODE_CONTINUOUS) ? 1'b1 : trig_strobe;

  // ---------------- read sequencer ----------------
  typedef enum logic [1:0] {R_IDLE, R_DELAY, R_READ, R_WAIT} rstate_e;
  rstate_e     rs;
  logic [31:0] rcnt;     // cycles in the current phase
  logic [31:0] since;    // cycles since the current Read started

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs         <= R_IDLE;
      rcnt       <= '0;
      since      <= '0;
      read       <= 1'b0;
      hit_stb    <= 1'b0;
      hit_addr   <= '0;
      reads_done <= '0;
    end else begin
      hit_stb <= 1'b0;
      since   <= since + 1'b1;
      unique case (rs)
        R_IDLE: begin
          read <= 1'b0;
          if (readout_en && valid && tp.read_width != '0) begin
            rcnt <= 32'd2;
            rs   <= R_DELAY;
          end
        end
        R_DELAY: begin
          // Read goes high read_delay cycles after Valid was seen
          if (rcnt >= tp.read_delay) begin
            read  <= 1'b1;
            since <= 32'd1;
            rcnt  <= 32'd1;
            rs    <= R_READ;
          end else rcnt <= rcnt + 1'b1;
        end
        R_READ: begin
          if (rcnt == 32'd1) begin
            hit_stb    <= 1'b1;
            hit_addr   <= addr;
            reads_done <= reads_done + 1'b1;
          end
          if (rcnt >= tp.read_width) begin
            read <= 1'b0;
            rcnt <= 32'd1;
            rs   <= R_WAIT;
          end else rcnt <= rcnt + 1'b1;
        end
        R_WAIT: begin
          if (since >= tp.read_period && rcnt >= 32'(MIN_GAP)) begin
            if (readout_en && valid) begin
              read  <= 1'b1;
              since <= 32'd1;
              rcnt  <= 32'd1;
              rs    <= R_READ;
            end else rs <= R_IDLE;
          end else rcnt <= rcnt + 1'b1;
        end
      endcase
    end
  end

endmodule
