// cfg_fifo_ctrl: the FIFO control of the readout firmware. It takes pixel
// configuration words from the WFIFO and drives the chip's configuration
// inputs Cnfg_data, Col_sel, Row_selm and Row_selp.
//
// Each word (cpv4_pkg::cfg_word_t) names a pixel (row, column), the value
// and the target latch: Latch_M (mask) or Latch_P (pulse enable). The word
// is applied in three phases: SETUP cycles with the selects and data driven
// and no write enable, WRITE cycles with the write enable of the target
// latch high, and HOLD cycles with the enable low again, so the select
// buses are stable around the enable. Between words the selects rest at all
// ones (7F), the idle value seen on the configuration bus of the chip; the
// row select of the latch not being written also rests at all ones. The
// word layout, the write enables and the phase lengths are this design's
// choice.
// Throughput: one word every 1+SETUP+WRITE+HOLD cycles.
module cfg_fifo_ctrl
  import cpv4_pkg::*;
#(
  parameter int unsigned SETUP = 2,
  parameter int unsigned WRITE = 4,
  parameter int unsigned HOLD  = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // WFIFO read side
  input  logic             fifo_empty,
  input  logic [31:0]      fifo_dout,
  output logic             fifo_pop,
  // chip configuration interface
  output logic             cnfg_data,
  output logic [SEL_W-1:0] col_sel,
  output logic [SEL_W-1:0] row_selm,
  output logic [SEL_W-1:0] row_selp,
  output logic             cnfg_wr_m,
  output logic             cnfg_wr_p,
  output logic             busy,
  output logic [31:0]      words_done   // number of words applied
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_WRITE, S_HOLD} state_e;

  state_e    state;
  cfg_word_t word;
  logic [7:0] cnt;

  assign fifo_pop = (state == S_IDLE) && !fifo_empty;
  assign busy     = (state != S_IDLE) || !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      word       <= '0;
      cnt        <= '0;
      words_done <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!fifo_empty) begin
          word  <= cfg_word_t'(fifo_dout);
          cnt   <= 8'(SETUP);
          state <= S_SETUP;
        end
        S_SETUP: begin
          if (cnt <= 8'd1) begin cnt <= 8'(WRITE); state <= S_WRITE; end
          else cnt <= cnt - 1'b1;
        end
        S_WRITE: begin
          if (cnt <= 8'd1) begin cnt <= 8'(HOLD); state <= S_HOLD; end
          else cnt <= cnt - 1'b1;
        end
        S_HOLD: begin
          if (cnt <= 8'd1) begin
            state      <= S_IDLE;
            words_done <= words_done + 1'b1;
          end else cnt <= cnt - 1'b1;
        end
      endcase
    end
  end

  always_comb begin
    cnfg_data = 1'b0;
    col_sel   = '1;
    row_selm  = '1;
    row_selp  = '1;
    cnfg_wr_m = 1'b0;
    cnfg_wr_p = 1'b0;
    if (state != S_IDLE) begin
      cnfg_data = word.data;
      col_sel   = word.col;
      if (word.target_p) row_selp = word.row;
      else               row_selm = word.row;
      if (state == S_WRITE) begin
        cnfg_wr_m = !word.target_p;
        cnfg_wr_p =  word.target_p;
      end
    end
  end

  a_one_enable: assert property (@(posedge clk) disable iff (!rst_n) !(cnfg_wr_m && cnfg_wr_p));

endmodule
