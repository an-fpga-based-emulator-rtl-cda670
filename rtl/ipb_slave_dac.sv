// ipb_slave_dac: IPbus slave 1, which controls the DAC70004 on the chip
// board (a 4-channel DAC with a serial interface that sets the chip's
// analog bias and threshold levels).
//
// A write to register 0 sends its 32-bit value to the DAC as one serial
// frame: SYNC_n goes low, the 32 bits go out MSB first on DIN, each bit set
// up while SCLK is high and taken by the DAC on the falling edge of SCLK,
// then SYNC_n returns high. SCLK runs at clk / (2*CLK_DIV). A write while a
// frame is still going out is refused with err. Register 0 reads back the
// last frame sent; register 1 reads bit 0 = busy and bits [31:16] = number
// of frames sent. The document gives only the purpose of this slave; the
// register layout is this design's choice and the frame format is the
// DAC's 32-bit serial word, passed through unchanged.
// A frame takes 2 + 64*CLK_DIV cycles.
module ipb_slave_dac
  import cpv4_pkg::*;
#(
  parameter int unsigned CLK_DIV = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ipb_wbus_t ipb_in,
  output ipb_rbus_t ipb_out,
  output logic      dac_sclk,
  output logic      dac_sync_n,
  output logic      dac_din
);

  typedef enum logic [1:0] {D_IDLE, D_HIGH, D_LOW, D_END} dstate_e;

  dstate_e     ds;
  logic [31:0] frame, shreg;
  logic [5:0]  bitn;
  logic [7:0]  div;
  logic [15:0] frames;
  logic        ack_q, err_q;
  logic [31:0] rdata_q;
  logic        access, busy;

  assign access = ipb_in.strobe && !ack_q && !err_q;
  assign busy   = (ds != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds         <= D_IDLE;
      frame      <= '0;
      shreg      <= '0;
      bitn       <= '0;
      div        <= '0;
      frames     <= '0;
      ack_q      <= 1'b0;
      err_q      <= 1'b0;
      rdata_q    <= '0;
      dac_sclk   <= 1'b1;
      dac_sync_n <= 1'b1;
      dac_din    <= 1'b0;
    end else begin
      ack_q <= 1'b0;
      err_q <= 1'b0;
      if (access) begin
        if (ipb_in.write) begin
          if (ipb_in.addr[4:0] == 5'd0) begin
            if (busy) err_q <= 1'b1;
            else begin
              ack_q      <= 1'b1;
              frame      <= ipb_in.wdata;
              shreg      <= ipb_in.wdata;
              bitn       <= 6'd32;
              div        <= 8'(CLK_DIV);
              dac_sync_n <= 1'b0;
              dac_din    <= ipb_in.wdata[31];
              ds         <= D_HIGH;
            end
          end else ack_q <= 1'b1;
          rdata_q <= '0;
        end else begin
          ack_q <= 1'b1;
          unique case (ipb_in.addr[4:0])
            5'd0:    rdata_q <= frame;
            5'd1:    rdata_q <= {frames, 15'd0, busy};
            default: rdata_q <= '0;
          endcase
        end
      end

      unique case (ds)
        D_IDLE: ;
        D_HIGH: begin            // SCLK high, DIN stable
          if (div <= 8'd1) begin
            dac_sclk <= 1'b0;    // DAC takes DIN here
            div      <= 8'(CLK_DIV);
            ds       <= D_LOW;
          end else div <= div - 1'b1;
        end
        D_LOW: begin
          if (div <= 8'd1) begin
            dac_sclk <= 1'b1;
            div      <= 8'(CLK_DIV);
            shreg    <= {shreg[30:0], 1'b0};
            dac_din  <= shreg[30];
            bitn     <= bitn - 1'b1;
            ds       <= (bitn == 6'd1) ? D_END : D_HIGH;
          end else div <= div - 1'b1;
        end
        D_END: begin
          dac_sync_n <= 1'b1;
          dac_din    <= 1'b0;
          frames     <= frames + 1'b1;
          ds         <= D_IDLE;
        end
      endcase
    end
  end

  assign ipb_out.rdata = rdata_q;
  assign ipb_out.ack   = ack_q;
  assign ipb_out.err   = err_q;

endmodule
