// ipb_slave_global: IPbus slave 0, the global device with the system reset
// logic.
//
// Register 0, write: bit 0 starts a firmware reset pulse (sys_rst, for
// RST_CYCLES cycles), which clears the other slaves and the emulated chip;
// bit 1 starts a GRST pulse to the chip (GRST_CYCLES cycles), which clears
// the hit state of every pixel but keeps its configuration.
// Register 0, read: bit 0 = sys_rst active, bit 1 = GRST active.
// Register 1: a read/write scratch register for testing the link.
// The slave itself is cleared only by the board reset rst_n. It acks every
// access one cycle after the strobe. The register layout and pulse lengths
// are this design's choice; the document gives only the slave's purpose.
module ipb_slave_global
  import cpv4_pkg::*;
#(
  parameter int unsigned RST_CYCLES  = 16,
  parameter int unsigned GRST_CYCLES = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ipb_wbus_t ipb_in,
  output ipb_rbus_t ipb_out,
  output logic      sys_rst,   // firmware and chip reset, active high
  output logic      grst       // GRST to the chip
);

  logic [7:0]  rst_cnt, grst_cnt;
  logic [31:0] scratch;
  logic        ack_q;
  logic [31:0] rdata_q;
  logic        access;

  assign access = ipb_in.strobe && !ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_cnt  <= '0;
      grst_cnt <= '0;
      scratch  <= '0;
      ack_q    <= 1'b0;
      rdata_q  <= '0;
    end else begin
      ack_q <= access;
      if (rst_cnt  != '0) rst_cnt  <= rst_cnt  - 1'b1;
      if (grst_cnt != '0) grst_cnt <= grst_cnt - 1'b1;
      if (access) begin
        if (ipb_in.write) begin
          unique case (ipb_in.addr[4:0])
            5'd0: begin
              if (ipb_in.wdata[0]) rst_cnt  <= 8'(RST_CYCLES);
              if (ipb_in.wdata[1]) grst_cnt <= 8'(GRST_CYCLES);
            end
            5'd1: scratch <= ipb_in.wdata;
            default: ;
          endcase
          rdata_q <= '0;
        end else begin
          unique case (ipb_in.addr[4:0])
            5'd0:    rdata_q <= {30'd0, grst_cnt != '0, rst_cnt != '0};
            5'd1:    rdata_q <= scratch;
            default: rdata_q <= '0;
          endcase
        end
      end
    end
  end

  assign sys_rst       = (rst_cnt  != '0);
  assign grst          = (grst_cnt != '0);
  assign ipb_out.rdata = rdata_q;
  assign ipb_out.ack   = ack_q;
  assign ipb_out.err   = 1'b0;

endmodule
