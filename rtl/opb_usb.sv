// opb_usb: OPB slave bridging the processor to a Cypress CY7C68001 (SX2)
// USB interface chip.
//
// The processor talks to the SX2 through six registers at C_BASEADDR:
//   0x00 write  one byte to the SX2 command interface (register access)
//   0x04 read   one 16-bit word from the endpoint-2 OUT FIFO
//   0x08 write  one 16-bit word into the endpoint-6 IN FIFO
//   0x10 read   bit 0: the SX2 raised INT# and its byte has been fetched
//   0x14 read   that byte (bits 7:0); reading it clears 0x10
//   0x18 read   bit 0: endpoint-2 FIFO empty, as latched after a read
// An SX2 register read is: write the read-address byte to 0x00, poll 0x10
// until it reads 1, read the value at 0x14. The bridge fetches the byte by
// itself when the SX2 asserts INT#.
//
// Structure: opb_usb_decode (chip select, transfer type, FIFOADR),
// opb_usb_fsm (strobes and the OPB acknowledge) and opb_usb_datapath (data
// registers). The SX2 runs synchronously on this clock, which is sent to
// it as usb_ifclk. The data pins are split into d_o/d_oe/d_i; the
// bidirectional pad buffer lies outside.
//
// Timing, counting the first clock in which select is high as clock 1:
// status and command-write accesses are acknowledged in clock 4, FIFO
// reads in clock 5; a command write while READY is low is answered with
// OPB retry in clock 3; a FIFO write to a full FIFO stalls with PKTEND
// asserted and the OPB timeout suppressed until the FIFO has room.
//
// Register map, pin set, FSM and address coding follow the design; how
// the pieces are timed against each other is this implementation's own.
module opb_usb
  import usb_media_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h0180_0000,
  parameter logic [31:0] C_HIGHADDR = 32'h0180_0FFF
) (
  input  logic     clk,        // OPB_Clk
  input  logic     rst,        // OPB_Rst
  input  opb_req_t opb_req,
  output opb_rsp_t opb_rsp,
  output sx2_out_t sx2_out,
  input  sx2_in_t  sx2_in,
  output logic     usb_ifclk
);

  xfer_t      xfer;
  usb_state_t state;
  logic       cs, output_enable, slave_read, slave_write, pktend, drive;
  logic       cm_rd, to_c_set, pass_ef, xferack, retry, toutsup;
  logic       to_c, empty_flag;
  logic [USB_DWIDTH-1:0] usb_di;
  logic [OPB_DWIDTH-1:0] sln_dbus;
  logic [USB_AWIDTH-1:0] fifoadr;

  opb_usb_decode #(.C_BASEADDR(C_BASEADDR), .C_HIGHADDR(C_HIGHADDR)) u_decode (
    .clk, .rst, .opb_req,
    .done   (xferack || retry),
    .cm_rd,
    .xfer,
    .fifoadr
  );

  opb_usb_fsm u_fsm (
    .clk, .rst, .xfer,
    .int_req       (!sx2_in.int_n),
    .ready         (sx2_in.ready),
    .full          (!sx2_in.flagb_n),
    .state,
    .cs, .output_enable, .slave_read, .slave_write, .pktend, .drive,
    .cm_rd,
    .to_c          (to_c_set),
    .pass_ef, .xferack, .retry, .toutsup
  );

  opb_usb_datapath u_data (
    .clk, .rst, .xfer,
    .opb_dbus   (opb_req.dbus),
    .usb_do     (sx2_in.d_i),
    .flagc_n    (sx2_in.flagc_n),
    .slave_read, .cm_rd,
    .to_c_set, .pass_ef, .xferack,
    .usb_di,
    .sln_dbus,
    .to_c,
    .empty_flag
  );

  always_comb begin
    opb_rsp         = OPB_RSP_IDLE;
    opb_rsp.dbus    = sln_dbus;
    opb_rsp.xferack = xferack;
    opb_rsp.retry   = retry;
    opb_rsp.toutsup = toutsup;
  end

  always_comb begin
    sx2_out.fifoadr  = fifoadr;
    sx2_out.cs_n     = !cs;
    sx2_out.sloe_n   = !output_enable;
    sx2_out.slrd_n   = !slave_read;
    sx2_out.slwr_n   = !slave_write;
    sx2_out.pktend_n = !pktend;
    sx2_out.d_o      = usb_di;
    sx2_out.d_oe     = drive;
  end

  assign usb_ifclk = clk;

  // The FPGA and the SX2 never drive the data bus together.
  a_no_contention: assert property (@(posedge clk) disable iff (rst) !(drive && output_enable));
  // While waiting on a full FIFO the OPB timeout stays suppressed.
  a_full_toutsup: assert property (@(posedge clk) disable iff (rst) (state == ST_FULL) |-> toutsup);
  // Acknowledge and retry are exclusive.
  a_ack_or_retry: assert property (@(posedge clk) disable iff (rst) !(xferack && retry));

endmodule
