// opb_usb_datapath: the data "decision boxes" of the USB bridge.
//
// Write side: the low 16 bits of the OPB write data are registered into
// usb_di whenever the decoded access is a command write or a FIFO write;
// the SX2 data pins carry usb_di while the FSM drives the bus.
//
// Read side: the word on the SX2 data pins is captured on the clock edge
// at which the FSM strobes SLRD: into the FIFO read register for an
// endpoint-2 read, into the interrupt byte (low 8 bits) for a command-port
// read. Two status bits are kept: to_c, set while the FSM runs its
// interrupt states and cleared when the processor has read the interrupt
// byte, and empty_flag, the endpoint-2 empty flag (FLAGC, active low)
// latched when the FSM says pass_ef. The OPB read data is the register
// that belongs to the access, shown only in the acknowledge clock (zero
// otherwise, so the bus can OR the slaves); bits 31:16 are always zero.
//
// The registers and what feeds them follow the design. Its own choices:
// to_c is cleared by the read of the interrupt byte, empty_flag holds its
// value between updates and resets to 1 (empty), and usb_di is loaded for
// either write type.
module opb_usb_datapath
  import usb_media_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  xfer_t                 xfer,
  input  logic [OPB_DWIDTH-1:0] opb_dbus,     // OPB write data
  input  logic [USB_DWIDTH-1:0] usb_do,       // from the SX2 data pins
  input  logic                  flagc_n,      // SX2 empty flag, active low
  input  logic                  slave_read,
  input  logic                  cm_rd,
  input  logic                  to_c_set,
  input  logic                  pass_ef,
  input  logic                  xferack,
  output logic [USB_DWIDTH-1:0] usb_di,       // to the SX2 data pins
  output logic [OPB_DWIDTH-1:0] sln_dbus,
  output logic                  to_c,
  output logic                  empty_flag
);

  logic [USB_DWIDTH-1:0] fifo_rd_q;
  logic [7:0]            int_byte_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      usb_di     <= '0;
      fifo_rd_q  <= '0;
      int_byte_q <= '0;
      to_c       <= 1'b0;
      empty_flag <= 1'b1;
    end else begin
      if (xfer == XFER_CM_WR || xfer == XFER_FIFO_WR)
        usb_di <= opb_dbus[USB_DWIDTH-1:0];
      if (slave_read && cm_rd)
        int_byte_q <= usb_do[7:0];
      else if (slave_read)
        fifo_rd_q <= usb_do;
      if (to_c_set)
        to_c <= 1'b1;
      else if (xferack && xfer == XFER_DATA_TO_C)
        to_c <= 1'b0;
      if (pass_ef)
        empty_flag <= !flagc_n;
    end
  end

  always_comb begin
    sln_dbus = '0;
    if (xferack) begin
      unique case (xfer)
        XFER_FIFO_RD:   sln_dbus[USB_DWIDTH-1:0] = fifo_rd_q;
        XFER_TO_C:      sln_dbus[0] = to_c;
        XFER_DATA_TO_C: sln_dbus[7:0] = int_byte_q;
        XFER_EMPTY:     sln_dbus[0] = empty_flag;
        default:        sln_dbus = '0;
      endcase
    end
  end

endmodule
