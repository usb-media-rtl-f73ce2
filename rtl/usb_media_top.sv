// usb_media_top: FPGA fabric of a USB media remote control.
//
// A processor on the OPB reads three push buttons (play, stop, next
// track) and reports presses to a host PC over USB through a Cypress SX2
// interface chip, posing as a keyboard. This module holds the two OPB
// slaves the processor uses for that:
//   u_usb     opb_usb at USB_BASEADDR: SX2 command interface and FIFOs
//   u_buttons opb_pushbutton at PB_BASEADDR: buttons S1, S2 and S4
// The processor, its memories, the UART and the OPB arbiter are outside;
// the OPB request comes in on opb_req and the slaves' responses leave
// OR-ed on opb_rsp, as the OPB combines slave outputs. The SX2 pins come
// out as plain signals (the bidirectional data pad is outside: d_o, d_oe
// and d_i). Button S3 has no FPGA pin and reads as 0.
//
// Both slaves run on clk, which is also the SX2's interface clock. The
// two base addresses are parameters; the USB bridge sits at the address
// the design gives it, the button reader in the next 4 KiB, since the
// design gives both the same base in two separate systems.
module usb_media_top
  import usb_media_pkg::*;
#(
  parameter logic [31:0] USB_BASEADDR = 32'h0180_0000,
  parameter logic [31:0] USB_HIGHADDR = 32'h0180_0FFF,
  parameter logic [31:0] PB_BASEADDR  = 32'h0180_1000,
  parameter logic [31:0] PB_HIGHADDR  = 32'h0180_1FFF
) (
  input  logic     clk,
  input  logic     rst,
  input  opb_req_t opb_req,
  output opb_rsp_t opb_rsp,
  // SX2 pins
  output sx2_out_t sx2_out,
  input  sx2_in_t  sx2_in,
  output logic     usb_ifclk,
  // push buttons
  input  logic     button_s1,
  input  logic     button_s2,
  input  logic     button_s4
);

  opb_rsp_t usb_rsp, pb_rsp;

  opb_usb #(.C_BASEADDR(USB_BASEADDR), .C_HIGHADDR(USB_HIGHADDR)) u_usb (
    .clk, .rst, .opb_req,
    .opb_rsp   (usb_rsp),
    .sx2_out, .sx2_in, .usb_ifclk
  );

  opb_pushbutton #(.C_BASEADDR(PB_BASEADDR), .C_HIGHADDR(PB_HIGHADDR)) u_buttons (
    .clk, .rst, .opb_req,
    .opb_rsp   (pb_rsp),
    .buttons   ({button_s4, 1'b0, button_s2, button_s1})
  );

  assign opb_rsp = usb_rsp | pb_rsp;

  a_one_slave_acks: assert property (@(posedge clk) disable iff (rst) !(usb_rsp.xferack && pb_rsp.xferack));

endmodule
