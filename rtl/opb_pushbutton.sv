// opb_pushbutton: read-only OPB slave returning the state of the board's
// push buttons.
//
// The four buttons S1..S4 occupy four consecutive words at C_BASEADDR
// (S1 at +0x0, S2 at +0x4, S3 at +0x8, S4 at +0xC). A read returns the
// selected button's level in OPB bit 0, the most significant bit of the
// 32-bit word; all other bits are zero. S3 has no FPGA pin on the board
// and is tied low by the instantiating module. The application uses S1 as
// play, S2 as stop and S4 as next track.
//
// A three-state FSM serves the bus: IDLE -> SELECT when the address falls
// in the 16-byte window and select is high; SELECT -> TRANSFER when select
// is still high and the access is a read; TRANSFER -> IDLE, with the
// acknowledge and the data valid in TRANSFER only. A write is never
// acknowledged (the bus times out); SELECT falls back to IDLE once select
// drops. The address and RNW are registered as the request arrives.
//
// Timing: with select first high in clock 1, xferack and the data come in
// clock 3 (the OPB read diagram's cycles 2, 3, 4 are IDLE, SELECT and
// TRANSFER). The buttons pass a two-flop synchronizer first, so a press
// shows in a read two clocks after it reaches the pin.
//
// The FSM, the address window, the 1-bit data in OPB bit 0 and the
// read-only behaviour follow the design; the synchronizer is this
// implementation's addition.
module opb_pushbutton
  import usb_media_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h0180_0000,
  parameter logic [31:0] C_HIGHADDR = 32'h0180_0FFF,
  parameter int unsigned RAM_AWIDTH = 2    // word-address bits: 4 buttons
) (
  input  logic                     clk,
  input  logic                     rst,
  input  opb_req_t                 opb_req,
  output opb_rsp_t                 opb_rsp,
  input  logic [2**RAM_AWIDTH-1:0] buttons  // bit i = button S(i+1)
);

  typedef enum logic [2:0] {
    PB_IDLE     = 3'b000,
    PB_SELECTED = 3'b001,
    PB_XFER     = 3'b111
  } pb_state_t;

  localparam int unsigned TAG_LSB = RAM_AWIDTH + 2;

  pb_state_t                 state, next_state;
  logic [RAM_AWIDTH-1:0]     abus_q;
  logic                      rnw_q;
  logic                      chip_select;
  logic [2**RAM_AWIDTH-1:0]  sync1, sync2;
  logic                      data_q;

  // The window is the 2**RAM_AWIDTH words at C_BASEADDR; C_HIGHADDR bounds
  // the region reserved for the peripheral and must hold the window.
  if (C_HIGHADDR - C_BASEADDR < (32'd4 << RAM_AWIDTH) - 32'd1) begin : g_bad_window
    $error("opb_pushbutton: C_HIGHADDR leaves no room for the button window");
  end

  assign chip_select = opb_req.select &&
                       (opb_req.abus[OPB_AWIDTH-1:TAG_LSB] == C_BASEADDR[OPB_AWIDTH-1:TAG_LSB]);

  always_ff @(posedge clk) begin
    if (rst) begin
      abus_q <= '0;
      rnw_q  <= 1'b0;
      sync1  <= '0;
      sync2  <= '0;
      data_q <= 1'b0;
      state  <= PB_IDLE;
    end else begin
      abus_q <= opb_req.abus[TAG_LSB-1:2];
      rnw_q  <= opb_req.rnw;
      sync1  <= buttons;
      sync2  <= sync1;
      data_q <= (next_state == PB_XFER) ? sync2[abus_q] : 1'b0;
      state  <= next_state;
    end
  end

  always_comb begin
    next_state = PB_IDLE;
    unique case (state)
      PB_IDLE:     next_state = chip_select ? PB_SELECTED : PB_IDLE;
      PB_SELECTED: begin
        if (!opb_req.select) next_state = PB_IDLE;
        else if (rnw_q)      next_state = PB_XFER;
        else                 next_state = PB_SELECTED;
      end
      PB_XFER:     next_state = PB_IDLE;
      default:     next_state = PB_IDLE;
    endcase
  end

  always_comb begin
    opb_rsp                      = OPB_RSP_IDLE;
    opb_rsp.xferack              = (state == PB_XFER);
    opb_rsp.dbus[OPB_DWIDTH-1]   = data_q;
  end

  a_data_only_with_ack: assert property (@(posedge clk) disable iff (rst) data_q |-> state == PB_XFER);

endmodule
