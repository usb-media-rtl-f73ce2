// opb_usb_decode: the address "decision box" of the USB bridge.
//
// It watches the OPB request, decides whether the bridge is selected and
// which register is accessed, and from that picks the SX2 FIFO address
// lines: 100 (command interface) for a command write, 000 (FIFO2, endpoint
// 2) for a FIFO read and for the status reads, 010 (FIFO6, endpoint 6) for
// a FIFO write. While the controller FSM runs a command read (cm_rd) the
// address lines are forced to 100 at once, and that choice is also
// registered, as the transfer-type register is.
//
// Timing: the transfer type and the FIFO address are registered, so they
// follow the OPB request by one clock. They are recomputed every clock in
// which the bridge is selected, and the type is cleared in the clock in
// which the FSM acknowledges or retries the access (done = 1), so an access
// is served exactly once even though the master drops select one clock
// after the acknowledge.
//
// The register offsets and the FIFO address per register follow the
// design's register list. Decoding the chip select from the whole
// C_BASEADDR..C_HIGHADDR window (a power-of-two, aligned window) and
// treating unknown offsets as an acknowledged "other" access are choices
// of this implementation.
module opb_usb_decode
  import usb_media_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h0180_0000,
  parameter logic [31:0] C_HIGHADDR = 32'h0180_0FFF
) (
  input  logic                  clk,
  input  logic                  rst,
  input  opb_req_t              opb_req,
  input  logic                  done,      // FSM acknowledges or retries now
  input  logic                  cm_rd,     // FSM is reading the command port
  output xfer_t                 xfer,      // registered transfer type
  output logic [USB_AWIDTH-1:0] fifoadr    // to the SX2 FIFOADR pins
);

  localparam logic [31:0] ADDR_MASK = ~(C_BASEADDR ^ C_HIGHADDR);

  logic                  hit;
  logic [7:0]            offset;
  xfer_t                 xfer_d;
  logic [USB_AWIDTH-1:0] fifoadr_d, fifoadr_q;

  assign hit    = opb_req.select && ((opb_req.abus & ADDR_MASK) == (C_BASEADDR & ADDR_MASK));
  assign offset = opb_req.abus[7:0];

  always_comb begin
    unique case (offset)
      REG_CM:        xfer_d = opb_req.rnw ? XFER_OTHER : XFER_CM_WR;
      REG_FIFO_RD:   xfer_d = opb_req.rnw ? XFER_FIFO_RD : XFER_OTHER;
      REG_FIFO_WR:   xfer_d = opb_req.rnw ? XFER_OTHER : XFER_FIFO_WR;
      REG_TO_C:      xfer_d = opb_req.rnw ? XFER_TO_C : XFER_OTHER;
      REG_DATA_TO_C: xfer_d = opb_req.rnw ? XFER_DATA_TO_C : XFER_OTHER;
      REG_EMPTY:     xfer_d = opb_req.rnw ? XFER_EMPTY : XFER_OTHER;
      default:       xfer_d = XFER_OTHER;
    endcase
    if (offset == REG_CM && !opb_req.rnw)  fifoadr_d = FADR_COMMAND;
    else if (offset == REG_FIFO_WR)        fifoadr_d = FADR_FIFO6;
    else                                   fifoadr_d = FADR_FIFO2;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      xfer      <= XFER_NONE;
      fifoadr_q <= FADR_FIFO2;
    end else begin
      xfer <= (hit && !done) ? xfer_d : XFER_NONE;
      if (cm_rd)    fifoadr_q <= FADR_COMMAND;
      else if (hit) fifoadr_q <= fifoadr_d;
    end
  end

  assign fifoadr = cm_rd ? FADR_COMMAND : fifoadr_q;

endmodule
