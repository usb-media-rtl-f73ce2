// usb_media_pkg: types and constants shared by the USB-remote-control FPGA
// design.
//
// The design hangs two slaves on the processor's OPB (On-chip Peripheral
// Bus): a bridge to a Cypress CY7C68001 (SX2) USB interface chip and a
// push-button reader. The OPB request and response bundles, the bridge's
// register map, the SX2 FIFO address codes, the SX2 command-byte format and
// the bridge FSM states all live here so that the RTL and the testbenches
// agree on them.
//
// Bit numbering: OPB documentation numbers bit 0 as the most significant
// bit. All vectors here are little-endian ([31:0], bit 0 = LSB); OPB bit n
// is bit (31-n) of these vectors.
package usb_media_pkg;

  // ---------------------------------------------------------------- OPB
  localparam int unsigned OPB_AWIDTH = 32;
  localparam int unsigned OPB_DWIDTH = 32;

  // Master-to-slave half of the OPB.
  typedef struct packed {
    logic [OPB_AWIDTH-1:0]   abus;
    logic [OPB_DWIDTH/8-1:0] be;
    logic [OPB_DWIDTH-1:0]   dbus;
    logic                    rnw;      // 1 = read, 0 = write
    logic                    select;
    logic                    seqaddr;
  } opb_req_t;

  // Slave-to-master half. A slave drives all zeros while it is not
  // acknowledging, so the bus can OR the responses of all slaves.
  typedef struct packed {
    logic [OPB_DWIDTH-1:0] dbus;
    logic                  errack;
    logic                  retry;
    logic                  toutsup;
    logic                  xferack;
  } opb_rsp_t;

  localparam opb_rsp_t OPB_RSP_IDLE = '0;

  // --------------------------------------------- USB bridge register map
  // Byte offsets from the bridge's base address.
  localparam logic [7:0] REG_CM        = 8'h00;  // write: SX2 command byte
  localparam logic [7:0] REG_FIFO_RD   = 8'h04;  // read : EP2 OUT FIFO word
  localparam logic [7:0] REG_FIFO_WR   = 8'h08;  // write: EP6 IN FIFO word
  localparam logic [7:0] REG_TO_C      = 8'h10;  // read : interrupt seen (bit 0)
  localparam logic [7:0] REG_DATA_TO_C = 8'h14;  // read : byte from command read
  localparam logic [7:0] REG_EMPTY     = 8'h18;  // read : EP2 empty (bit 0)

  // Kind of OPB access the bridge is serving.
  typedef enum logic [2:0] {
    XFER_NONE      = 3'd0,
    XFER_CM_WR     = 3'd1,
    XFER_FIFO_RD   = 3'd2,
    XFER_FIFO_WR   = 3'd3,
    XFER_TO_C      = 3'd4,
    XFER_DATA_TO_C = 3'd5,
    XFER_EMPTY     = 3'd6,
    XFER_OTHER     = 3'd7   // any other offset: acknowledged, reads 0
  } xfer_t;

  // ------------------------------------------------ SX2 FIFOADR[2:0] codes
  localparam logic [2:0] FADR_FIFO2   = 3'b000;
  localparam logic [2:0] FADR_FIFO4   = 3'b001;
  localparam logic [2:0] FADR_FIFO6   = 3'b010;
  localparam logic [2:0] FADR_FIFO8   = 3'b011;
  localparam logic [2:0] FADR_COMMAND = 3'b100;

  // --------------------------------------------- SX2 command byte format
  // Address byte: bit 7 = 1, bit 6 = 1 for a register read, bits 5:0 the
  // register. Data byte: bit 7 = 0, bits 3:0 one nibble; a register write
  // is the address byte followed by the high and then the low nibble.
  localparam int unsigned CMD_ADDR_BIT = 7;
  localparam int unsigned CMD_READ_BIT = 6;

  // ------------------------------------------------------- SX2 pin bundles
  localparam int unsigned USB_AWIDTH = 3;
  localparam int unsigned USB_DWIDTH = 16;

  // FPGA to SX2. Strobes are active low, as on the chip's pins. d_oe = 1
  // means the FPGA drives the data bus with d_o.
  typedef struct packed {
    logic [USB_AWIDTH-1:0] fifoadr;
    logic                  cs_n;
    logic                  sloe_n;
    logic                  slrd_n;
    logic                  slwr_n;
    logic                  pktend_n;
    logic [USB_DWIDTH-1:0] d_o;
    logic                  d_oe;
  } sx2_out_t;

  // SX2 to FPGA. FLAGB is the addressed FIFO's full flag and FLAGC its
  // empty flag, both active low; INT# is active low.
  typedef struct packed {
    logic                  flaga;
    logic                  flagb_n;
    logic                  flagc_n;
    logic                  ready;
    logic                  int_n;
    logic [USB_DWIDTH-1:0] d_i;
  } sx2_in_t;

  // ------------------------------------------------------ bridge FSM states
  typedef enum logic [3:0] {
    ST_IDLE     = 4'b0000,
    ST_FULL     = 4'b0001,
    ST_READ     = 4'b0010,
    ST_XFER_INT = 4'b0011,
    ST_XFER     = 4'b0110,
    ST_INT_C1   = 4'b1000,
    ST_EMPTF    = 4'b1001,
    ST_INT_C2   = 4'b1010,
    ST_SELECTED = 4'b1011
  } usb_state_t;

endpackage
