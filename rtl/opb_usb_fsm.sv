// opb_usb_fsm: controller FSM of the USB bridge.
//
// One FSM sequences every access to the SX2 chip. Its outputs are Mealy
// strobes, active high here and inverted to the chip's active-low pins by
// opb_usb.
//
//   IDLE      INT# asserted: command-port read strobe (cs, sloe, slrd,
//             cm_rd) -> XFER_INT. Otherwise any decoded access -> SELECTED.
//   SELECTED  FIFO read : cs, sloe, slrd                      -> READ
//             FIFO write, FIFO not full: cs, slwr, drive      -> XFER
//             FIFO write, FIFO full: pktend                   -> FULL
//             command write, READY: cs, slwr, drive           -> XFER
//             command write, not READY: OPB retry             -> IDLE
//             status reads                                    -> XFER
//   FULL      FIFO still full: pktend, stay; room: write      -> XFER
//   READ      cs, sloe (bus still turned toward the FPGA)     -> XFER
//   XFER      OPB acknowledge; after a FIFO read pass_ef      -> EMPTF
//   EMPTF     the empty flag is latched                       -> IDLE
//   XFER_INT, INT_C1: to_c (sets the interrupt indication)    -> INT_C2
//   INT_C2                                                    -> IDLE
//
// The states, the transitions and the strobes on them follow the design's
// state diagram, and the state codes are the design's. Choices of this
// implementation: the data bus is driven by the FPGA only with the write
// strobe (drive), never while SLOE is asserted; the OPB timeout is
// suppressed while a FIFO write waits for room; an empty-flag read also
// latches the flag (pass_ef) in SELECTED; accesses to unknown offsets are
// acknowledged.
//
// Timing: xferack is a decode of the registered state (XFER), one clock.
module opb_usb_fsm
  import usb_media_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  xfer_t      xfer,
  input  logic       int_req,   // INT# asserted
  input  logic       ready,       // SX2 READY
  input  logic       full,        // addressed FIFO full
  output usb_state_t state,
  output logic       cs,
  output logic       output_enable,
  output logic       slave_read,
  output logic       slave_write,
  output logic       pktend,
  output logic       drive,       // FPGA drives the SX2 data bus
  output logic       cm_rd,
  output logic       to_c,
  output logic       pass_ef,
  output logic       xferack,
  output logic       retry,
  output logic       toutsup
);

  usb_state_t next_state;

  always_ff @(posedge clk) begin
    if (rst) state <= ST_IDLE;
    else     state <= next_state;
  end

  always_comb begin
    next_state    = ST_IDLE;
    cs            = 1'b0;
    output_enable = 1'b0;
    slave_read    = 1'b0;
    slave_write   = 1'b0;
    pktend        = 1'b0;
    drive         = 1'b0;
    cm_rd         = 1'b0;
    to_c          = 1'b0;
    pass_ef       = 1'b0;
    retry         = 1'b0;
    toutsup       = 1'b0;
    unique case (state)
      ST_IDLE: begin
        if (int_req) begin
          cs = 1'b1; output_enable = 1'b1; slave_read = 1'b1; cm_rd = 1'b1;
          next_state = ST_XFER_INT;
        end else if (xfer != XFER_NONE) begin
          next_state = ST_SELECTED;
        end
      end
      ST_XFER_INT: begin
        to_c = 1'b1; cm_rd = 1'b1;
        next_state = ST_INT_C1;
      end
      ST_INT_C1: begin
        to_c = 1'b1;
        next_state = ST_INT_C2;
      end
      ST_INT_C2: next_state = ST_IDLE;
      ST_SELECTED: begin
        unique case (xfer)
          XFER_FIFO_RD: begin
            cs = 1'b1; output_enable = 1'b1; slave_read = 1'b1;
            next_state = ST_READ;
          end
          XFER_FIFO_WR: begin
            if (!full) begin
              cs = 1'b1; slave_write = 1'b1; drive = 1'b1;
              next_state = ST_XFER;
            end else begin
              pktend = 1'b1; toutsup = 1'b1;
              next_state = ST_FULL;
            end
          end
          XFER_CM_WR: begin
            if (ready) begin
              cs = 1'b1; slave_write = 1'b1; drive = 1'b1;
              next_state = ST_XFER;
            end else begin
              retry = 1'b1;
              next_state = ST_IDLE;
            end
          end
          XFER_EMPTY: begin
            pass_ef = 1'b1;
            next_state = ST_XFER;
          end
          XFER_TO_C, XFER_DATA_TO_C, XFER_OTHER: next_state = ST_XFER;
          default: next_state = ST_IDLE;
        endcase
      end
      ST_FULL: begin
        toutsup = 1'b1;
        if (xfer == XFER_FIFO_WR && !full) begin
          cs = 1'b1; slave_write = 1'b1; drive = 1'b1;
          next_state = ST_XFER;
        end else if (xfer == XFER_FIFO_WR) begin
          pktend = 1'b1;
          next_state = ST_FULL;
        end
      end
      ST_READ: begin
        cs = 1'b1; output_enable = 1'b1;
        next_state = ST_XFER;
      end
      ST_XFER: begin
        if (xfer == XFER_FIFO_RD) begin
          pass_ef = 1'b1;
          next_state = ST_EMPTF;
        end
      end
      ST_EMPTF: next_state = ST_IDLE;
      default:  next_state = ST_IDLE;
    endcase
  end

  assign xferack = (state == ST_XFER);

endmodule
