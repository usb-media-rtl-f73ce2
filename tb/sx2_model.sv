// sx2_model: behavioural model of the Cypress CY7C68001 (SX2) USB
// interface chip, as seen from its FPGA-side pins in synchronous slave
// mode with a 16-bit FIFO bus. Not synthesizable; for testbenches only.
//
// Modelled:
//  * Command interface (FIFOADR = 100). A written byte with bit 7 set
//    selects a register (bits 5:0); with bit 6 also set it asks for a read:
//    INT_DELAY clocks later INT# goes low and the register value is shown
//    on the data pins while CS# and SLOE are low; SLRD clears INT#. Two
//    following bytes with bit 7 clear carry the high and the low nibble of
//    a register write. Every command write drops READY for READY_BUSY
//    clocks; a write while READY is low is counted as a protocol error.
//  * Endpoint 6 IN FIFO (FIFOADR = 010), written with SLWR. Words become
//    visible to the host in packets of EP6_PKT words or when PKTEND is
//    strobed; the host takes one committed word per clock while
//    host_drain is high.
//  * Endpoint 2 OUT FIFO (FIFOADR = 000), filled by the host through
//    host_tx_valid/host_tx_data, read with SLOE + SLRD.
//  * Flags follow FIFOADR at once: FLAGB = full, FLAGC = empty of the
//    addressed FIFO, both active low. FLAGA is tied high.
//  * Protocol errors counted in errors: writing a full FIFO, reading an
//    empty one, bus contention, strobes at an unused address.
module sx2_model
  import usb_media_pkg::*;
#(
  parameter int EP6_DEPTH  = 16,
  parameter int EP6_PKT    = 8,
  parameter int EP2_DEPTH  = 16,
  parameter int READY_BUSY = 3,
  parameter int INT_DELAY  = 4
) (
  input  logic        ifclk,
  input  logic        rst,
  input  sx2_out_t    pins_i,          // from the FPGA
  output sx2_in_t     pins_o,          // to the FPGA
  input  logic        host_drain,
  output logic        host_rx_valid,
  output logic [15:0] host_rx_data,
  input  logic        host_tx_valid,
  input  logic [15:0] host_tx_data
);

  logic [7:0]  regs [64];
  logic [5:0]  cur_reg;
  logic        nibble_phase;
  logic [3:0]  hi_nibble;
  logic [7:0]  read_byte;
  logic        int_n;
  int          int_cnt;
  int          busy_cnt;

  logic [15:0] ep6_q[$];
  logic [15:0] ep2_q[$];
  int          ep6_cnt, ep6_committed, ep6_open, ep2_cnt;

  // statistics for the testbenches
  logic [7:0] cmd_log[$];   // every byte written to the command interface
  int errors, cmd_writes, cmd_reads, reg_writes, reg_reads, pktends, ep6_words, ep2_words;

  // What the pins show is copied from the working state with nonblocking
  // assignments, so the FPGA never sees a change inside the clock edge.
  int          busy_q, ep6_cnt_q, ep2_cnt_q;
  logic        int_n_q;
  logic [7:0]  read_byte_q;
  logic [15:0] ep2_head_q;

  logic sel;
  assign sel = !pins_i.cs_n;

  always_comb begin
    pins_o.flaga = 1'b1;
    pins_o.ready = (busy_q == 0);
    pins_o.int_n = int_n_q;
    unique case (pins_i.fifoadr)
      FADR_FIFO6: begin pins_o.flagb_n = !(ep6_cnt_q >= EP6_DEPTH); pins_o.flagc_n = !(ep6_cnt_q == 0); end
      FADR_FIFO2: begin pins_o.flagb_n = !(ep2_cnt_q >= EP2_DEPTH); pins_o.flagc_n = !(ep2_cnt_q == 0); end
      default:    begin pins_o.flagb_n = 1'b1; pins_o.flagc_n = 1'b1; end
    endcase
    pins_o.d_i = '0;
    if (sel && !pins_i.sloe_n) begin
      if (pins_i.fifoadr == FADR_COMMAND) pins_o.d_i = {8'h00, read_byte_q};
      else if (pins_i.fifoadr == FADR_FIFO2) pins_o.d_i = ep2_head_q;
    end
  end

  initial begin
    for (int i = 0; i < 64; i++) regs[i] = 8'(i) ^ 8'hA5;
  end

  task automatic command_byte(input logic [7:0] b);
    cmd_writes++;
    cmd_log.push_back(b);
    if (b[CMD_ADDR_BIT]) begin
      cur_reg      = b[5:0];
      nibble_phase = 1'b0;
      if (b[CMD_READ_BIT]) begin
        read_byte = regs[b[5:0]];
        int_cnt   = INT_DELAY;
        reg_reads++;
      end
    end else if (!nibble_phase) begin
      hi_nibble    = b[3:0];
      nibble_phase = 1'b1;
    end else begin
      regs[cur_reg] = {hi_nibble, b[3:0]};
      nibble_phase  = 1'b0;
      reg_writes++;
    end
  endtask

  always @(posedge ifclk) begin
    host_rx_valid <= 1'b0;
    if (rst) begin
      int_n = 1'b1; int_cnt = 0; busy_cnt = 0; nibble_phase = 1'b0;
      cur_reg = '0; hi_nibble = '0; read_byte = '0;
      ep6_q.delete(); ep2_q.delete(); cmd_log.delete();
      ep6_cnt = 0; ep6_committed = 0; ep6_open = 0; ep2_cnt = 0;
      errors = 0; cmd_writes = 0; cmd_reads = 0; reg_writes = 0; reg_reads = 0;
      pktends = 0; ep6_words = 0; ep2_words = 0;
    end else begin
      if (busy_cnt > 0) busy_cnt--;
      if (int_cnt > 0) begin
        int_cnt--;
        if (int_cnt == 0) int_n = 1'b0;
      end
      if (pins_i.d_oe && sel && !pins_i.sloe_n) errors++;
      if (sel && !pins_i.slwr_n) begin
        if (!pins_i.d_oe) errors++;
        unique case (pins_i.fifoadr)
          FADR_COMMAND: begin
            if (busy_cnt > 0) errors++;
            command_byte(pins_i.d_o[7:0]);
            busy_cnt = READY_BUSY;
          end
          FADR_FIFO6: begin
            if (ep6_cnt >= EP6_DEPTH) errors++;
            else begin
              ep6_q.push_back(pins_i.d_o);
              ep6_cnt++; ep6_open++; ep6_words++;
              if (ep6_open == EP6_PKT) begin ep6_committed += ep6_open; ep6_open = 0; end
            end
          end
          default: errors++;
        endcase
      end
      if (sel && !pins_i.slrd_n) begin
        if (pins_i.sloe_n) errors++;
        unique case (pins_i.fifoadr)
          FADR_COMMAND: begin cmd_reads++; int_n = 1'b1; end
          FADR_FIFO2: begin
            if (ep2_cnt == 0) errors++;
            else begin void'(ep2_q.pop_front()); ep2_cnt--; end
          end
          default: errors++;
        endcase
      end
      if (!pins_i.pktend_n && pins_i.fifoadr == FADR_FIFO6) begin
        pktends++;
        ep6_committed += ep6_open; ep6_open = 0;
      end
      if (host_drain && ep6_committed > 0) begin
        host_rx_valid <= 1'b1;
        host_rx_data  <= ep6_q.pop_front();
        ep6_cnt--; ep6_committed--;
      end
      if (host_tx_valid) begin
        if (ep2_cnt >= EP2_DEPTH) errors++;
        else begin ep2_q.push_back(host_tx_data); ep2_cnt++; ep2_words++; end
      end
    end
    busy_q      <= busy_cnt;
    int_n_q     <= int_n;
    ep6_cnt_q   <= ep6_cnt;
    ep2_cnt_q   <= ep2_cnt;
    read_byte_q <= read_byte;
    ep2_head_q  <= (ep2_cnt > 0) ? ep2_q[0] : 16'h0;
  end

endmodule
