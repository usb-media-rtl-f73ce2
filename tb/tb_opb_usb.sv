// tb_opb_usb: self-checking testbench of the USB bridge against a
// behavioural SX2. It writes and reads SX2 registers through the command
// interface (meeting READY-low retries on the way), fills the endpoint-6
// FIFO until it is full so the bridge stalls and strobes PKTEND, reads
// endpoint-2 words and the empty flag, and checks every OPB response
// clock against the bridge's documented latency.
module tb_opb_usb;
  import usb_media_pkg::*;

  localparam logic [31:0] BASE = 32'h0180_0000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  opb_req_t req;
  opb_rsp_t rsp;
  sx2_out_t sx2_out;
  sx2_in_t  sx2_in;
  logic     ifclk;
  logic        host_drain, host_rx_valid, host_tx_valid;
  logic [15:0] host_rx_data, host_tx_data;

  opb_usb dut (.clk, .rst, .opb_req(req), .opb_rsp(rsp), .sx2_out, .sx2_in, .usb_ifclk(ifclk));
  opb_master bfm (.clk, .req, .rsp);
  sx2_model #(.EP6_DEPTH(4), .EP6_PKT(8), .EP2_DEPTH(8), .READY_BUSY(8)) sx2 (
    .ifclk, .rst, .pins_i(sx2_out), .pins_o(sx2_in),
    .host_drain, .host_rx_valid, .host_rx_data, .host_tx_valid, .host_tx_data);

  int checks = 0, failures = 0;
  int retries = 0, stalls = 0;
  logic [15:0] rx_seen[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (host_rx_valid) rx_seen.push_back(host_rx_data);

  task automatic rd(input logic [7:0] off, output logic [31:0] d, output int cyc);
    bit r, t;
    bfm.access(BASE | 32'(off), 1'b1, '0, d, r, t, cyc);
    check(!r && !t, $sformatf("read 0x%02h acknowledged", off));
  endtask

  // Write, retrying while the bridge answers with OPB retry.
  task automatic wr(input logic [7:0] off, input logic [31:0] v, output int cyc);
    bit r, t; logic [31:0] d;
    do begin
      bfm.access(BASE | 32'(off), 1'b0, v, d, r, t, cyc);
      if (r) begin
        retries++;
        check(cyc == 3, $sformatf("retry in clock 3 (got %0d)", cyc));
      end
    end while (r);
    check(!t, $sformatf("write 0x%02h acknowledged", off));
  endtask

  task automatic sx2_reg_write(input logic [5:0] a, input logic [7:0] v);
    int c;
    wr(REG_CM, 32'h80 | 32'(a), c);
    check(c == 4, $sformatf("command write acked in clock 4 (got %0d)", c));
    wr(REG_CM, 32'(v[7:4]), c);
    wr(REG_CM, 32'(v[3:0]), c);
  endtask

  task automatic sx2_reg_read(input logic [5:0] a, output logic [7:0] v);
    int c, n; logic [31:0] d;
    wr(REG_CM, 32'hC0 | 32'(a), c);
    n = 0;
    do begin rd(REG_TO_C, d, c); n++; end while (d[0] == 1'b0 && n < 50);
    check(d == 32'h1, "interrupt indication raised");
    rd(REG_DATA_TO_C, d, c);
    check(c == 4, $sformatf("status read acked in clock 4 (got %0d)", c));
    v = d[7:0];
    check(d[31:8] == 0, "interrupt byte upper bits zero");
    rd(REG_TO_C, d, c);
    check(d == 0, "interrupt indication cleared by reading the byte");
  endtask

  initial begin
    logic [31:0] d; int c; logic [7:0] v;
    host_drain = 1; host_tx_valid = 0; host_tx_data = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    // idle status
    rd(REG_TO_C, d, c);
    check(d == 0 && c == 4, $sformatf("to_C idle read 0 in clock 4 (d=%0h c=%0d)", d, c));
    check(sx2_out.cs_n && sx2_out.slwr_n && sx2_out.slrd_n && sx2_out.sloe_n && sx2_out.pktend_n,
          "strobes inactive at rest");

    // register writes as the firmware does at start-up
    sx2_reg_write(6'h01, 8'h05);
    sx2_reg_write(6'h06, 8'hF2);
    check(sx2.regs[1] == 8'h05, "SX2 register 0x01 written");
    check(sx2.regs[6] == 8'hF2, "SX2 register 0x06 written");
    check(retries > 0, "READY low caused an OPB retry");

    // register reads through INT#
    sx2_reg_read(6'h07, v);
    check(v == (8'h07 ^ 8'hA5), $sformatf("SX2 register 0x07 read back (got %02h)", v));
    sx2_reg_read(6'h06, v);
    check(v == 8'hF2, $sformatf("SX2 register 0x06 read back (got %02h)", v));
    check(sx2.cmd_reads == 2, "two command-port reads");

    // endpoint 6: 4-word FIFO, packets of 8, so the 5th word stalls until PKTEND
    for (int i = 0; i < 10; i++) begin
      wr(REG_FIFO_WR, 32'hABCD_0000 | 32'(16'h1000 + i), c);
      if (c > 4) stalls++;
      else check(c == 4, $sformatf("FIFO write acked in clock 4 (got %0d)", c));
    end
    check(stalls > 0, "full FIFO stalled a write");
    check(sx2.pktends > 0, "PKTEND strobed on a full FIFO");
    // drain the rest with one more short packet end: write until committed
    repeat (20) @(posedge clk);
    check(sx2.ep6_words == 10, "ten words entered endpoint 6");
    for (int i = 0; i < rx_seen.size(); i++)
      check(rx_seen[i] == 16'(16'h1000 + i), $sformatf("host word %0d in order", i));
    check(rx_seen.size() >= 8, $sformatf("host got the flushed words (%0d)", rx_seen.size()));

    // endpoint 2: host sends three words
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); host_tx_valid = 1; host_tx_data = 16'h5A00 + 16'(i);
    end
    @(negedge clk); host_tx_valid = 0;
    rd(REG_EMPTY, d, c);
    check(d == 0, "empty flag 0 with data waiting");
    for (int i = 0; i < 3; i++) begin
      rd(REG_FIFO_RD, d, c);
      check(d == 32'(16'h5A00 + 16'(i)), $sformatf("endpoint-2 word %0d (got %h)", i, d));
      check(c == 5, $sformatf("FIFO read acked in clock 5 (got %0d)", c));
    end
    rd(REG_EMPTY, d, c);
    check(d == 1, "empty flag 1 after the last word");

    // unknown offset answers 0
    rd(8'h20, d, c);
    check(d == 0 && c == 4, "unknown offset reads 0");

    check(sx2.errors == 0, $sformatf("no SX2 protocol errors (%0d)", sx2.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
