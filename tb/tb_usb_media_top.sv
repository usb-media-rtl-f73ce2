// tb_usb_media_top: end-to-end testbench of the remote control at its
// default parameters.
//
// A behavioural OPB master plays the processor's firmware and a
// behavioural SX2 plays the USB chip and the host behind it:
//  1. start-up: SX2 registers 0x01 = 0x05 and 0x06 = 0xF2 are written
//     through the command interface (READY low forces OPB retries), and
//     register 0x07 is read back through INT#, to_C and data_to_C;
//  2. the firmware polls the push buttons S1, S2 and S4 (play, stop and
//     next track) and, for each press and release, writes the key's
//     scancode into the endpoint-6 FIFO: press 0x29 / 0x02 / 0x03, release
//     the same plus 0x80;
//  3. the host stops reading for a while, so the FIFO fills and a write
//     stalls with PKTEND until the host drains it;
//  4. the host sends two words on endpoint 2, read through the empty flag
//     and the FIFO read register.
// The host must receive every scancode in order. Each mechanism (retry,
// interrupt-driven command read, full-FIFO stall, PKTEND, endpoint-2 read,
// empty flag, button press) is counted and must happen at least once.
module tb_usb_media_top;
  import usb_media_pkg::*;

  localparam logic [31:0] USB = 32'h0180_0000;
  localparam logic [31:0] PB  = 32'h0180_1000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  opb_req_t req;
  opb_rsp_t rsp;
  sx2_out_t sx2_out;
  sx2_in_t  sx2_in;
  logic     ifclk, s1, s2, s4;
  logic        host_drain, host_rx_valid, host_tx_valid;
  logic [15:0] host_rx_data, host_tx_data;

  usb_media_top dut (.clk, .rst, .opb_req(req), .opb_rsp(rsp), .sx2_out, .sx2_in,
                     .usb_ifclk(ifclk), .button_s1(s1), .button_s2(s2), .button_s4(s4));
  opb_master bfm (.clk, .req, .rsp);
  sx2_model #(.EP6_DEPTH(4), .EP6_PKT(2), .EP2_DEPTH(8), .READY_BUSY(8)) sx2 (
    .ifclk, .rst, .pins_i(sx2_out), .pins_o(sx2_in),
    .host_drain, .host_rx_valid, .host_rx_data, .host_tx_valid, .host_tx_data);

  int checks = 0, failures = 0;
  int n_retry = 0, n_int_read = 0, n_stall = 0, n_ep2 = 0, n_empty = 0, n_press = 0;
  logic [7:0] sent[$], got[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (host_rx_valid) got.push_back(host_rx_data[7:0]);

  task automatic rd(input logic [31:0] a, output logic [31:0] d, output int c);
    bit r, t;
    bfm.access(a, 1'b1, '0, d, r, t, c);
    check(!r && !t, $sformatf("read %h acknowledged", a));
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] v, output int c);
    bit r, t; logic [31:0] d;
    do begin
      bfm.access(a, 1'b0, v, d, r, t, c);
      n_retry += int'(r);
    end while (r);
    check(!t, $sformatf("write %h acknowledged", a));
  endtask

  task automatic sx2_write(input logic [5:0] a, input logic [7:0] v);
    int c;
    wr(USB | REG_CM, 32'h80 + 32'(a), c);
    wr(USB | REG_CM, 32'(v >> 4) & 32'hF, c);
    wr(USB | REG_CM, 32'(v) & 32'hF, c);
  endtask

  task automatic sx2_read(input logic [5:0] a, output logic [7:0] v);
    int c, n; logic [31:0] d;
    wr(USB | REG_CM, 32'hC0 + 32'(a), c);
    n = 0;
    // poll as the firmware does: a read of the command register (unmapped
    // for reads, returns 0), then the to_C flag
    do begin
      rd(USB | REG_CM, d, c);
      check(d == 0, "read of 0x00 returns 0");
      rd(USB | REG_TO_C, d, c); n++;
    end while (d == 0 && n < 100);
    check(n < 100, "to_C set after a command read");
    rd(USB | REG_DATA_TO_C, d, c);
    v = d[7:0];
    n_int_read++;
  endtask

  task automatic send_scancode(input logic [7:0] code);
    int c;
    wr(USB | REG_FIFO_WR, 32'(code), c);
    if (c > 4) n_stall++;
    sent.push_back(code);
  endtask

  // One firmware polling pass over the three buttons.
  logic [2:0] last = '0;
  task automatic poll_buttons();
    logic [31:0] d; int c; logic [2:0] now;
    logic [7:0] code [3] = '{8'h29, 8'h02, 8'h03};   // S1, S2, S4
    rd(PB + 32'h0, d, c); now[0] = d[31];
    rd(PB + 32'h4, d, c); now[1] = d[31];
    rd(PB + 32'hC, d, c); now[2] = d[31];
    check(now == {s4, s2, s1}, $sformatf("buttons read %b, pins %b", now, {s4, s2, s1}));
    for (int i = 0; i < 3; i++)
      if (now[i] != last[i]) begin
        if (now[i]) n_press++;
        send_scancode(now[i] ? code[i] : code[i] + 8'h80);
      end
    last = now;
  endtask

  initial begin
    logic [7:0] v; logic [31:0] d; int c;
    host_drain = 1; host_tx_valid = 0; host_tx_data = 0; s1 = 0; s2 = 0; s4 = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    // 1. start-up
    sx2_write(6'h01, 8'h05);
    sx2_write(6'h06, 8'hF2);
    check(sx2.regs[1] == 8'h05 && sx2.regs[6] == 8'hF2, "SX2 configured");
    sx2_read(6'h07, v);
    check(v == (8'h07 ^ 8'hA5), $sformatf("SX2 register 0x07 read (%02h)", v));
    sx2_read(6'h06, v);
    check(v == 8'hF2, $sformatf("SX2 register 0x06 read back (%02h)", v));

    // 2./3. button presses; host pauses during the middle of them
    for (int ev = 0; ev < 24; ev++) begin
      int b;
      b = $urandom % 3;
      case (b)
        0: s1 = ~s1;
        1: s2 = ~s2;
        default: s4 = ~s4;
      endcase
      if (ev == 6) fork begin host_drain = 0; repeat (200) @(posedge clk); host_drain = 1; end join_none
      poll_buttons();
    end
    // release everything so each press has its release
    s1 = 0; s2 = 0; s4 = 0;
    poll_buttons();
    if (sent.size() % 2 == 1) begin   // close the last packet
      int cc; wr(USB | REG_FIFO_WR, 32'h0, cc); sent.push_back(8'h00);
    end
    host_drain = 1;
    repeat (50) @(posedge clk);
    check(got.size() == sent.size(), $sformatf("host received %0d of %0d scancodes", got.size(), sent.size()));
    for (int i = 0; i < sent.size() && i < got.size(); i++)
      check(got[i] == sent[i], $sformatf("scancode %0d: got %02h sent %02h", i, got[i], sent[i]));

    // 4. endpoint 2
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); host_tx_valid = 1; host_tx_data = 16'hC0DE + 16'(i);
    end
    @(negedge clk); host_tx_valid = 0;
    rd(USB | REG_EMPTY, d, c);
    check(d == 0, "endpoint 2 not empty with words waiting");
    n_empty += int'(d == 0);
    for (int i = 0; i < 2; i++) begin
      rd(USB | REG_FIFO_RD, d, c);
      check(d == 32'(16'hC0DE + 16'(i)), $sformatf("endpoint-2 word %0d (%h)", i, d));
      n_ep2++;
    end
    rd(USB | REG_EMPTY, d, c);
    check(d == 1, "endpoint 2 empty after reading");
    n_empty += int'(d == 1);

    check(sx2.errors == 0, $sformatf("SX2 protocol errors: %0d", sx2.errors));
    $display("mechanisms: retry=%0d int_read=%0d stall=%0d pktend=%0d ep2_read=%0d empty_flag=%0d press=%0d",
             n_retry, n_int_read, n_stall, sx2.pktends, n_ep2, n_empty, n_press);
    check(n_retry > 0, "READY retry happened");
    check(n_int_read > 0, "interrupt-driven command read happened");
    check(n_stall > 0, "full-FIFO stall happened");
    check(sx2.pktends > 0, "PKTEND happened");
    check(n_ep2 > 0, "endpoint-2 read happened");
    check(n_empty == 2, "empty flag read both ways");
    check(n_press > 0, "button press happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
