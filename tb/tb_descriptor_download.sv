// tb_descriptor_download: the firmware's descriptor download through the
// USB bridge. The firmware writes the descriptor-RAM address byte (0x80 |
// 0x30), the length (66 bytes) and a zero, then the 66 descriptor bytes,
// all as single command-interface writes to register 0x00. The SX2 drops
// READY after every byte, so most writes meet an OPB retry first. The
// testbench checks that the SX2 receives exactly the 69 bytes, in order,
// none lost or doubled, and counts the clocks the download takes. The
// descriptor contents here are pseudo-random bytes of the right length.
module tb_descriptor_download;
  import usb_media_pkg::*;

  localparam logic [31:0] BASE = 32'h0180_0000;
  localparam int DESC_LENGTH = 66;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  opb_req_t req;
  opb_rsp_t rsp;
  sx2_out_t sx2_out;
  sx2_in_t  sx2_in;
  logic     ifclk;
  logic        host_rx_valid;
  logic [15:0] host_rx_data;

  opb_usb dut (.clk, .rst, .opb_req(req), .opb_rsp(rsp), .sx2_out, .sx2_in, .usb_ifclk(ifclk));
  opb_master bfm (.clk, .req, .rsp);
  sx2_model #(.READY_BUSY(6)) sx2 (
    .ifclk, .rst, .pins_i(sx2_out), .pins_o(sx2_in),
    .host_drain(1'b1), .host_rx_valid, .host_rx_data, .host_tx_valid(1'b0), .host_tx_data(16'h0));

  int checks = 0, failures = 0, retries = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] stream[$];
    logic [31:0] d; bit r, t; int c; longint t0, t1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    stream.push_back(8'h80 | 8'h30);
    stream.push_back(8'(DESC_LENGTH));
    stream.push_back(8'h00);
    for (int i = 0; i < DESC_LENGTH; i++) stream.push_back(8'($urandom));
    t0 = $time;
    foreach (stream[i]) begin
      do begin
        bfm.access(BASE | 32'(REG_CM), 1'b0, 32'(stream[i]), d, r, t, c);
        retries += int'(r);
      end while (r);
      check(!t, "command write acknowledged");
    end
    t1 = $time;
    check(sx2.cmd_log.size() == stream.size(),
          $sformatf("SX2 got %0d of %0d bytes", sx2.cmd_log.size(), stream.size()));
    foreach (stream[i])
      if (i < sx2.cmd_log.size())
        check(sx2.cmd_log[i] == stream[i], $sformatf("byte %0d: %02h vs %02h", i, sx2.cmd_log[i], stream[i]));
    check(retries > 0, "READY retries occurred");
    check(sx2.errors == 0, "no SX2 protocol errors");
    $display("descriptor download: %0d bytes, %0d retries, %0d clocks",
             stream.size(), retries, (t1 - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
