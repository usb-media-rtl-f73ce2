// tb_opb_pushbutton: self-checking testbench of the push-button reader.
// Reads every button word for random button patterns and checks the data
// (button level in the most significant bit), the acknowledge in clock 3
// of the access, that writes and addresses outside the window are never
// acknowledged, and that the response is all zero outside the
// acknowledge clock.
module tb_opb_pushbutton;
  import usb_media_pkg::*;

  localparam logic [31:0] BASE = 32'h0180_0000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  opb_req_t   req;
  opb_rsp_t   rsp;
  logic [3:0] buttons;

  opb_pushbutton dut (.clk, .rst, .opb_req(req), .opb_rsp(rsp), .buttons);
  opb_master bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // outside the acknowledge the slave must drive zeros
  always @(negedge clk) if (!rst && !rsp.xferack && rsp != '0) begin
    failures++; $display("FAIL: response not zero outside acknowledge");
  end

  initial begin
    logic [31:0] d; bit r, t; int c;
    buttons = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 24; n++) begin
      buttons = 4'($urandom);
      repeat (3) @(posedge clk);
      for (int i = 0; i < 4; i++) begin
        bfm.access(BASE + 32'(4 * i), 1'b1, '0, d, r, t, c);
        check(!r && !t, "read acknowledged");
        check(c == 3, $sformatf("acknowledge in clock 3 (got %0d)", c));
        check(d == {buttons[i], 31'b0}, $sformatf("button S%0d reads %0d (got %h)", i + 1, buttons[i], d));
      end
    end
    // synchronizer: a change shows two clocks later
    @(negedge clk) buttons = 4'b0001;
    bfm.access(BASE, 1'b1, '0, d, r, t, c);
    check(d[31] == 1'b1, "fresh press seen by a read started at once");
    bfm.access(BASE + 32'h10, 1'b1, '0, d, r, t, c);
    check(t, "address outside the window not acknowledged");
    bfm.access(BASE, 1'b0, 32'hFFFF_FFFF, d, r, t, c);
    check(t, "write not acknowledged");
    bfm.access(BASE, 1'b1, '0, d, r, t, c);
    check(!t && d[31], "read after an unacknowledged write works");
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
