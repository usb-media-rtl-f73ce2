// tb_opb_usb_datapath: self-checking testbench of the bridge data path.
// Random controls and data; a reference kept here predicts the write
// register, the captured FIFO word and interrupt byte, the to_C and
// empty flags and the OPB read data every clock.
module tb_opb_usb_datapath;
  import usb_media_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  xfer_t       xfer;
  logic [31:0] opb_dbus;
  logic [15:0] usb_do, usb_di;
  logic        flagc_n, slave_read, cm_rd, to_c_set, pass_ef, xferack;
  logic [31:0] sln_dbus;
  logic        to_c, empty_flag;

  opb_usb_datapath dut (.clk, .rst, .xfer, .opb_dbus, .usb_do, .flagc_n, .slave_read, .cm_rd,
                        .to_c_set, .pass_ef, .xferack, .usb_di, .sln_dbus, .to_c, .empty_flag);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] r_di, r_fifo; logic [7:0] r_int; logic r_toc, r_empty;
    logic [31:0] exp_d;
    int n_clear = 0, n_int = 0, n_fifo = 0;
    xfer = XFER_NONE; opb_dbus = 0; usb_do = 0; flagc_n = 1;
    {slave_read, cm_rd, to_c_set, pass_ef, xferack} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    r_di = 0; r_fifo = 0; r_int = 0; r_toc = 0; r_empty = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      xfer       = xfer_t'($urandom % 8);
      opb_dbus   = $urandom;
      usb_do     = 16'($urandom);
      flagc_n    = 1'($urandom);
      slave_read = ($urandom % 4) == 0;
      cm_rd      = 1'($urandom);
      to_c_set   = ($urandom % 8) == 0;
      pass_ef    = ($urandom % 4) == 0;
      xferack    = ($urandom % 3) == 0;
      #1;
      // combinational read data
      exp_d = 0;
      if (xferack) begin
        if (xfer == XFER_FIFO_RD) exp_d = {16'h0, r_fifo};
        if (xfer == XFER_TO_C) exp_d = {31'h0, r_toc};
        if (xfer == XFER_DATA_TO_C) exp_d = {24'h0, r_int};
        if (xfer == XFER_EMPTY) exp_d = {31'h0, r_empty};
      end
      check(sln_dbus == exp_d, $sformatf("read data xfer %0d ack %0d: got %h exp %h", xfer, xferack, sln_dbus, exp_d));
      check(usb_di == r_di && to_c == r_toc && empty_flag == r_empty, "registers");
      // next state of the reference
      if (xfer == XFER_CM_WR || xfer == XFER_FIFO_WR) r_di = opb_dbus[15:0];
      if (slave_read && cm_rd) begin r_int = usb_do[7:0]; n_int++; end
      else if (slave_read) begin r_fifo = usb_do; n_fifo++; end
      if (to_c_set) r_toc = 1;
      else if (xferack && xfer == XFER_DATA_TO_C) begin r_toc = 0; n_clear++; end
      if (pass_ef) r_empty = !flagc_n;
    end
    check(n_clear > 100 && n_int > 100 && n_fifo > 100, "all captures exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
