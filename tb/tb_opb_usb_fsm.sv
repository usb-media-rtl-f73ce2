// tb_opb_usb_fsm: self-checking testbench of the bridge controller FSM.
// A reference written from the state diagram (a transition table of
// state, condition, next state and strobes) runs beside the FSM under
// random transfer types, INT#, READY and FIFO-full inputs; every clock
// the state and all strobes are compared. Each transition of the diagram
// is counted and must occur.
module tb_opb_usb_fsm;
  import usb_media_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  xfer_t      xfer;
  logic       int_req, ready, full;
  usb_state_t state;
  logic cs, oe, rd, wr, pkt, drv, cmrd, toc, pef, ack, rty, tos;

  opb_usb_fsm dut (.clk, .rst, .xfer, .int_req, .ready, .full, .state,
                   .cs, .output_enable(oe), .slave_read(rd), .slave_write(wr), .pktend(pkt),
                   .drive(drv), .cm_rd(cmrd), .to_c(toc), .pass_ef(pef), .xferack(ack),
                   .retry(rty), .toutsup(tos));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // strobe vector: {cs, oe, rd, wr, pkt, drv, cmrd, toc, pef, rty, tos}
  typedef logic [10:0] strobes_t;
  localparam strobes_t S_CMRD  = 11'b111_000_1_0_0_0_0;
  localparam strobes_t S_FRD   = 11'b111_000_0_0_0_0_0;
  localparam strobes_t S_WR    = 11'b100_101_0_0_0_0_0;
  localparam strobes_t S_PKT   = 11'b000_010_0_0_0_0_1;
  localparam strobes_t S_RETRY = 11'b000_000_0_0_0_1_0;
  localparam strobes_t S_RDHLD = 11'b110_000_0_0_0_0_0;
  localparam strobes_t S_PEF   = 11'b000_000_0_0_1_0_0;

  int seen[string];

  task automatic reference(input usb_state_t s, output usb_state_t nx, output strobes_t o);
    o = '0; nx = ST_IDLE;
    case (s)
      ST_IDLE:
        if (int_req) begin nx = ST_XFER_INT; o = S_CMRD; seen["idle-int"]++; end
        else if (xfer != XFER_NONE) begin nx = ST_SELECTED; seen["idle-sel"]++; end
      ST_XFER_INT: begin nx = ST_INT_C1; o = 11'b000_000_1_1_0_0_0; seen["xint-c1"]++; end
      ST_INT_C1:   begin nx = ST_INT_C2; o = 11'b000_000_0_1_0_0_0; seen["c1-c2"]++; end
      ST_INT_C2:   begin nx = ST_IDLE; seen["c2-idle"]++; end
      ST_SELECTED:
        if (xfer == XFER_FIFO_RD) begin nx = ST_READ; o = S_FRD; seen["sel-read"]++; end
        else if (xfer == XFER_FIFO_WR && !full) begin nx = ST_XFER; o = S_WR; seen["sel-fwr"]++; end
        else if (xfer == XFER_FIFO_WR) begin nx = ST_FULL; o = S_PKT; seen["sel-full"]++; end
        else if (xfer == XFER_CM_WR && ready) begin nx = ST_XFER; o = S_WR; seen["sel-cwr"]++; end
        else if (xfer == XFER_CM_WR) begin nx = ST_IDLE; o = S_RETRY; seen["sel-retry"]++; end
        else if (xfer == XFER_EMPTY) begin nx = ST_XFER; o = S_PEF; seen["sel-status"]++; end
        else if (xfer != XFER_NONE) begin nx = ST_XFER; seen["sel-status"]++; end
      ST_FULL:
        if (xfer == XFER_FIFO_WR && !full) begin nx = ST_XFER; o = S_WR | 11'b1; seen["full-xfer"]++; end
        else if (xfer == XFER_FIFO_WR) begin nx = ST_FULL; o = S_PKT; seen["full-stay"]++; end
        else begin nx = ST_IDLE; o = 11'b1; seen["full-idle"]++; end
      ST_READ: begin nx = ST_XFER; o = S_RDHLD; seen["read-xfer"]++; end
      ST_XFER:
        if (xfer == XFER_FIFO_RD) begin nx = ST_EMPTF; o = S_PEF; seen["xfer-emptf"]++; end
        else begin nx = ST_IDLE; seen["xfer-idle"]++; end
      ST_EMPTF: begin nx = ST_IDLE; seen["emptf-idle"]++; end
      default: nx = ST_IDLE;
    endcase
  endtask

  initial begin
    usb_state_t exp_s, nx; strobes_t o, got;
    xfer = XFER_NONE; int_req = 0; ready = 1; full = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    exp_s = ST_IDLE;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // hold a transfer type for a while, as the decoder does
      if ($urandom % 6 == 0) xfer = xfer_t'($urandom % 8);
      int_req = ($urandom % 10) == 0;
      ready     = ($urandom % 3) != 0;
      full      = ($urandom % 3) == 0;
      #1;
      check(state == exp_s, $sformatf("state %0d expected %0d", state, exp_s));
      reference(exp_s, nx, o);
      got = {cs, oe, rd, wr, pkt, drv, cmrd, toc, pef, rty, tos};
      check(got == o, $sformatf("strobes in state %0d: got %b exp %b", exp_s, got, o));
      check(ack == (exp_s == ST_XFER), "xferack only in XFER");
      exp_s = nx;
    end
    foreach (seen[k]) $display("transition %-11s %0d", k, seen[k]);
    check(seen.num() == 18, $sformatf("all 18 transitions taken (%0d)", seen.num()));
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
