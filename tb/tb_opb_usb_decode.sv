// tb_opb_usb_decode: self-checking testbench of the bridge's address
// decoder. Random OPB requests (inside and outside the 4 KiB window, all
// six register offsets and others, both directions), random done and
// cm_rd; a reference written here from the register list predicts the
// registered transfer type and the FIFO address lines every clock.
module tb_opb_usb_decode;
  import usb_media_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  opb_req_t req;
  logic     done, cm_rd;
  xfer_t    xfer;
  logic [2:0] fifoadr;

  opb_usb_decode dut (.clk, .rst, .opb_req(req), .done, .cm_rd, .xfer, .fifoadr);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic xfer_t ref_type(input logic [7:0] off, input logic rnw);
    if (off == 8'h00 && !rnw) return XFER_CM_WR;
    if (off == 8'h04 &&  rnw) return XFER_FIFO_RD;
    if (off == 8'h08 && !rnw) return XFER_FIFO_WR;
    if (off == 8'h10 &&  rnw) return XFER_TO_C;
    if (off == 8'h14 &&  rnw) return XFER_DATA_TO_C;
    if (off == 8'h18 &&  rnw) return XFER_EMPTY;
    return XFER_OTHER;
  endfunction

  function automatic logic [2:0] ref_adr(input logic [7:0] off, input logic rnw);
    if (off == 8'h00 && !rnw) return 3'b100;
    if (off == 8'h08) return 3'b010;
    return 3'b000;
  endfunction

  initial begin
    xfer_t exp_type; logic [2:0] exp_q; bit hit;
    logic [7:0] offs[8] = '{8'h00, 8'h04, 8'h08, 8'h10, 8'h14, 8'h18, 8'h0C, 8'h20};
    int n_hits = 0;
    req = '0; done = 0; cm_rd = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(xfer == XFER_NONE && fifoadr == 3'b000, "reset values");
    exp_q = 3'b000;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req.select = ($urandom % 4) != 0;
      req.rnw    = 1'($urandom);
      case ($urandom % 4)
        0: req.abus = 32'h0180_0000 | 32'(offs[$urandom % 8]);
        1: req.abus = 32'h0180_0000 | 32'($urandom % 4096);
        2: req.abus = 32'h0180_1000 | 32'(offs[$urandom % 8]);
        default: req.abus = $urandom;
      endcase
      done  = ($urandom % 5) == 0;
      cm_rd = ($urandom % 7) == 0;
      #1;
      check(fifoadr == (cm_rd ? 3'b100 : exp_q), "fifoadr pins");
      hit = req.select && req.abus[31:12] == 20'h01800;
      n_hits += int'(hit);
      exp_type = (hit && !done) ? ref_type(req.abus[7:0], req.rnw) : XFER_NONE;
      if (cm_rd)    exp_q = 3'b100;
      else if (hit) exp_q = ref_adr(req.abus[7:0], req.rnw);
      @(posedge clk); #1;
      check(xfer == exp_type, $sformatf("transfer type (addr %h rnw %0d sel %0d done %0d): got %0d exp %0d",
                                         req.abus, req.rnw, req.select, done, xfer, exp_type));
    end
    check(n_hits > 500, "enough selected accesses");
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
