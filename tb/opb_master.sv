// opb_master: behavioural OPB master for testbenches, standing in for the
// processor. access() runs one single-beat transfer: it raises select with
// the address, RNW and write data in the middle of a clock, waits for
// xferack or retry, keeps select high through the acknowledge clock and
// drops it in the next one. Without xferack, retry or toutsup for
// TIMEOUT clocks it gives up, as the OPB timeout would. cycles is the
// clock, counted from 1 = first clock with select high, in which the
// response came.
module opb_master
  import usb_media_pkg::*;
#(
  parameter int TIMEOUT = 16
) (
  input  logic     clk,
  output opb_req_t req,
  input  opb_rsp_t rsp
);

  initial req = '0;

  task automatic access(input logic [31:0] addr, input logic rnw, input logic [31:0] wdata,
                        output logic [31:0] rdata, output bit retried, output bit timed_out,
                        output int cycles);
    int quiet;
    rdata = '0; retried = 0; timed_out = 0; cycles = 1; quiet = 0;
    @(negedge clk);
    req.abus = addr; req.rnw = rnw; req.dbus = rnw ? '0 : wdata; req.be = '1;
    req.select = 1'b1; req.seqaddr = 1'b0;
    forever begin
      @(negedge clk);
      cycles++;
      if (rsp.xferack) begin rdata = rsp.dbus; break; end
      if (rsp.retry)   begin retried = 1; break; end
      if (rsp.toutsup) quiet = 0; else quiet++;
      if (quiet >= TIMEOUT) begin timed_out = 1; break; end
    end
    @(negedge clk);
    req = '0;
  endtask

endmodule
