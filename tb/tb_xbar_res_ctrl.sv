// tb_xbar_res_ctrl: resource controller of one crossbar column with 2 resources.
// Checks that the resource signal is offered only in request cycles with an idle bus
// and a free resource, that a returned 0 takes the bus and the lowest free resource,
// that an unanswered offer is repeated, that beats go to the chosen resource, that
// the bus is released at the end of the reset cycle after the last beat, and that the
// offer stops while both resources are busy.
module tb_xbar_res_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  localparam int R = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mode_e mode;
  logic y_avl, y_ret, bus_busy, alloc;
  beat_t bus_do, res_beat;
  logic [R-1:0] svc_done, res_sel, res_busy;
  xbar_res_ctrl #(.R(R)) dut (.*);

  int checks = 0, failures = 0;
  bit take = 0;
  assign y_ret = take ? 1'b0 : y_avl;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  // one clock in the given mode; y_ret models the bottom of the column
  task automatic cyc(mode_e m, bit taken, beat_t b = '0);
    @(negedge clk);
    mode = m; bus_do = b; take = taken;
    #1;
  endtask

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    mode = MODE_REQ; bus_do = '0; svc_done = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cyc(MODE_RST, 0);
    chk(!y_avl, "no offer in a reset cycle");
    cyc(MODE_REQ, 0);
    chk(y_avl && !alloc, "offer in a request cycle, not taken");
    cyc(MODE_RST, 0);
    cyc(MODE_REQ, 1);
    chk(y_avl && alloc, "offer taken");
    @(posedge clk); #1;
    chk(bus_busy && res_sel == 2'b01 && res_busy == 2'b01, "bus busy, resource 0 chosen");
    cyc(MODE_RST, 0, '{valid: 1'b1, last: 1'b0, tag: 8'h5});
    #1 chk(res_beat.valid && res_beat.tag == 8'h5, "beat to resource");
    cyc(MODE_REQ, 0, '{valid: 1'b1, last: 1'b1, tag: 8'h5});
    chk(!y_avl, "no offer while the bus is busy");
    cyc(MODE_RST, 0);
    @(posedge clk); #1;
    chk(!bus_busy, "bus free after the reset cycle that follows the last beat");
    cyc(MODE_REQ, 1);
    chk(alloc, "second allocation");
    @(posedge clk); #1;
    chk(res_sel == 2'b10 && res_busy == 2'b11, "resource 1 chosen");
    cyc(MODE_RST, 0, '{valid: 1'b1, last: 1'b1, tag: 8'h6});
    cyc(MODE_REQ, 0);
    cyc(MODE_RST, 0);
    cyc(MODE_REQ, 0);
    chk(!bus_busy && !y_avl, "no offer with both resources busy");
    @(negedge clk);
    svc_done = 2'b01;
    @(negedge clk);
    svc_done = '0;
    cyc(MODE_RST, 0);
    cyc(MODE_REQ, 0);
    chk(y_avl, "offer again once a resource finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
