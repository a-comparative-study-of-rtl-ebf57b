// tb_omega_res_port: resource end of an Omega link with 3 resources. Checks the
// free-count status, a query fully accepted, a query partly rejected (C and J in the
// same cycle), data reaching only the taken resources, release freeing resources that
// never received data, and svc_done freeing a served resource.
module tb_omega_res_port;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  localparam int R = 3, CW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic q_v, l, j_v, c_v;
  logic [CW-1:0] q_n, s, j_n, c_n;
  beat_t d_in, res_beat;
  logic [R-1:0] svc_done, res_sel, res_busy;
  omega_res_port #(.R(R), .CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic step(); @(posedge clk); #1; q_v = 0; l = 0; svc_done = '0; d_in = '0; endtask

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    q_v = 0; l = 0; q_n = 0; svc_done = '0; d_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    step();
    chk(s == 3, "three free");
    q_v = 1; q_n = 2;
    step();
    chk(c_v && c_n == 2 && !j_v, "query for 2 completed");
    chk(res_busy == 3'b011 && res_sel == 3'b011 && s == 1, "two lowest resources taken");
    d_in = '{valid: 1'b1, last: 1'b1, tag: 8'h11};
    #1;
    chk(res_beat == d_in, "data to the taken resources");
    step();
    l = 1;
    step();
    chk(res_sel == '0 && res_busy == 3'b011, "release keeps served resources busy");
    svc_done = 3'b001;
    step();
    chk(res_busy == 3'b010 && s == 2, "service done frees resource 0");
    q_v = 1; q_n = 3;
    step();
    chk(c_v && c_n == 2 && j_v && j_n == 1, "query for 3 with 2 free: C(2) and J(1)");
    chk(res_busy == 3'b111 && s == 0, "all busy");
    l = 1;   // processor gives up the partial allocation without sending data
    step();
    chk(res_busy == 3'b010 && s == 2, "unfed resources freed at release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
