// tb_xbox: directed test of one exchange box. It walks through status summing,
// query routing to the port with more free resources, completion, data forwarding,
// release, a query split over both ports, a reject passed back with a reduced
// completion, a reject rerouted through the other port, and two simultaneous queries
// served larger first. Expected values are worked out by hand from the algorithm.
module tb_xbox;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  localparam int CW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0]    q_in_v, l_in, j_out_v, c_out_v, q_out_v, l_out, j_in_v, c_in_v;
  logic [CW-1:0] q_in_n [2], s_out [2], j_out_n [2], c_out_n [2];
  logic [CW-1:0] q_out_n [2], s_in [2], j_in_n [2], c_in_n [2];
  beat_t         d_in [2], d_out [2];
  logic          ev_reroute, ev_backtrack, ev_split;
  xbox #(.CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic idle();
    q_in_v = '0; l_in = '0; j_in_v = '0; c_in_v = '0;
    q_in_n = '{default: '0}; j_in_n = '{default: '0}; c_in_n = '{default: '0};
  endtask
  // apply the inputs set up by the caller for one clock, then look at the outputs
  task automatic step();
    @(posedge clk); #1;
    idle();
  endtask

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    idle(); s_in = '{default: '0}; d_in = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // status: 3 resources above, 1 below
    s_in = '{6'd3, 6'd1};
    step(); step();
    chk(s_out[0] == 4 && s_out[1] == 4, "S out = sum of both ports");
    // query for 1 on input 0 goes to the upper port (3 > 1)
    q_in_v[0] = 1; q_in_n[0] = 1;
    step();
    chk(q_out_v == 2'b01 && q_out_n[0] == 1, "query routed to port with most resources");
    chk(s_out[0] == 1, "port in use no longer counted");
    d_in[0] = '{valid: 1'b1, last: 1'b1, tag: 8'h3C};
    #1;
    chk(d_out[0] == d_in[0] && d_out[1] == '0, "data follow the connection");
    d_in[0] = '0;
    c_in_v[0] = 1; c_in_n[0] = 1;
    step();
    chk(c_out_v == 2'b01 && c_out_n[0] == 1, "completion passed back");
    l_in[0] = 1;
    step();
    chk(l_out == 2'b01, "release passed to the port in use");
    // new status on the upper port: 2
    s_in[0] = 6'd2;
    step(); step();
    chk(s_out[1] == 3, "S out after release and status change");
    // query for 3 on input 1: 2 up, 1 down
    q_in_v[1] = 1; q_in_n[1] = 3;
    step();
    chk(q_out_v == 2'b11 && q_out_n[0] == 2 && q_out_n[1] == 1, "query split over both ports");
    chk(ev_split, "split event");
    // the lower port rejects its one: no other free port, pass it back
    j_in_v[1] = 1; j_in_n[1] = 1;
    step();
    chk(j_out_v == 2'b10 && j_out_n[1] == 1, "reject passed back");
    chk(ev_backtrack, "backtrack event");
    c_in_v[0] = 1; c_in_n[0] = 2;
    step();
    chk(c_out_v == 2'b10 && c_out_n[1] == 2, "completion for the reduced query");
    l_in[1] = 1;
    step();
    chk(l_out == 2'b01, "release of the remaining connection");
    // status 1 up, 2 down
    s_in = '{6'd1, 6'd2};
    step(); step();
    q_in_v[0] = 1; q_in_n[0] = 1;
    step();
    chk(q_out_v == 2'b10, "query to the lower port (2 > 1)");
    j_in_v[1] = 1; j_in_n[1] = 1;
    step();
    chk(q_out_v == 2'b01 && q_out_n[0] == 1 && j_out_v == 2'b00, "reject rerouted to the upper port");
    chk(ev_reroute, "reroute event");
    c_in_v[0] = 1; c_in_n[0] = 1;
    step();
    chk(c_out_v == 2'b01 && c_out_n[0] == 1, "completion after reroute");
    l_in[0] = 1;
    step();
    // status 4 up, 3 down; queries for 1 (input 0) and 3 (input 1) at once
    s_in = '{6'd4, 6'd3};
    step(); step();
    q_in_v = 2'b11; q_in_n = '{6'd1, 6'd3};
    step();
    chk(q_out_v == 2'b11 && q_out_n[0] == 3 && q_out_n[1] == 1,
        "larger query served first and takes the larger port");
    chk(dut.own_q[0] == 1'b1 && dut.own_q[1] == 1'b0, "port ownership");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
