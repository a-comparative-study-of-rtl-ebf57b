// tb_xbar_proc_port: processor side of one crossbar row against a scripted row.
// Checks that X(i,0) is raised only in request cycles while a task waits, that a 1
// returned on X(i,M) leads to a resubmission in the next request cycle, that a grant
// is followed by the task's beats (one per clock, last flagged) and by X(i,0) in the
// next reset cycle, and that two tasks leave in order.
module tb_xbar_proc_port;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mode_e mode;
  logic task_push, task_full, x_req, x_ret, connected, blocked, granted, done, overflow;
  task_t task_in;
  beat_t di;
  xbar_proc_port #(.QDEPTH(4)) dut (.*);

  int checks = 0, failures = 0, nbeats = 0, nreq = 0, nrst = 0, ndone = 0;
  logic [7:0] tags [$];
  bit free_row, blocked_seen = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always_comb x_ret = x_req && (mode == MODE_REQ) && !free_row;
  always_ff @(posedge clk) if (rst_n) begin
    if (di.valid) begin nbeats++; if (di.last) tags.push_back(di.tag); end
    if (x_req && mode == MODE_REQ) nreq++;
    if (x_req && mode == MODE_RST) nrst++;
    if (done) ndone++;
    if (blocked) blocked_seen <= 1'b1;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mode <= MODE_REQ; else mode <= (mode == MODE_REQ) ? MODE_RST : MODE_REQ;

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    task_push = 0; task_in = '0; free_row = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    chk(nreq == 0, "no request without a task");
    task_push = 1; task_in = '{tag: 8'h21, len: 8'd2};
    @(negedge clk);
    task_in = '{tag: 8'h22, len: 8'd3};
    @(negedge clk);
    task_push = 0;
    repeat (6) @(negedge clk);
    chk(nreq >= 3 && nbeats == 0 && blocked_seen, $sformatf("blocked request resubmitted every request cycle (%0d)", nreq));
    free_row = 1;
    repeat (20) @(negedge clk);
    chk(tags.size() == 2 && tags[0] == 8'h21 && tags[1] == 8'h22, "both tasks sent in order");
    chk(nbeats == 5, "2 + 3 beats");
    chk(nrst == 2 && ndone == 2, "each task relinquished in a reset cycle");
    chk(!connected, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
