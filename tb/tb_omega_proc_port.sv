// tb_omega_proc_port: processor end of an Omega link against a scripted network.
// Checks that no query is sent while the status is too low, that a query for the
// head task is sent once the status suffices (within the random delay bound), that a
// full completion leads to the task's beats and then a release, that a partial
// reject makes the port release what it got and wait for a status change before
// retrying, and that tasks leave in FIFO order.
module tb_omega_proc_port;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  localparam int CW = 4, BW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic task_push, task_full, q_v, l, j_v, c_v, connected, rejected, done, overflow;
  task_t task_in;
  logic [CW-1:0] task_need, q_n, s, j_n, c_n;
  beat_t d_out;
  omega_proc_port #(.CW(CW), .BACKOFF_W(BW)) dut (.*);

  int checks = 0, failures = 0, nbeats = 0, nl = 0, nq = 0, lastq = 0;
  logic [7:0] tags [$];
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always_ff @(posedge clk) if (rst_n) begin
    if (d_out.valid) begin nbeats++; if (d_out.last) tags.push_back(d_out.tag); end
    if (l) nl++;
    if (q_v) begin nq++; lastq = int'(q_n); end
  end
  task automatic wait_q(int maxc, output int c);
    c = 0;
    while (!q_v && c < maxc) begin @(posedge clk); #1; c++; end
  endtask

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int c;
    task_push = 0; task_in = '0; task_need = 0; s = 0; j_v = 0; c_v = 0; j_n = 0; c_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    task_push = 1; task_in = '{tag: 8'hA1, len: 8'd3}; task_need = 2;
    @(negedge clk);
    task_in = '{tag: 8'hA2, len: 8'd1}; task_need = 1;
    @(negedge clk);
    task_push = 0;
    s = 1;                       // too few for the head task
    wait_q(10, c);
    chk(!q_v, "no query while status is below the need");
    s = 3;
    wait_q(2**BW + 3, c);
    chk(q_v && q_n == 2, $sformatf("query for 2 sent %0d clocks after status rose", c));
    @(negedge clk);
    c_v = 1; c_n = 2;
    @(negedge clk);
    c_v = 0;
    repeat (6) @(negedge clk);
    chk(nbeats == 3 && nl == 1, $sformatf("3 beats then a release (%0d, %0d)", nbeats, nl));
    // second task: rejected, retry only after the status changes
    repeat (2**BW + 3) @(negedge clk);
    chk(nq == 2 && lastq == 1, "query for the second task");
    @(negedge clk);
    j_v = 1; j_n = 1;
    @(negedge clk);
    j_v = 0;
    repeat (2) @(negedge clk);
    chk(nl == 1, "fully rejected query: nothing to release");
    wait_q(8, c);
    chk(!q_v, "no retry without a status change");
    s = 2;
    wait_q(2**BW + 3, c);
    chk(q_v && q_n == 1, "retry after status change");
    @(negedge clk);
    c_v = 1; c_n = 1;
    @(negedge clk);
    c_v = 0;
    repeat (5) @(negedge clk);
    chk(tags.size() == 2 && tags[0] == 8'hA1 && tags[1] == 8'hA2, "tasks left in order");
    chk(nl == 2 && nbeats == 4, "second task sent and released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
