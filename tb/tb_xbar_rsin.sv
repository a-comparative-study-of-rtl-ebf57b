// tb_xbar_rsin: end-to-end test of the crossbar RSIN with more processors than
// buses. Processors receive random tasks; a behavioural resource model serves each
// task it receives for a random time, then pulses svc_done. Checked: every task
// reaches exactly one resource, beats arrive in order and complete, no resource
// receives a task while serving one, a bus never carries two processors, all tasks
// finish, and both blocked and granted requests occur. A first phase measures the
// latency from a task entering an idle network to its first beat at a resource.
module tb_xbar_rsin;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  localparam int P = 6, M = 3, R = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [P-1:0] task_push, task_full, proc_connected, proc_blocked, proc_granted, proc_done, proc_overflow;
  task_t        task_in [P];
  logic [R-1:0] svc_done [M], res_sel [M], res_busy [M];
  beat_t        res_beat [M];
  mode_e        mode;
  logic [M-1:0] bus_busy;
  xbar_rsin #(.P(P), .M(M), .R(R), .QDEPTH(4)) dut (.*);

  int checks = 0, failures = 0, ndone = 0, nblk = 0, ngnt = 0, issued = 0;
  int delivered [256], beats [256], wantlen [256];
  int serving [M][R];
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_ff @(posedge clk) if (rst_n) begin
    for (int j = 0; j < M; j++)
      for (int r = 0; r < R; r++) begin
        svc_done[j][r] <= 1'b0;
        if (serving[j][r] > 1) serving[j][r] <= serving[j][r] - 1;
        else if (serving[j][r] == 1) begin serving[j][r] <= 0; svc_done[j][r] <= 1'b1; end
        if (res_sel[j][r] && res_beat[j].valid) begin
          chk(serving[j][r] == 0, "resource receives while serving");
          beats[res_beat[j].tag]++;
          if (res_beat[j].last) begin
            delivered[res_beat[j].tag]++;
            chk(beats[res_beat[j].tag] == wantlen[res_beat[j].tag], "beat count of a task");
            serving[j][r] <= 1 + int'($urandom_range(0, 20));
          end
        end
      end
    for (int i = 0; i < P; i++) begin
      if (proc_done[i])    ndone++;
      if (proc_blocked[i]) nblk++;
      if (proc_granted[i]) ngnt++;
    end
  end

  // one processor per bus at most
  always @(negedge clk) if (rst_n)
    for (int j = 0; j < M; j++) begin
      int n;
      n = 0;
      for (int i = 0; i < P; i++) if (dut.latch[i][j]) n++;
      if (n > 1) begin failures++; $display("FAIL: bus %0d shared by %0d processors", j, n); end
    end

  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int tag, t0;
    task_push = '0;
    for (int i = 0; i < P; i++) task_in[i] = '0;
    for (int j = 0; j < M; j++) for (int r = 0; r < R; r++) begin serving[j][r] = 0; svc_done[j][r] = 1'b0; end
    for (int t = 0; t < 256; t++) begin delivered[t] = 0; beats[t] = 0; wantlen[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    // latency in an idle network: at most one reset cycle plus one request cycle
    @(negedge clk);
    task_push[2] = 1'b1; task_in[2] = '{tag: 8'd1, len: 8'd3}; wantlen[1] = 3; issued++;
    t0 = int'($time);
    @(negedge clk);
    task_push = '0;
    wait (res_beat[0].valid);
    chk((int'($time) - t0) / 10 <= 3, "first beat within 3 cycles of an idle request");
    chk(res_sel[0][0], "lowest bus and resource taken first");
    wait (ndone == 1);
    // random load
    tag = 2;
    @(negedge clk);
    for (int k = 0; k < 60; k++) begin
      for (int i = 0; i < P; i++)
        if ($urandom_range(0, 2) == 0 && !task_full[i] && tag < 250) begin
          task_push[i] = 1'b1;
          task_in[i]   = '{tag: 8'(tag), len: 8'($urandom_range(1, 5))};
          wantlen[tag] = int'(task_in[i].len);
          tag++; issued++;
        end
      @(negedge clk);
      task_push = '0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    wait (ndone == issued);
    repeat (40) @(posedge clk);
    for (int t = 1; t < tag; t++) chk(delivered[t] == 1, $sformatf("task %0d delivered once", t));
    chk(proc_overflow == '0, "no overflow");
    chk(nblk > 0, "some requests were blocked and resubmitted");
    chk(ngnt == issued, "one grant per task");
    for (int j = 0; j < M; j++) chk(!bus_busy[j] && res_busy[j] == '0, "all buses and resources free at the end");
    $display("tasks=%0d blocked=%0d", issued, nblk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
