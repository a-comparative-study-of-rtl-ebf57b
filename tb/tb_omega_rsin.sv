// tb_omega_rsin: self-checking test of the Omega-network RSIN.
// Each processor port receives a stream of random tasks (1..3 resources, 1..4 beats).
// A behavioural resource model serves each task it receives for a random time and
// then pulses svc_done. The scoreboard checks that every task is delivered to exactly
// as many distinct resources as it asked for, that a resource never receives a task
// while still serving another, that every task completes, and that rerouting,
// backtracking, split (broadcast) queries and processor-level rejects all occur.
// A first phase repeats the 8 x 8 example of four single-resource requests from
// processors 0, 3, 4, 5 to an idle network and checks that all four are served.
module tb_omega_rsin;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  localparam int N = 8, R = 2, CW = $clog2(N*R+1), NT = 40;
  localparam int EW = $clog2(N*$clog2(N)/2+1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]  task_push, task_full, proc_connected, proc_rejected, proc_done, proc_overflow;
  task_t         task_in [N];
  logic [CW-1:0] task_need [N], proc_status [N];
  logic [R-1:0]  svc_done [N], res_sel [N], res_busy [N];
  beat_t         res_beat [N];
  logic [EW-1:0] n_reroute, n_backtrack, n_split;

  omega_rsin #(.N(N), .R(R)) dut (.*);

  int checks = 0, failures = 0;
  int delivered [256];      // resources that got the last beat of tag
  int wanted    [256];
  int serving   [N][R];     // remaining service cycles, 0 = idle
  int got_first [N][R];
  int ndone = 0, nrer = 0, nbt = 0, nsp = 0, nrej = 0, issued = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // resource model
  always_ff @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++)
      for (int r = 0; r < R; r++) begin
        svc_done[o][r] <= 1'b0;
        if (serving[o][r] > 1) serving[o][r] <= serving[o][r] - 1;
        else if (serving[o][r] == 1) begin serving[o][r] <= 0; svc_done[o][r] <= 1'b1; end
        if (res_sel[o][r] && res_beat[o].valid) begin
          if (res_beat[o].last) begin
            chk(serving[o][r] == 0, $sformatf("resource %0d.%0d got a task while serving", o, r));
            delivered[res_beat[o].tag]++;
            serving[o][r] <= 1 + int'($urandom_range(0, 30));
          end
        end
      end
    for (int i = 0; i < N; i++) if (proc_done[i]) ndone++;
    for (int i = 0; i < N; i++) if (proc_rejected[i]) nrej++;
    nrer += int'(n_reroute); nbt += int'(n_backtrack); nsp += int'(n_split);
  end

  task automatic push(int p, int tag, int need, int len);
    @(negedge clk);
    task_push[p]   = 1'b1;
    task_in[p]     = '{tag: 8'(tag), len: 8'(len)};
    task_need[p]   = CW'(need);
    wanted[tag]    = need;
    issued++;
    @(negedge clk);
    task_push[p]   = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired ndone=%0d issued=%0d rer=%0d bt=%0d sp=%0d rej=%0d", ndone, issued, nrer, nbt, nsp, nrej);
    for (int i = 0; i < N; i++) $display("p%0d s=%0d conn=%0d busy=%b", i, proc_status[i], proc_connected[i], res_busy[i]);
    for (int t = 0; t < 256; t++) if (wanted[t] != delivered[t]) $display("tag %0d want %0d got %0d", t, wanted[t], delivered[t]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tag, t0;
    task_push = '0;
    for (int i = 0; i < N; i++) begin task_in[i] = '0; task_need[i] = '0; end
    for (int o = 0; o < N; o++) for (int r = 0; r < R; r++) begin serving[o][r] = 0; svc_done[o][r] = 1'b0; end
    for (int t = 0; t < 256; t++) begin delivered[t] = 0; wanted[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    chk(proc_status[0] == CW'(N*R), "status at processor 0 shows all resources free");
    // phase 1: four single-resource requests, as in the 8x8 example
    tag = 1;
    fork
      push(0, 1, 1, 2);
      push(3, 2, 1, 2);
      push(4, 3, 1, 2);
      push(5, 4, 1, 2);
    join
    t0 = $time;
    wait (ndone == 4);
    chk(($time - t0) / 10 < 40, "four requests served within 40 cycles");
    for (int t = 1; t <= 4; t++) chk(delivered[t] == 1, $sformatf("task %0d delivered once", t));
    // phase 2: random load
    tag = 10;
    @(negedge clk);
    for (int k = 0; k < NT; k++) begin
      for (int i = 0; i < N; i++) begin
        if ($urandom_range(0, 2) == 0 && !task_full[i] && tag < 250) begin
          task_push[i] = 1'b1;
          task_in[i]   = '{tag: 8'(tag), len: 8'($urandom_range(1, 4))};
          task_need[i] = CW'($urandom_range(1, 3));
          wanted[tag]  = int'(task_need[i]);
          tag++; issued++;
        end
      end
      @(negedge clk);
      task_push = '0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    wait (ndone == issued);
    repeat (50) @(posedge clk);
    for (int t = 1; t < tag; t++)
      if (wanted[t] != 0)
        chk(delivered[t] == wanted[t],
            $sformatf("task %0d delivered to %0d of %0d resources", t, delivered[t], wanted[t]));
    chk(ndone == issued, "every task completed");
    chk(proc_overflow == '0, "no queue overflow");
    chk(proc_status[0] == CW'(N*R), "all resources free again at the end");
    chk(nrer > 0, "a reject was rerouted");
    chk(nbt > 0, "a reject was backtracked");
    chk(nsp > 0, "a query was split over both ports");
    chk(nrej > 0, "a processor saw a rejected query");
    $display("tasks=%0d reroute=%0d backtrack=%0d split=%0d proc_rejects=%0d",
             issued, nrer, nbt, nsp, nrej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
