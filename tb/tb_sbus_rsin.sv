// tb_sbus_rsin: end-to-end test of the single shared bus RSIN.
// Processors receive random tasks asking for 1..4 resources; a behavioural resource
// model serves each task for a random time. Checked: the broadcast free count always
// equals the number of idle resources, a task goes only to a processor whose request
// fits, every task reaches exactly as many resources as it asked for, no resource is
// given a second task while busy, the bus carries one task at a time and is released
// the cycle after the last beat, and contention (random arbitration) and blocking on
// too few free resources both occur.
module tb_sbus_rsin;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  localparam int P = 4, R = 6, NW = $clog2(R+1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [P-1:0]  task_push, task_full, proc_blocked, proc_done, proc_overflow;
  task_t         task_in [P];
  logic [NW-1:0] task_need [P], free_cnt;
  logic [R-1:0]  svc_done, bus_sel, res_busy;
  beat_t         bus_beat;
  logic          bus_active, grant, conflict;
  logic [1:0]    grant_proc;
  sbus_rsin #(.P(P), .R(R), .QDEPTH(4)) dut (.*);

  int checks = 0, failures = 0, ndone = 0, nconf = 0, nblk = 0, issued = 0;
  int delivered [256], wanted [256];
  int serving [R];
  int last_len;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_ff @(posedge clk) if (rst_n) begin
    int idle;
    idle = 0;
    for (int r = 0; r < R; r++) if (!res_busy[r]) idle++;
    chk(int'(free_cnt) == idle, "free count broadcast");
    if (grant) chk(int'(dut.head[grant_proc].need) <= idle, "granted request fits");
    if (conflict) nconf++;
    if (proc_blocked != '0) nblk++;
    for (int r = 0; r < R; r++) begin
      svc_done[r] <= 1'b0;
      if (serving[r] > 1) serving[r] <= serving[r] - 1;
      else if (serving[r] == 1) begin serving[r] <= 0; svc_done[r] <= 1'b1; end
      if (bus_sel[r] && bus_beat.valid && bus_beat.last) begin
        chk(serving[r] == 0, "resource given a task while serving");
        delivered[bus_beat.tag]++;
        serving[r] <= 1 + int'($urandom_range(0, 40));
      end
    end
    if (bus_beat.valid && bus_beat.last) chk($countones(bus_sel) == wanted[bus_beat.tag], "resources per task");
    for (int i = 0; i < P; i++) if (proc_done[i]) ndone++;
  end

  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int tag;
    task_push = '0; svc_done = '0;
    for (int i = 0; i < P; i++) begin task_in[i] = '0; task_need[i] = '0; end
    for (int r = 0; r < R; r++) serving[r] = 0;
    for (int t = 0; t < 256; t++) begin delivered[t] = 0; wanted[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // bus hold time: a 4-beat task keeps the bus exactly 4 cycles
    @(negedge clk);
    task_push[1] = 1'b1; task_in[1] = '{tag: 8'd1, len: 8'd4}; task_need[1] = NW'(2);
    wanted[1] = 2; issued++;
    @(negedge clk);
    task_push = '0;
    wait (bus_active);
    @(negedge clk);
    last_len = 0;
    while (bus_active) begin @(negedge clk); last_len++; end
    chk(last_len == 4, $sformatf("bus held %0d cycles for a 4-beat task", last_len));
    wait (ndone == 1);
    tag = 2;
    @(negedge clk);
    for (int k = 0; k < 80; k++) begin
      for (int i = 0; i < P; i++)
        if ($urandom_range(0, 1) == 0 && !task_full[i] && tag < 250) begin
          task_push[i] = 1'b1;
          task_in[i]   = '{tag: 8'(tag), len: 8'($urandom_range(1, 3))};
          task_need[i] = NW'($urandom_range(1, 4));
          wanted[tag]  = int'(task_need[i]);
          tag++; issued++;
        end
      @(negedge clk);
      task_push = '0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    wait (ndone == issued);
    repeat (60) @(posedge clk);
    for (int t = 1; t < tag; t++)
      chk(delivered[t] == wanted[t], $sformatf("task %0d reached %0d of %0d", t, delivered[t], wanted[t]));
    chk(proc_overflow == '0, "no overflow");
    chk(nconf > 0, "several processors contended for the bus");
    chk(nblk > 0, "a request waited for free resources");
    chk(res_busy == '0, "all resources free at the end");
    $display("tasks=%0d conflicts=%0d blocked_cycles=%0d", issued, nconf, nblk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
