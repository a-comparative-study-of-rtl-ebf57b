// tb_rsin_top: end-to-end run of all three networks at their default sizes (16
// processors, 32 resources each), under a random task load heavy enough that
// resources run out. Behavioural resources serve each delivered task for a random
// time. For every network the scoreboard checks that each task reaches exactly as
// many resources as it asked for, that no resource gets a task while serving, and
// that all tasks finish. It counts, and requires at least once: shared-bus
// contention and blocking, crossbar blocked requests, Omega rerouting, backtracking,
// split queries and processor-level rejects, and a full processor queue.
module tb_rsin_top;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  localparam int P = 16, S_R = 32, X_M = 32, X_R = 1, O_R = 2;
  localparam int S_NW = $clog2(S_R+1), O_CW = $clog2(P*O_R+1), O_EW = $clog2(P*$clog2(P)/2+1);
  localparam int NTASK = 150;   // tasks per network

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [P-1:0]    sbus_task_push, sbus_task_full, sbus_proc_blocked, sbus_proc_done;
  task_t           sbus_task_in [P];
  logic [S_NW-1:0] sbus_task_need [P], sbus_free_cnt;
  logic [S_R-1:0]  sbus_svc_done, sbus_sel, sbus_res_busy;
  beat_t           sbus_beat;
  logic            sbus_grant, sbus_conflict;
  logic [P-1:0]    xbar_task_push, xbar_task_full, xbar_proc_blocked, xbar_proc_granted, xbar_proc_done;
  task_t           xbar_task_in [P];
  logic [X_R-1:0]  xbar_svc_done [X_M], xbar_res_sel [X_M], xbar_res_busy [X_M];
  beat_t           xbar_res_beat [X_M];
  mode_e           xbar_mode;
  logic [P-1:0]    omega_task_push, omega_task_full, omega_proc_rejected, omega_proc_done;
  task_t           omega_task_in [P];
  logic [O_CW-1:0] omega_task_need [P], omega_status [P];
  logic [O_R-1:0]  omega_svc_done [P], omega_res_sel [P], omega_res_busy [P];
  beat_t           omega_res_beat [P];
  logic [O_EW-1:0] omega_n_reroute, omega_n_backtrack, omega_n_split;
  logic            any_overflow;

  rsin_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // scoreboards, one per network (0 sbus, 1 xbar, 2 omega)
  int want [3][256], got [3][256], issued [3], ndone [3];
  int ssv [S_R], xsv [X_M], osv [P][O_R];
  int n_sconf = 0, n_sblk = 0, n_xblk = 0, n_rr = 0, n_bt = 0, n_sp = 0, n_rej = 0, n_full = 0;

  function automatic int svc_time();
    return 20 + int'($urandom_range(0, 200));
  endfunction

  always_ff @(posedge clk) if (rst_n) begin
    // shared bus resources
    for (int r = 0; r < S_R; r++) begin
      sbus_svc_done[r] <= 1'b0;
      if (ssv[r] > 1) ssv[r] <= ssv[r] - 1;
      else if (ssv[r] == 1) begin ssv[r] <= 0; sbus_svc_done[r] <= 1'b1; end
      if (sbus_sel[r] && sbus_beat.valid && sbus_beat.last) begin
        chk(ssv[r] == 0, "sbus resource free when given a task");
        got[0][sbus_beat.tag]++;
        ssv[r] <= svc_time();
      end
    end
    // crossbar resources
    for (int j = 0; j < X_M; j++) begin
      xbar_svc_done[j] <= '0;
      if (xsv[j] > 1) xsv[j] <= xsv[j] - 1;
      else if (xsv[j] == 1) begin xsv[j] <= 0; xbar_svc_done[j] <= 1'b1; end
      if (xbar_res_sel[j][0] && xbar_res_beat[j].valid && xbar_res_beat[j].last) begin
        chk(xsv[j] == 0, "xbar resource free when given a task");
        got[1][xbar_res_beat[j].tag]++;
        xsv[j] <= svc_time();
      end
    end
    // Omega resources
    for (int o = 0; o < P; o++)
      for (int r = 0; r < O_R; r++) begin
        omega_svc_done[o][r] <= 1'b0;
        if (osv[o][r] > 1) osv[o][r] <= osv[o][r] - 1;
        else if (osv[o][r] == 1) begin osv[o][r] <= 0; omega_svc_done[o][r] <= 1'b1; end
        if (omega_res_sel[o][r] && omega_res_beat[o].valid && omega_res_beat[o].last) begin
          chk(osv[o][r] == 0, "omega resource free when given a task");
          got[2][omega_res_beat[o].tag]++;
          osv[o][r] <= svc_time();
        end
      end
    for (int i = 0; i < P; i++) begin
      if (sbus_proc_done[i])  ndone[0]++;
      if (xbar_proc_done[i])  ndone[1]++;
      if (omega_proc_done[i]) ndone[2]++;
      if (xbar_proc_blocked[i]) n_xblk++;
      if (omega_proc_rejected[i]) n_rej++;
    end
    if (sbus_conflict) n_sconf++;
    if (sbus_proc_blocked != '0) n_sblk++;
    if (sbus_task_full != '0 || xbar_task_full != '0 || omega_task_full != '0) n_full++;
    n_rr += int'(omega_n_reroute);
    n_bt += int'(omega_n_backtrack);
    n_sp += int'(omega_n_split);
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog: done %0d/%0d %0d/%0d %0d/%0d", ndone[0], issued[0], ndone[1], issued[1], ndone[2], issued[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tag [3];
    sbus_task_push = '0; xbar_task_push = '0; omega_task_push = '0;
    sbus_svc_done = '0;
    for (int i = 0; i < P; i++) begin
      sbus_task_in[i] = '0; sbus_task_need[i] = '0; xbar_task_in[i] = '0;
      omega_task_in[i] = '0; omega_task_need[i] = '0; omega_svc_done[i] = '0;
      for (int r = 0; r < O_R; r++) osv[i][r] = 0;
    end
    for (int r = 0; r < S_R; r++) ssv[r] = 0;
    for (int j = 0; j < X_M; j++) begin xsv[j] = 0; xbar_svc_done[j] = '0; end
    for (int n = 0; n < 3; n++) begin
      issued[n] = 0; ndone[n] = 0; tag[n] = 1;
      for (int t = 0; t < 256; t++) begin want[n][t] = 0; got[n][t] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    chk(sbus_free_cnt == S_NW'(S_R), "shared bus reports all resources free");
    chk(omega_status[0] == O_CW'(P*O_R), "Omega status reports all resources free");
    @(negedge clk);
    while (tag[0] <= NTASK || tag[1] <= NTASK || tag[2] <= NTASK) begin
      for (int i = 0; i < P; i++) begin
        if (tag[0] <= NTASK && !sbus_task_full[i] && $urandom_range(0, 3) == 0) begin
          sbus_task_push[i] = 1'b1;
          sbus_task_in[i]   = '{tag: 8'(tag[0]), len: 8'($urandom_range(1, 4))};
          sbus_task_need[i] = S_NW'($urandom_range(1, 4));
          want[0][tag[0]]   = int'(sbus_task_need[i]);
          tag[0]++; issued[0]++;
        end
        if (tag[1] <= NTASK && !xbar_task_full[i] && $urandom_range(0, 3) == 0) begin
          xbar_task_push[i] = 1'b1;
          xbar_task_in[i]   = '{tag: 8'(tag[1]), len: 8'($urandom_range(1, 4))};
          want[1][tag[1]]   = 1;
          tag[1]++; issued[1]++;
        end
        if (tag[2] <= NTASK && !omega_task_full[i] && $urandom_range(0, 3) == 0) begin
          omega_task_push[i] = 1'b1;
          omega_task_in[i]   = '{tag: 8'(tag[2]), len: 8'($urandom_range(1, 4))};
          omega_task_need[i] = O_CW'($urandom_range(1, 3));
          want[2][tag[2]]    = int'(omega_task_need[i]);
          tag[2]++; issued[2]++;
        end
      end
      @(negedge clk);
      sbus_task_push = '0; xbar_task_push = '0; omega_task_push = '0;
      @(negedge clk);
    end
    wait (ndone[0] == issued[0] && ndone[1] == issued[1] && ndone[2] == issued[2]);
    repeat (300) @(posedge clk);
    for (int n = 0; n < 3; n++)
      for (int t = 1; t <= NTASK; t++)
        chk(got[n][t] == want[n][t],
            $sformatf("network %0d task %0d reached %0d of %0d resources", n, t, got[n][t], want[n][t]));
    chk(!any_overflow, "no task dropped");
    chk(sbus_res_busy == '0 && sbus_free_cnt == S_NW'(S_R), "shared bus idle at the end");
    chk(omega_status[0] == O_CW'(P*O_R), "Omega network idle at the end");
    $display("sbus: contention=%0d blocked_cycles=%0d | xbar: blocked=%0d | omega: reroute=%0d backtrack=%0d split=%0d rejects=%0d | queue full cycles=%0d",
             n_sconf, n_sblk, n_xblk, n_rr, n_bt, n_sp, n_rej, n_full);
    chk(n_sconf > 0, "shared bus contention happened");
    chk(n_sblk > 0,  "shared bus blocking on free resources happened");
    chk(n_xblk > 0,  "crossbar blocked request happened");
    chk(n_rr > 0,    "Omega reroute happened");
    chk(n_bt > 0,    "Omega backtrack happened");
    chk(n_sp > 0,    "Omega split query happened");
    chk(n_rej > 0,   "Omega processor reject happened");
    chk(n_full > 0,  "a processor queue filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
