// tb_workload: the queueing workloads of the paper's comparison, run on the RTL.
// Twelve systems of 16 processors receive the same random task stream side by side:
// single shared bus 16/1x1x1 SBUS/32, 16/2x1x1 SBUS/16, 16/8x1x1 SBUS/4 and
// 16/16x1x1 SBUS/2; crossbar 16/1x16x32 XBAR/1, 16/4x4x8 XBAR/1 and 16/8x2x4 XBAR/1;
// Omega (cube) 16/1x16x16 CUBE/2, 16/2x8x8 CUBE/2 and 16/4x4x4 CUBE/2; and, for the
// paper's cost comparison, 16/16x1x1 SBUS/3 and 16/4x4x4 XBAR/2.
// Arrivals at each processor are Bernoulli per clock, which approximates Poisson.
// Task lengths and service times are rounded exponentials. Two ratios of service
// rate to transmission rate are run, mu_s/mu_n = 0.1 (mean length 2 beats, mean
// service 20 clocks) and 1.0 (4 beats, 4 clocks). Each ratio runs at a light and a
// heavy traffic intensity rho = 16*lambda*(1/(16*mu_n) + 1/(32*mu_s)), the paper's
// normalisation, with lambda the arrival rate per processor.
// The loads are chosen so that every system, the unpartitioned single bus included,
// stays below saturation. After each load point the arrivals stop and the systems
// drain. The testbench prints the mean wait (arrival to first beat) of each system,
// normalised to the mean service time, as the paper plots it.
// It checks: every task is delivered in order with no protocol error, and the single
// bus waits longer at heavy load than at light load, and that with 1, 2 and 8 bus
// partitions the wait shrinks as partitions are added. For the transmission-bound ratio
// 1.0 at heavy load, it also checks that partitioning the bus into private buses
// shortens the wait and that the crossbar waits less than the single bus. At every
// point, 16/16x1x1 SBUS/3 must wait less than 16/4x4x4 CUBE/2 and XBAR/2.
// The configurations, the rate ratios and the normalisation follow the paper. The
// clock-level rates, the load points and the run lengths are this testbench's.
module tb_workload;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  localparam int P = 16, NSYS = 12, NCYC = 12000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [P-1:0]     arrive;
  logic [LEN_W-1:0] alen [P];
  int               svc_mean;
  int               n_arr [NSYS], n_done [NSYS], errs [NSYS];
  longint           sum_w [NSYS];
  string            name [NSYS] = '{"16/1x1x1 SBUS/32", "16/2x1x1 SBUS/16", "16/8x1x1 SBUS/4",
                                    "16/16x1x1 SBUS/2", "16/1x16x32 XBAR/1", "16/4x4x8 XBAR/1",
                                    "16/8x2x4 XBAR/1", "16/1x16x16 CUBE/2", "16/2x8x8 CUBE/2",
                                    "16/4x4x4 CUBE/2", "16/16x1x1 SBUS/3", "16/4x4x4 XBAR/2"};

  wl_sys #(.KIND(0), .K(1),  .PP(16), .NR(32)) s0 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[0]), .n_done(n_done[0]), .sum_wait(sum_w[0]), .errors(errs[0]));
  wl_sys #(.KIND(0), .K(2),  .PP(8),  .NR(16)) s1 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[1]), .n_done(n_done[1]), .sum_wait(sum_w[1]), .errors(errs[1]));
  wl_sys #(.KIND(0), .K(8),  .PP(2),  .NR(4))  s2 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[2]), .n_done(n_done[2]), .sum_wait(sum_w[2]), .errors(errs[2]));
  wl_sys #(.KIND(0), .K(16), .PP(1),  .NR(2))  s3 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[3]), .n_done(n_done[3]), .sum_wait(sum_w[3]), .errors(errs[3]));
  wl_sys #(.KIND(1), .K(1),  .PP(16), .NR(32)) s4 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[4]), .n_done(n_done[4]), .sum_wait(sum_w[4]), .errors(errs[4]));
  wl_sys #(.KIND(1), .K(4),  .PP(4),  .NR(8))  s5 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[5]), .n_done(n_done[5]), .sum_wait(sum_w[5]), .errors(errs[5]));
  wl_sys #(.KIND(1), .K(8),  .PP(2),  .NR(4))  s6 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[6]), .n_done(n_done[6]), .sum_wait(sum_w[6]), .errors(errs[6]));
  wl_sys #(.KIND(2), .K(1),  .PP(16), .NR(2))  s7 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[7]), .n_done(n_done[7]), .sum_wait(sum_w[7]), .errors(errs[7]));
  wl_sys #(.KIND(2), .K(2),  .PP(8),  .NR(2))  s8 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[8]), .n_done(n_done[8]), .sum_wait(sum_w[8]), .errors(errs[8]));
  wl_sys #(.KIND(2), .K(4),  .PP(4),  .NR(2))  s9 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[9]), .n_done(n_done[9]), .sum_wait(sum_w[9]), .errors(errs[9]));
  wl_sys #(.KIND(0), .K(16), .PP(1),  .NR(3))  s10 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[10]), .n_done(n_done[10]), .sum_wait(sum_w[10]), .errors(errs[10]));
  wl_sys #(.KIND(1), .K(4),  .PP(4),  .NR(4), .XR(2)) s11 (.clk, .rst_n, .arrive, .alen, .svc_mean,
    .n_arr(n_arr[11]), .n_done(n_done[11]), .sum_wait(sum_w[11]), .errors(errs[11]));

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // rounded exponential with the given mean, at least 1
  function automatic int draw_exp(real mean);
    real u;
    int  t;
    u = real'($urandom_range(1, 1000000)) / 1.0e6;
    t = int'(-mean * $ln(u) + 0.5);
    return (t < 1) ? 1 : (t > 255) ? 255 : t;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    for (int ri = 0; ri < 2; ri++)
      for (int li = 0; li < 2; li++)
        chk(wmean[ri][li][10] < wmean[ri][li][9] && wmean[ri][li][10] < wmean[ri][li][11],
            "16/16x1x1 SBUS/3 waits less than 16/4x4x4 CUBE/2 and XBAR/2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mean wait per system and point, in clocks: [ratio][load][system]
  real wmean [2][2][NSYS];

  initial begin
    automatic real tlen [2] = '{2.0, 4.0};
    automatic real tsvc [2] = '{20.0, 4.0};
    automatic real rho  [2][2] = '{'{0.08, 0.20}, '{0.02, 0.06}};
    int  a0 [NSYS];
    longint w0 [NSYS];
    arrive = '0; svc_mean = 20;
    for (int i = 0; i < P; i++) alen[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    for (int ri = 0; ri < 2; ri++) begin
      svc_mean = int'(tsvc[ri]);
      for (int li = 0; li < 2; li++) begin
        real lambda;
        int  thr;
        lambda = rho[ri][li] / (tlen[ri] + tsvc[ri] / 2.0);
        thr = int'(lambda * 1.0e6);
        for (int s = 0; s < NSYS; s++) begin a0[s] = n_arr[s]; w0[s] = sum_w[s]; end
        for (int c = 0; c < NCYC; c++) begin
          @(negedge clk);
          for (int i = 0; i < P; i++) begin
            arrive[i] = ($urandom_range(0, 999999) < thr);
            alen[i]   = LEN_W'(draw_exp(tlen[ri]));
          end
        end
        @(negedge clk);
        arrive = '0;
        for (int s = 0; s < NSYS; s++) begin
          automatic int guard = 0;
          while (n_done[s] != n_arr[s] && guard < 200000) begin @(posedge clk); guard++; end
          chk(n_done[s] == n_arr[s], $sformatf("%s delivered every task", name[s]));
        end
        repeat (300) @(posedge clk);
        $display("mu_s/mu_n=%0.1f rho=%0.3f:", tsvc[ri] == 4.0 ? 1.0 : 0.1, rho[ri][li]);
        for (int s = 0; s < NSYS; s++) begin
          int n;
          n = n_arr[s] - a0[s];
          wmean[ri][li][s] = (n > 0) ? real'(sum_w[s] - w0[s]) / real'(n) : 0.0;
          $display("  %-18s tasks=%5d  mean wait=%7.2f clocks  normalised=%6.3f",
                   name[s], n, wmean[ri][li][s], wmean[ri][li][s] / tsvc[ri]);
          chk(n > 0, $sformatf("%s received tasks", name[s]));
        end
      end
    end
    for (int s = 0; s < NSYS; s++) chk(errs[s] == 0, $sformatf("%s had no protocol error", name[s]));
    for (int ri = 0; ri < 2; ri++)
      chk(wmean[ri][1][0] > wmean[ri][0][0], "single bus waits longer at heavy load");
    chk(wmean[0][1][1] < wmean[0][1][0] && wmean[0][1][2] < wmean[0][1][1],
        "more bus partitions wait less at heavy load (mu_s/mu_n=0.1)");
    chk(wmean[1][1][3] < wmean[1][1][0], "private buses wait less than one shared bus (mu_s/mu_n=1)");
    chk(wmean[1][1][4] < wmean[1][1][0], "crossbar waits less than one shared bus (mu_s/mu_n=1)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
