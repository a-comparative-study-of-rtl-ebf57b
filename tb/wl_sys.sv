// wl_sys: measurement harness (not a testbench of its own) that wraps one
// partitioned resource-sharing system, p/k x j x m N/r, for the queueing workloads.
// KIND selects the network: 0 = single shared bus, 1 = crossbar, 2 = Omega (cube).
// The 16 processors are split into K partitions of PP processors, each partition an
// instance of the network with its own resources: NR resources on the bus (KIND 0),
// NR buses of XR resources (KIND 1), or NR resources on each output (KIND 2).
// Every task asks for one resource.
// Tasks arrive on `arrive` (one pulse per task, with its length in beats on `alen`),
// wait in an unbounded software queue, and are fed to the processor's hardware queue
// whenever it has room. The waiting time of a task is counted from its arrival to its
// first beat on a bus or link; a task's sending processor is read from its tag. The
// behavioural resources serve each delivered task for a random time with mean
// svc_mean clocks (rounded exponential) and then pulse svc_done.
// Outputs are running totals (tasks arrived, delivered, summed waiting clocks, and
// protocol errors: a beat to a busy resource, an out-of-order task, a dropped task).
// The partitioned configurations and the single-resource tasks follow the paper's
// queueing study; the exponential rounding and the software queue are choices of
// this harness.
module wl_sys
  import rsin_pkg::*;
#(
  parameter int KIND = 0,
  parameter int K    = 1,
  parameter int PP   = 16,
  parameter int NR   = 32,
  parameter int XR   = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [K*PP-1:0]  arrive,
  input  logic [LEN_W-1:0] alen [K*PP],
  input  int               svc_mean,
  output int               n_arr,
  output int               n_done,
  output longint           sum_wait,
  output int               errors
);
  timeunit 1ns; timeprecision 1ps;
  localparam int P = K*PP;

  int     pa [K], pd [K], pe [K];
  longint pw [K];
  int     cyc;

  always @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  always_comb begin
    n_arr = 0; n_done = 0; sum_wait = 0; errors = 0;
    for (int k = 0; k < K; k++) begin
      n_arr += pa[k]; n_done += pd[k]; sum_wait += pw[k]; errors += pe[k];
    end
  end

  function automatic int draw_svc(int mean);
    real u;
    int  t;
    u = real'($urandom_range(1, 1000000)) / 1.0e6;
    t = int'(-real'(mean) * $ln(u));
    return (t < 1) ? 1 : t;
  endfunction

  for (genvar k = 0; k < K; k++) begin : g_part
    // sinks: the bus (KIND 0), each bus (KIND 1) or each output link (KIND 2)
    localparam int NS = (KIND == 0) ? 1 : (KIND == 1) ? NR : PP;
    localparam int RS = (KIND == 0) ? NR : (KIND == 1) ? XR : NR;   // resources per sink
    localparam int NW = (KIND == 0) ? $clog2(NR+1) : $clog2(PP*NR+1);

    logic [PP-1:0] task_push, task_full, proc_overflow;
    task_t         task_in  [PP];
    logic [NW-1:0] task_need [PP];
    beat_t         sbeat    [NS];
    logic [RS-1:0] ssel     [NS];
    logic [RS-1:0] sdone    [NS];

    int unsigned  inq  [PP][$];   // arrival clock of every task not yet started
    int unsigned  plen [PP][$];   // lengths of tasks not yet in the hardware queue
    int           svc  [NS][RS];
    bit           mid  [NS];      // a task is part-way through on this sink
    bit           pushed [PP];

    if (KIND == 0) begin : g_net
      logic [NR-1:0] done_v, sel_v;
      for (genvar r = 0; r < NR; r++) begin : g_r
        assign done_v[r] = sdone[0][r];
      end
      assign ssel[0] = sel_v;
      sbus_rsin #(.P(PP), .R(NR)) u_net (
        .clk, .rst_n, .task_push, .task_in, .task_need, .task_full,
        .svc_done(done_v), .bus_beat(sbeat[0]), .bus_sel(sel_v), .res_busy(),
        .free_cnt(), .bus_active(), .grant(), .grant_proc(), .conflict(),
        .proc_blocked(), .proc_done(), .proc_overflow);
    end else if (KIND == 1) begin : g_net
      xbar_rsin #(.P(PP), .M(NR), .R(XR)) u_net (
        .clk, .rst_n, .task_push, .task_in, .task_full,
        .svc_done(sdone), .res_beat(sbeat), .res_sel(ssel), .res_busy(),
        .mode(), .proc_connected(), .proc_blocked(), .proc_granted(), .proc_done(),
        .proc_overflow, .bus_busy());
    end else begin : g_net
      omega_rsin #(.N(PP), .R(NR)) u_net (
        .clk, .rst_n, .task_push, .task_in, .task_need, .task_full,
        .svc_done(sdone), .res_beat(sbeat), .res_sel(ssel), .res_busy(),
        .proc_status(), .proc_connected(), .proc_rejected(), .proc_done(),
        .proc_overflow, .n_reroute(), .n_backtrack(), .n_split());
    end

    initial begin
      pa[k] = 0; pd[k] = 0; pw[k] = 0; pe[k] = 0;
      for (int i = 0; i < PP; i++) begin
        task_push[i] = 1'b0; task_in[i] = '0; task_need[i] = NW'(1); pushed[i] = 1'b0;
      end
      for (int s = 0; s < NS; s++) begin
        sdone[s] = '0; mid[s] = 1'b0;
        for (int r = 0; r < RS; r++) svc[s][r] = 0;
      end
    end

    // counters use blocking updates: several sinks may finish in one clock
    always @(posedge clk) if (rst_n) begin
      // arrivals and feeding the hardware queues (at most every other clock, so a
      // push is always decided on a full flag that already reflects the last one)
      for (int i = 0; i < PP; i++) begin
        if (arrive[k*PP+i]) begin
          inq[i].push_back(cyc);
          plen[i].push_back(int'(alen[k*PP+i]));
          pa[k]++;
        end
        task_push[i] <= 1'b0;
        pushed[i]    <= 1'b0;
        if (plen[i].size() > 0 && !task_full[i] && !pushed[i]) begin
          task_push[i] <= 1'b1;
          task_in[i]   <= '{tag: TAG_W'(k*PP+i), len: LEN_W'(plen[i].pop_front())};
          pushed[i]    <= 1'b1;
        end
        if (proc_overflow[i]) pe[k]++;
      end
      // sinks: first beat ends the wait, last beat starts service
      for (int s = 0; s < NS; s++) begin
        if (sbeat[s].valid) begin
          if (!mid[s]) begin
            int p;
            p = int'(sbeat[s].tag) - k*PP;
            if (p < 0 || p >= PP || inq[p].size() == 0) pe[k]++;
            else pw[k] += longint'(cyc) - longint'(inq[p].pop_front());
          end
          mid[s] <= !sbeat[s].last;
          if (sbeat[s].last) pd[k]++;
        end
        for (int r = 0; r < RS; r++) begin
          sdone[s][r] <= 1'b0;
          if (svc[s][r] > 1) svc[s][r] <= svc[s][r] - 1;
          else if (svc[s][r] == 1) begin svc[s][r] <= 0; sdone[s][r] <= 1'b1; end
          if (ssel[s][r] && sbeat[s].valid && sbeat[s].last) begin
            if (svc[s][r] != 0) pe[k]++;
            svc[s][r] <= draw_svc(svc_mean);
          end
        end
      end
    end
  end
endmodule
