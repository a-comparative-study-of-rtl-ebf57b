// omega_rsin: Omega-network resource sharing interconnection network, configuration
// N/1 x N x N CUBE/R (the cube network is the same network with inputs and outputs
// renamed): N processor ports, an N x N omega_net, and N resource ports with R
// resources each.
// A processor pushes a task (tag, length, number of resources wanted) into its port.
// The port waits until the status from the network shows enough free resources,
// sends a query, and the exchange boxes route it towards free resources, rerouting or
// backtracking on conflicts, with no central scheduler. On completion the task's
// beats reach every resource allocated to it (res_beat/res_sel of that port); the
// processor then releases the path. Each resource pulses svc_done when it has served
// its task. Control latency is one clock per stage in each direction plus one clock
// in each port. The composition is the paper's; sizes default to its
// 16/1x16x16 CUBE/2 example.
module omega_rsin
  import rsin_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter int unsigned R         = 2,
  parameter int unsigned QDEPTH    = 8,
  parameter int unsigned BACKOFF_W = 2,
  localparam int unsigned CW       = $clog2(N*R+1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  task_push,
  input  task_t         task_in   [N],
  input  logic [CW-1:0] task_need [N],
  output logic [N-1:0]  task_full,
  input  logic [R-1:0]  svc_done  [N],
  output beat_t         res_beat  [N],
  output logic [R-1:0]  res_sel   [N],
  output logic [R-1:0]  res_busy  [N],
  output logic [CW-1:0] proc_status [N],  // free resources reachable, seen by each processor
  output logic [N-1:0]  proc_connected,
  output logic [N-1:0]  proc_rejected,
  output logic [N-1:0]  proc_done,
  output logic [N-1:0]  proc_overflow,
  output logic [$clog2(N*$clog2(N)/2+1)-1:0] n_reroute,
  output logic [$clog2(N*$clog2(N)/2+1)-1:0] n_backtrack,
  output logic [$clog2(N*$clog2(N)/2+1)-1:0] n_split
);
  logic [N-1:0]  p_q_v, p_l, p_j_v, p_c_v, r_q_v, r_l, r_j_v, r_c_v;
  logic [CW-1:0] p_q_n [N], p_s [N], p_j_n [N], p_c_n [N];
  logic [CW-1:0] r_q_n [N], r_s [N], r_j_n [N], r_c_n [N];
  beat_t         p_d [N], r_d [N];

  assign proc_status = p_s;

  for (genvar i = 0; i < N; i++) begin : g_p
    omega_proc_port #(.CW(CW), .QDEPTH(QDEPTH), .BACKOFF_W(BACKOFF_W),
                      .SEED(8'(8'hB7 + 8'(i*13)))) u_pp (
      .clk, .rst_n,
      .task_push(task_push[i]), .task_in(task_in[i]), .task_need(task_need[i]),
      .task_full(task_full[i]),
      .q_v(p_q_v[i]), .q_n(p_q_n[i]), .l(p_l[i]), .s(p_s[i]),
      .j_v(p_j_v[i]), .j_n(p_j_n[i]), .c_v(p_c_v[i]), .c_n(p_c_n[i]),
      .d_out(p_d[i]), .connected(proc_connected[i]), .rejected(proc_rejected[i]),
      .done(proc_done[i]), .overflow(proc_overflow[i])
    );
  end

  omega_net #(.N(N), .CW(CW)) u_net (
    .clk, .rst_n,
    .p_q_v, .p_q_n, .p_l, .p_s, .p_j_v, .p_j_n, .p_c_v, .p_c_n, .p_d,
    .r_q_v, .r_q_n, .r_l, .r_s, .r_j_v, .r_j_n, .r_c_v, .r_c_n, .r_d,
    .n_reroute, .n_backtrack, .n_split
  );

  for (genvar o = 0; o < N; o++) begin : g_r
    omega_res_port #(.R(R), .CW(CW)) u_rp (
      .clk, .rst_n,
      .q_v(r_q_v[o]), .q_n(r_q_n[o]), .l(r_l[o]), .s(r_s[o]),
      .j_v(r_j_v[o]), .j_n(r_j_n[o]), .c_v(r_c_v[o]), .c_n(r_c_n[o]),
      .d_in(r_d[o]), .svc_done(svc_done[o]),
      .res_beat(res_beat[o]), .res_sel(res_sel[o]), .res_busy(res_busy[o])
    );
  end
endmodule
