// rsin_top: the three resource sharing interconnection networks (RSINs) side by side,
// each with its own processors' task inputs and resources' outputs.
//   sbus_*  : single shared bus,       16/1 x 1 x 1 SBUS/32  (one bus, 32 resources)
//   xbar_*  : crossbar (multiple buses),16/1 x 16 x 32 XBAR/1 (32 buses, 1 resource each)
//   omega_* : Omega / cube network,     16/1 x 16 x 16 CUBE/2 (16 links, 2 resources each)
// All three let a processor ask for "any free resource" instead of a particular one,
// and find it with distributed logic in the network rather than a central scheduler.
// They share the task and beat formats of rsin_pkg and one clock and reset, and are
// otherwise independent. The sizes are the paper's 16-processor, 32-resource
// examples; every parameter can be overridden.
module rsin_top
  import rsin_pkg::*;
#(
  parameter int unsigned P      = 16,  // processors in every network
  parameter int unsigned S_R    = 32,  // shared bus: resources on the bus
  parameter int unsigned X_M    = 32,  // crossbar: buses
  parameter int unsigned X_R    = 1,   // crossbar: resources per bus
  parameter int unsigned O_R    = 2,   // Omega: resources per output link (N = P)
  parameter int unsigned QDEPTH = 8,
  localparam int unsigned S_NW  = $clog2(S_R+1),
  localparam int unsigned O_CW  = $clog2(P*O_R+1),
  localparam int unsigned O_EW  = $clog2(P*$clog2(P)/2+1)
) (
  input  logic clk,
  input  logic rst_n,
  // single shared bus
  input  logic [P-1:0]    sbus_task_push,
  input  task_t           sbus_task_in   [P],
  input  logic [S_NW-1:0] sbus_task_need [P],
  output logic [P-1:0]    sbus_task_full,
  input  logic [S_R-1:0]  sbus_svc_done,
  output beat_t           sbus_beat,
  output logic [S_R-1:0]  sbus_sel,
  output logic [S_R-1:0]  sbus_res_busy,
  output logic [S_NW-1:0] sbus_free_cnt,
  output logic            sbus_grant,
  output logic            sbus_conflict,
  output logic [P-1:0]    sbus_proc_blocked,
  output logic [P-1:0]    sbus_proc_done,
  // crossbar
  input  logic [P-1:0]    xbar_task_push,
  input  task_t           xbar_task_in   [P],
  output logic [P-1:0]    xbar_task_full,
  input  logic [X_R-1:0]  xbar_svc_done  [X_M],
  output beat_t           xbar_res_beat  [X_M],
  output logic [X_R-1:0]  xbar_res_sel   [X_M],
  output logic [X_R-1:0]  xbar_res_busy  [X_M],
  output mode_e           xbar_mode,
  output logic [P-1:0]    xbar_proc_blocked,
  output logic [P-1:0]    xbar_proc_granted,
  output logic [P-1:0]    xbar_proc_done,
  // Omega network
  input  logic [P-1:0]    omega_task_push,
  input  task_t           omega_task_in   [P],
  input  logic [O_CW-1:0] omega_task_need [P],
  output logic [P-1:0]    omega_task_full,
  input  logic [O_R-1:0]  omega_svc_done  [P],
  output beat_t           omega_res_beat  [P],
  output logic [O_R-1:0]  omega_res_sel   [P],
  output logic [O_R-1:0]  omega_res_busy  [P],
  output logic [O_CW-1:0] omega_status    [P],
  output logic [P-1:0]    omega_proc_rejected,
  output logic [P-1:0]    omega_proc_done,
  output logic [O_EW-1:0] omega_n_reroute,
  output logic [O_EW-1:0] omega_n_backtrack,
  output logic [O_EW-1:0] omega_n_split,
  // all networks
  output logic            any_overflow
);
  logic [P-1:0] s_ovf, x_ovf, o_ovf;
  assign any_overflow = |{s_ovf, x_ovf, o_ovf};

  sbus_rsin #(.P(P), .R(S_R), .QDEPTH(QDEPTH)) u_sbus (
    .clk, .rst_n,
    .task_push(sbus_task_push), .task_in(sbus_task_in), .task_need(sbus_task_need),
    .task_full(sbus_task_full), .svc_done(sbus_svc_done),
    .bus_beat(sbus_beat), .bus_sel(sbus_sel), .res_busy(sbus_res_busy),
    .free_cnt(sbus_free_cnt), .bus_active(), .grant(sbus_grant), .grant_proc(),
    .conflict(sbus_conflict), .proc_blocked(sbus_proc_blocked),
    .proc_done(sbus_proc_done), .proc_overflow(s_ovf)
  );

  xbar_rsin #(.P(P), .M(X_M), .R(X_R), .QDEPTH(QDEPTH)) u_xbar (
    .clk, .rst_n,
    .task_push(xbar_task_push), .task_in(xbar_task_in), .task_full(xbar_task_full),
    .svc_done(xbar_svc_done), .res_beat(xbar_res_beat), .res_sel(xbar_res_sel),
    .res_busy(xbar_res_busy), .mode(xbar_mode), .proc_connected(),
    .proc_blocked(xbar_proc_blocked), .proc_granted(xbar_proc_granted),
    .proc_done(xbar_proc_done), .proc_overflow(x_ovf), .bus_busy()
  );

  omega_rsin #(.N(P), .R(O_R), .QDEPTH(QDEPTH)) u_omega (
    .clk, .rst_n,
    .task_push(omega_task_push), .task_in(omega_task_in), .task_need(omega_task_need),
    .task_full(omega_task_full), .svc_done(omega_svc_done),
    .res_beat(omega_res_beat), .res_sel(omega_res_sel), .res_busy(omega_res_busy),
    .proc_status(omega_status), .proc_connected(), .proc_rejected(omega_proc_rejected),
    .proc_done(omega_proc_done), .proc_overflow(o_ovf),
    .n_reroute(omega_n_reroute), .n_backtrack(omega_n_backtrack), .n_split(omega_n_split)
  );
endmodule
