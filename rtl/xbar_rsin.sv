// xbar_rsin: crossbar resource sharing interconnection network, configuration
// P/1 x P x M XBAR/R: P processors, M buses, R resources on each bus.
// A single MODE line alternates request and reset cycles, one clock each. In a
// request cycle every waiting processor raises its row and every resource controller
// with an idle bus and a free resource raises its column; the xbar_switch cells pair
// them in one combinational wave with no central scheduler. Granted processors
// stream their task to the resource over the column; after the last beat they clear
// their crosspoint in the next reset cycle and the bus is offered again. Per-task
// handshake: push a task_t into a processor's queue; its beats come out on res_beat
// of the bus it was given, at the resource flagged in res_sel. Structure and cell
// behaviour follow the paper; the one-clock cycles and strict alternation of the
// two modes are this design's.
module xbar_rsin
  import rsin_pkg::*;
#(
  parameter int unsigned P      = 16,
  parameter int unsigned M      = 32,
  parameter int unsigned R      = 1,
  parameter int unsigned QDEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [P-1:0] task_push,
  input  task_t        task_in   [P],
  output logic [P-1:0] task_full,
  input  logic [R-1:0] svc_done  [M],
  output beat_t        res_beat  [M],
  output logic [R-1:0] res_sel   [M],
  output logic [R-1:0] res_busy  [M],
  output mode_e        mode,
  output logic [P-1:0] proc_connected,
  output logic [P-1:0] proc_blocked,
  output logic [P-1:0] proc_granted,
  output logic [P-1:0] proc_done,
  output logic [P-1:0] proc_overflow,
  output logic [M-1:0] bus_busy
);
  logic [P-1:0] x_req, x_ret;
  logic [M-1:0] y_avl, y_ret;
  beat_t        di     [P];
  beat_t        bus_do [M];
  logic [M-1:0] latch  [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode <= MODE_REQ;
    else        mode <= (mode == MODE_REQ) ? MODE_RST : MODE_REQ;
  end

  for (genvar i = 0; i < P; i++) begin : g_p
    xbar_proc_port #(.QDEPTH(QDEPTH)) u_pp (
      .clk, .rst_n, .mode,
      .task_push(task_push[i]), .task_in(task_in[i]), .task_full(task_full[i]),
      .x_req(x_req[i]), .x_ret(x_ret[i]), .di(di[i]),
      .connected(proc_connected[i]), .blocked(proc_blocked[i]),
      .granted(proc_granted[i]), .done(proc_done[i]), .overflow(proc_overflow[i])
    );
  end

  xbar_switch #(.P(P), .M(M)) u_sw (
    .clk, .rst_n, .mode, .x_req, .x_ret, .y_avl, .y_ret, .di, .bus_do, .latch
  );

  for (genvar j = 0; j < M; j++) begin : g_r
    xbar_res_ctrl #(.R(R)) u_rc (
      .clk, .rst_n, .mode,
      .y_avl(y_avl[j]), .y_ret(y_ret[j]), .bus_do(bus_do[j]),
      .svc_done(svc_done[j]), .res_beat(res_beat[j]), .res_sel(res_sel[j]),
      .res_busy(res_busy[j]), .bus_busy(bus_busy[j]), .alloc()
    );
  end
endmodule
