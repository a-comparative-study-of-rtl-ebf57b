// omega_net: N x N Omega network of xbox exchange boxes used as a resource sharing
// network: log2(N) stages of N/2 boxes, each stage preceded by a perfect shuffle.
// Link l entering a stage is wired to box input position rotl(l) (rotate the log2(N)
// bit link number left by one), i.e. box b takes links rotr(2b) and rotr(2b+1); box
// b's outputs are links 2b and 2b+1 of the next stage, and after the last stage link
// l is resource port l. Queries, releases and data travel forward from the processor
// ports; status, rejects and completions travel backward over the same links. Each
// stage adds one clock to the control signals; data pass through combinationally
// along the connections set up. The topology and the signal set are the paper's;
// the box seeds are this design's.
module omega_net
  import rsin_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned CW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side (stage 0 inputs)
  input  logic [N-1:0]  p_q_v,
  input  logic [CW-1:0] p_q_n [N],
  input  logic [N-1:0]  p_l,
  output logic [CW-1:0] p_s   [N],
  output logic [N-1:0]  p_j_v,
  output logic [CW-1:0] p_j_n [N],
  output logic [N-1:0]  p_c_v,
  output logic [CW-1:0] p_c_n [N],
  input  beat_t         p_d   [N],
  // resource side (last stage outputs)
  output logic [N-1:0]  r_q_v,
  output logic [CW-1:0] r_q_n [N],
  output logic [N-1:0]  r_l,
  input  logic [CW-1:0] r_s   [N],
  input  logic [N-1:0]  r_j_v,
  input  logic [CW-1:0] r_j_n [N],
  input  logic [N-1:0]  r_c_v,
  input  logic [CW-1:0] r_c_n [N],
  output beat_t         r_d   [N],
  // events summed over all boxes
  output logic [$clog2(N*$clog2(N)/2+1)-1:0] n_reroute,
  output logic [$clog2(N*$clog2(N)/2+1)-1:0] n_backtrack,
  output logic [$clog2(N*$clog2(N)/2+1)-1:0] n_split
);
  localparam int unsigned NS = $clog2(N);
  localparam int unsigned EW = $clog2(N*NS/2+1);

  function automatic int rotr(int p);
    return (p >> 1) | ((p & 1) << (NS-1));
  endfunction

  logic [N/2-1:0] ev_rr [NS], ev_bt [NS], ev_sp [NS];

  // every stage's output links, declared in its own scope
  for (genvar st = 0; st < NS; st++) begin : g_st
    logic [N-1:0]  q_v, l;                      // forward, out of this stage
    logic [CW-1:0] q_n [N];
    logic [CW-1:0] s   [N], j_n [N], c_n [N];   // backward, out of this stage's inputs
    logic [N-1:0]  bj_v, bc_v;
    beat_t         d   [N];
    // inputs seen by this stage's output side (from stage st+1 or the resources)
    logic [CW-1:0] si [N], ji_n [N], ci_n [N];
    logic [N-1:0]  ji_v, ci_v;
    logic [N/2-1:0] rr, bt, sp;

    for (genvar b = 0; b < N/2; b++) begin : g_b
      localparam int I0 = rotr(2*b);
      localparam int I1 = rotr(2*b+1);
      logic [1:0]    qi_v, li;
      logic [CW-1:0] qi_n [2];
      beat_t         di [2];
      logic [CW-1:0] so [2], jo_n [2], co_n [2];
      logic [1:0]    jo_v, co_v;
      logic [CW-1:0] qo_n [2], sii [2], jii_n [2], cii_n [2];
      beat_t         dd [2];

      if (st == 0) begin : g_in0
        assign qi_v = {p_q_v[I1], p_q_v[I0]};
        assign qi_n = '{p_q_n[I0], p_q_n[I1]};
        assign li   = {p_l[I1], p_l[I0]};
        assign di   = '{p_d[I0], p_d[I1]};
      end else begin : g_inx
        assign qi_v = {g_st[st-1].q_v[I1], g_st[st-1].q_v[I0]};
        assign qi_n = '{g_st[st-1].q_n[I0], g_st[st-1].q_n[I1]};
        assign li   = {g_st[st-1].l[I1], g_st[st-1].l[I0]};
        assign di   = '{g_st[st-1].d[I0], g_st[st-1].d[I1]};
      end
      assign s[I0] = so[0];   assign s[I1] = so[1];
      assign j_n[I0] = jo_n[0]; assign j_n[I1] = jo_n[1];
      assign c_n[I0] = co_n[0]; assign c_n[I1] = co_n[1];
      assign bj_v[I0] = jo_v[0]; assign bj_v[I1] = jo_v[1];
      assign bc_v[I0] = co_v[0]; assign bc_v[I1] = co_v[1];
      assign q_n[2*b] = qo_n[0]; assign q_n[2*b+1] = qo_n[1];
      assign d[2*b] = dd[0];     assign d[2*b+1] = dd[1];
      assign sii   = '{si[2*b], si[2*b+1]};
      assign jii_n = '{ji_n[2*b], ji_n[2*b+1]};
      assign cii_n = '{ci_n[2*b], ci_n[2*b+1]};

      xbox #(.CW(CW), .SEED(8'(8'h5B + 8'(st*31 + b*7)))) u_box (
        .clk, .rst_n,
        .q_in_v(qi_v), .q_in_n(qi_n), .l_in(li), .s_out(so),
        .j_out_v(jo_v), .j_out_n(jo_n), .c_out_v(co_v), .c_out_n(co_n), .d_in(di),
        .q_out_v(q_v[2*b+1:2*b]), .q_out_n(qo_n), .l_out(l[2*b+1:2*b]),
        .s_in(sii), .j_in_v(ji_v[2*b+1:2*b]), .j_in_n(jii_n),
        .c_in_v(ci_v[2*b+1:2*b]), .c_in_n(cii_n), .d_out(dd),
        .ev_reroute(rr[b]), .ev_backtrack(bt[b]), .ev_split(sp[b])
      );
    end
    assign ev_rr[st] = rr; assign ev_bt[st] = bt; assign ev_sp[st] = sp;

    if (st == NS-1) begin : g_last
      assign si = r_s; assign ji_v = r_j_v; assign ji_n = r_j_n;
      assign ci_v = r_c_v; assign ci_n = r_c_n;
    end else begin : g_mid
      assign si = g_st[st+1].s; assign ji_v = g_st[st+1].bj_v; assign ji_n = g_st[st+1].j_n;
      assign ci_v = g_st[st+1].bc_v; assign ci_n = g_st[st+1].c_n;
    end
  end

  assign p_s   = g_st[0].s;
  assign p_j_v = g_st[0].bj_v;
  assign p_j_n = g_st[0].j_n;
  assign p_c_v = g_st[0].bc_v;
  assign p_c_n = g_st[0].c_n;
  assign r_q_v = g_st[NS-1].q_v;
  assign r_q_n = g_st[NS-1].q_n;
  assign r_l   = g_st[NS-1].l;
  assign r_d   = g_st[NS-1].d;

  always_comb begin
    n_reroute = '0; n_backtrack = '0; n_split = '0;
    for (int st = 0; st < NS; st++)
      for (int b = 0; b < N/2; b++) begin
        n_reroute   = n_reroute   + EW'(ev_rr[st][b]);
        n_backtrack = n_backtrack + EW'(ev_bt[st][b]);
        n_split     = n_split     + EW'(ev_sp[st][b]);
      end
  end
endmodule
