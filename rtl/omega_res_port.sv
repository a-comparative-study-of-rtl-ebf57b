// omega_res_port: the resource end of one output link of the Omega network, with R
// identical resources behind it.
// It reports the number of its free resources as the status S of the link. A query
// for n resources takes min(n, free) of them (the lowest-numbered free ones): those
// are answered with a completion C and the rest with a reject J, both one cycle later.
// The link then stays connected to the taken resources, which receive the data beats
// (res_sel), until a release L arrives. A taken resource is busy until it pulses
// svc_done; one that is released without having received any beat (a partly
// satisfied request that the processor gave up) is freed at once. Status, reject and
// completion signalling follow the paper; the lowest-first choice and the early
// freeing of unused resources are this design's.
// The counts are CW bits wide to match the network's links; since they never exceed
// R, their upper bits are constant zero here.
module omega_res_port
  import rsin_pkg::*;
#(
  parameter int unsigned R  = 2,
  parameter int unsigned CW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          q_v,
  input  logic [CW-1:0] q_n,
  input  logic          l,
  output logic [CW-1:0] s,
  output logic          j_v,
  output logic [CW-1:0] j_n,
  output logic          c_v,
  output logic [CW-1:0] c_n,
  input  beat_t         d_in,
  input  logic [R-1:0]  svc_done,
  output beat_t         res_beat,
  output logic [R-1:0]  res_sel,
  output logic [R-1:0]  res_busy
);
  logic [R-1:0]  conn, fed, take, busy_d;
  logic [CW-1:0] nfree, ntake;

  always_comb begin
    int unsigned left;
    take  = '0;
    ntake = '0;
    left  = q_v ? int'(q_n) : 0;
    for (int r = 0; r < R; r++)
      if (!res_busy[r] && left != 0) begin
        take[r] = 1'b1; left--; ntake = ntake + 1'b1;
      end
  end

  assign res_sel  = conn;
  assign res_beat = (conn != '0) ? d_in : '0;

  always_comb begin
    busy_d = (res_busy & ~svc_done) | take;
    if (l) busy_d = busy_d & ~(conn & ~fed);
    nfree = '0;
    for (int r = 0; r < R; r++) nfree = nfree + CW'(!busy_d[r]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_busy <= '0; conn <= '0; fed <= '0;
      s <= '0; j_v <= 1'b0; j_n <= '0; c_v <= 1'b0; c_n <= '0;
    end else begin
      res_busy <= busy_d;
      s        <= nfree;
      // a release and a new query may meet in one cycle: release first
      if (l || q_v)        begin conn <= take; fed <= '0; end
      else if (d_in.valid) fed <= fed | conn;
      c_v <= q_v && ntake != 0;
      c_n <= ntake;
      j_v <= q_v && q_n > ntake;
      j_n <= q_n - ntake;
    end
  end
endmodule
