// tb_omega_net: the 8 x 8 Omega network example with four free resources (0, 1, 4, 5)
// and four processors (0, 3, 4, 5) each asking for one resource at the same time.
// The resource ends are modelled here: a port answers a query with a completion if
// its resource is free, else with a reject. Checked: the status seen by every
// processor (4), that all four requests complete and use exactly the four free
// resources (full allocation), the minimum control latency (one clock per stage each
// way), the example's average delay of 3.50 hops with one request turned back at
// stage 1 and rerouted, that the data of each processor reach its resource, and that a second round
// with more requests than free resources backtracks the losers to the processors.
module tb_omega_net;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  localparam int N = 8, CW = 4;
  localparam int EW = $clog2(N*$clog2(N)/2+1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0]  p_q_v, p_l, p_j_v, p_c_v, r_q_v, r_l, r_j_v, r_c_v;
  logic [CW-1:0] p_q_n [N], p_s [N], p_j_n [N], p_c_n [N];
  logic [CW-1:0] r_q_n [N], r_s [N], r_j_n [N], r_c_n [N];
  beat_t         p_d [N], r_d [N];
  logic [EW-1:0] n_reroute, n_backtrack, n_split;
  omega_net #(.N(N), .CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  logic [N-1:0] free, used;
  int got [N], rej [N], nbt = 0, nrr = 0, cyc = 0, tdone [N];
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // resource ends
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin r_j_v <= '0; r_c_v <= '0; used <= '0; end
    else for (int o = 0; o < N; o++) begin
      r_c_v[o] <= r_q_v[o] && free[o] && !used[o];
      r_j_v[o] <= r_q_v[o] && !(free[o] && !used[o]);
      r_c_n[o] <= 1; r_j_n[o] <= 1;
      if (r_q_v[o] && free[o]) used[o] <= 1'b1;
    end
  always_comb for (int o = 0; o < N; o++) r_s[o] = CW'(free[o] && !used[o]);

  always_ff @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (p_c_v[i]) begin got[i] += int'(p_c_n[i]); tdone[i] = cyc; end
      if (p_j_v[i]) rej[i] += int'(p_j_n[i]);
    end
    nbt += int'(n_backtrack);
    nrr += int'(n_reroute);
  end
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int t0, c0;
    p_q_v = '0; p_l = '0; p_q_n = '{default: '0}; p_d = '{default: '0};
    free = 8'b0011_0011;
    for (int i = 0; i < N; i++) begin got[i] = 0; rej[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (8) @(posedge clk);
    for (int i = 0; i < N; i++) chk(p_s[i] == 4, $sformatf("processor %0d sees 4 free resources", i));
    @(negedge clk);
    foreach (p_q_n[i]) p_q_n[i] = 1;
    p_q_v = 8'b0011_1001;
    t0 = int'($time);
    c0 = cyc;
    @(negedge clk);
    p_q_v = '0;
    wait (p_c_v != '0);
    chk((int'($time) - t0 + 5) / 10 == 7, $sformatf("first completion after %0d clocks (3 stages forward, 1 at the resource, 3 back)",
                                          (int'($time) - t0 + 5) / 10));
    repeat (30) @(posedge clk);
    chk(got[0] == 1 && got[3] == 1 && got[4] == 1 && got[5] == 1, "all four requests completed");
    chk(used == free, "full allocation: exactly the four free resources are used");
    // The example's average delay of 3.50 units counts the forward hops: three
    // requests take 3, the one turned back at stage 1 takes 5 (two out, one back,
    // two out again). Each hop is a clock here, and every completion also spends one
    // clock at the resource and three on the way back.
    begin
      int sum;
      sum = 0;
      foreach (tdone[i]) if (i inside {0, 3, 4, 5}) sum += tdone[i] - c0 - 4;
      chk(sum == 14, $sformatf("average forward delay %0d/4 units (3.50 expected)", sum));
      chk(nrr == 1, $sformatf("the request turned back at stage 1 was rerouted once (%0d)", nrr));
    end
    // data of each connected processor reach a resource
    @(negedge clk);
    for (int i = 0; i < N; i++) p_d[i] = '{valid: 1'b1, last: 1'b1, tag: 8'(16 + i)};
    #1;
    for (int o = 0; o < N; o++)
      if (used[o]) chk(r_d[o].valid && r_d[o].tag inside {8'd16, 8'd19, 8'd20, 8'd21},
                       $sformatf("data at resource %0d", o));
      else chk(!r_d[o].valid, $sformatf("no data at unused resource %0d", o));
    p_d = '{default: '0};
    // release everything, free two resources, and let five processors ask
    @(negedge clk);
    p_l = 8'b0011_1001;
    @(negedge clk);
    p_l = '0;
    repeat (8) @(posedge clk);
    for (int i = 0; i < N; i++) begin got[i] = 0; rej[i] = 0; end
    @(negedge clk);
    free = 8'b1100_0000;
    force used = '0;
    @(negedge clk);
    release used;
    repeat (10) @(posedge clk);
    @(negedge clk);
    chk(p_s[0] == 2, "status shows the two new free resources");
    p_q_v = 8'b0001_1111;
    @(negedge clk);
    p_q_v = '0;
    repeat (40) @(posedge clk);
    begin
      int ng, nr;
      ng = 0; nr = 0;
      for (int i = 0; i < N; i++) begin ng += got[i]; nr += rej[i]; end
      chk(ng == 2, $sformatf("two requests served (%0d)", ng));
      chk(nr == 3, $sformatf("three requests rejected back to processors (%0d)", nr));
      chk(nbt > 0, "backtracking happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
