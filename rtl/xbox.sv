// xbox: 2 x 2 exchange box B(i,j) of a resource sharing Omega or cube network, with
// the distributed scheduling algorithm built in.
// Requests carry no address, only a count of resources wanted. Each box keeps one
// availability register per output port (A1, A2), holding the number of free
// resources last reported through that port (S from stage i+1, loaded whenever it
// changes), and reports to stage i-1 on both input ports S = the sum of A over the
// output ports that are not in use. Every clock it services, in this order:
//   status  (S in)  load A(o) when S(o) changed;
//   release (L in)  pass the release to every output port the input owns, free them;
//   complete(C in)  add to the completions collected for the owning input;
//   reject  (J in)  larger reject first; re-route it to the other, unused output port
//                   if that one reaches free resources, else pass the remainder back
//                   on the input (J out) and reduce the resources queried;
//   query   (Q in)  larger query first (random on a tie); send it to the unused output
//                   port with the most free resources (random on a tie), zero that
//                   port's A, send any remainder to the other port, and reject back
//                   what neither can take. A query fully rejected is dropped;
//   C out           once the completions for an input equal what it still queries,
//                   send them back to stage i-1 as one completion.
// An output port carries at most one input's connection at a time; an input may use
// both output ports (broadcast) for a multi-resource query. Data beats follow the
// connections combinationally (out = in of the owning input), as the paper assumes
// negligible network delay for data. Q, L, J, C are one-cycle pulses with a count; S is
// a level. All control outputs are registered: one clock per stage. The signal set,
// the service order and the rules above follow the paper's algorithm; the
// per-clock servicing, pulse encoding, exclusion of the rejecting port and the LFSR
// tie-breaker are this design's.
module xbox
  import rsin_pkg::*;
#(
  parameter int unsigned CW   = 6,      // width of every count (Q, L, S, J, C)
  parameter logic [7:0]  SEED = 8'h5B   // tie-breaker LFSR seed (non-zero)
) (
  input  logic          clk,
  input  logic          rst_n,
  // input side, port k = 0 (upper) / 1 (lower), from/to stage i-1
  input  logic [1:0]    q_in_v,
  input  logic [CW-1:0] q_in_n  [2],
  input  logic [1:0]    l_in,
  output logic [CW-1:0] s_out   [2],
  output logic [1:0]    j_out_v,
  output logic [CW-1:0] j_out_n [2],
  output logic [1:0]    c_out_v,
  output logic [CW-1:0] c_out_n [2],
  input  beat_t         d_in    [2],
  // output side, port o = 0 (upper) / 1 (lower), to/from stage i+1
  output logic [1:0]    q_out_v,
  output logic [CW-1:0] q_out_n [2],
  output logic [1:0]    l_out,
  input  logic [CW-1:0] s_in    [2],
  input  logic [1:0]    j_in_v,
  input  logic [CW-1:0] j_in_n  [2],
  input  logic [1:0]    c_in_v,
  input  logic [CW-1:0] c_in_n  [2],
  output beat_t         d_out   [2],
  // event pulses, for observation
  output logic          ev_reroute,   // a reject was re-routed through the other port
  output logic          ev_backtrack, // a reject was sent back to stage i-1
  output logic          ev_split      // a query was split over both output ports
);
  // registered state
  logic [CW-1:0] a_q [2], s_prev_q [2], sent_q [2], need_q [2], got_q [2];
  logic [1:0]    own_v_q, own_q, done_q;
  logic [7:0]    lfsr;

  // next state and next outputs
  logic [CW-1:0] a_d [2], s_prev_d [2], sent_d [2], need_d [2], got_d [2];
  logic [1:0]    own_v_d, own_d, done_d;
  logic [1:0]    qo_v_d, lo_d, jo_v_d, co_v_d;
  logic [CW-1:0] qo_n_d [2], jo_n_d [2], co_n_d [2], s_out_d [2];
  logic          rr_d, bt_d, sp_d;

  function automatic logic [CW-1:0] min2(logic [CW-1:0] a, logic [CW-1:0] b);
    return (a < b) ? a : b;
  endfunction

  always_comb begin
    logic [CW-1:0] rem, n;
    logic          first, o, other, use0, use1, k, ok0, ok1;
    rem = '0; n = '0; first = 1'b0; o = 1'b0; other = 1'b0;
    use0 = 1'b0; use1 = 1'b0; k = 1'b0; ok0 = 1'b0; ok1 = 1'b0;
    s_out_d = '{default: '0};
    a_d = a_q; s_prev_d = s_prev_q; sent_d = sent_q; need_d = need_q; got_d = got_q;
    own_v_d = own_v_q; own_d = own_q; done_d = done_q;
    qo_v_d = '0; lo_d = '0; jo_v_d = '0; co_v_d = '0;
    qo_n_d = '{default: '0}; jo_n_d = '{default: '0}; co_n_d = '{default: '0};
    rr_d = 1'b0; bt_d = 1'b0; sp_d = 1'b0;

    // status: availability registers follow changes of S
    for (int p = 0; p < 2; p++)
      if (s_in[p] != s_prev_q[p]) begin
        a_d[p]      = s_in[p];
        s_prev_d[p] = s_in[p];
      end

    // release
    for (int kk = 0; kk < 2; kk++)
      if (l_in[kk]) begin
        for (int p = 0; p < 2; p++)
          if (own_v_d[p] && own_d[p] == 1'(kk)) begin
            lo_d[p]    = 1'b1;
            own_v_d[p] = 1'b0;
            sent_d[p]  = '0;
          end
        need_d[kk] = '0; got_d[kk] = '0; done_d[kk] = 1'b0;
      end

    // completions
    for (int p = 0; p < 2; p++)
      if (c_in_v[p] && own_v_q[p]) begin
        got_d[own_q[p]] = got_d[own_q[p]] + c_in_n[p];
      end

    // rejects, larger first
    first = (j_in_v[1] && (!j_in_v[0] || j_in_n[1] > j_in_n[0])) ? 1'b1 : 1'b0;
    for (int t = 0; t < 2; t++) begin
      o     = (t == 0) ? first : ~first;
      other = ~o;
      if (j_in_v[o] && own_v_q[o] && j_in_n[o] != 0) begin
        k   = own_q[o];
        rem = j_in_n[o];
        sent_d[o] = sent_d[o] - rem;
        if (sent_d[o] == 0) own_v_d[o] = 1'b0;
        if (!own_v_d[other] && a_d[other] != 0) begin
          n               = min2(rem, a_d[other]);
          qo_v_d[other]   = 1'b1;
          qo_n_d[other]   = n;
          own_v_d[other]  = 1'b1;
          own_d[other]    = k;
          sent_d[other]   = n;
          a_d[other]      = '0;
          rem             = rem - n;
          rr_d            = 1'b1;
        end
        if (rem != 0) begin
          jo_v_d[k] = 1'b1;
          jo_n_d[k] = jo_n_d[k] + rem;
          need_d[k] = need_d[k] - rem;
          bt_d      = 1'b1;
        end
      end
    end

    // queries, larger first, random on a tie
    first = (q_in_v[1] && (!q_in_v[0] || q_in_n[1] > q_in_n[0] ||
                           (q_in_n[1] == q_in_n[0] && lfsr[0]))) ? 1'b1 : 1'b0;
    for (int t = 0; t < 2; t++) begin
      k = (t == 0) ? first : ~first;
      if (q_in_v[k] && q_in_n[k] != 0) begin
        rem       = q_in_n[k];
        need_d[k] = q_in_n[k];
        got_d[k]  = '0;
        done_d[k] = 1'b0;
        use0 = 1'b0; use1 = 1'b0;
        for (int s = 0; s < 2; s++) begin
          ok0 = !own_v_d[0] && a_d[0] != 0;
          ok1 = !own_v_d[1] && a_d[1] != 0;
          if (rem != 0 && (ok0 || ok1)) begin
            if (ok0 && ok1)
              o = (a_d[1] > a_d[0]) ? 1'b1 :
                  (a_d[0] > a_d[1]) ? 1'b0 : lfsr[1];
            else
              o = ok1;
            n          = min2(rem, a_d[o]);
            qo_v_d[o]  = 1'b1;
            qo_n_d[o]  = n;
            own_v_d[o] = 1'b1;
            own_d[o]   = k;
            sent_d[o]  = n;
            a_d[o]     = '0;
            rem        = rem - n;
            if (o) use1 = 1'b1; else use0 = 1'b1;
          end
        end
        if (use0 && use1) sp_d = 1'b1;
        if (rem != 0) begin
          jo_v_d[k] = 1'b1;
          jo_n_d[k] = jo_n_d[k] + rem;
          need_d[k] = need_d[k] - rem;
        end
      end
    end

    // completion back to stage i-1 once all queried resources are found
    for (int kk = 0; kk < 2; kk++)
      if (need_d[kk] != 0 && !done_d[kk] && got_d[kk] == need_d[kk]) begin
        co_v_d[kk] = 1'b1;
        co_n_d[kk] = need_d[kk];
        done_d[kk] = 1'b1;
      end

    // status to stage i-1: resources reachable through unused output ports
    s_out_d[0] = (own_v_d[0] ? '0 : a_d[0]) + (own_v_d[1] ? '0 : a_d[1]);
    s_out_d[1] = s_out_d[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '{default: '0}; s_prev_q <= '{default: '0}; sent_q <= '{default: '0};
      need_q <= '{default: '0}; got_q <= '{default: '0};
      own_v_q <= '0; own_q <= '0; done_q <= '0;
      q_out_v <= '0; l_out <= '0; j_out_v <= '0; c_out_v <= '0;
      q_out_n <= '{default: '0}; j_out_n <= '{default: '0}; c_out_n <= '{default: '0};
      s_out <= '{default: '0};
      ev_reroute <= 1'b0; ev_backtrack <= 1'b0; ev_split <= 1'b0;
      lfsr <= (SEED == 0) ? 8'h1 : SEED;
    end else begin
      a_q <= a_d; s_prev_q <= s_prev_d; sent_q <= sent_d; need_q <= need_d; got_q <= got_d;
      own_v_q <= own_v_d; own_q <= own_d; done_q <= done_d;
      q_out_v <= qo_v_d; q_out_n <= qo_n_d; l_out <= lo_d;
      j_out_v <= jo_v_d; j_out_n <= jo_n_d; c_out_v <= co_v_d; c_out_n <= co_n_d;
      s_out <= s_out_d;
      ev_reroute <= rr_d; ev_backtrack <= bt_d; ev_split <= sp_d;
      lfsr <= {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
    end
  end

  // data follow the connections
  for (genvar p = 0; p < 2; p++) begin : g_d
    assign d_out[p] = own_v_q[p] ? d_in[own_q[p]] : '0;
  end
endmodule
