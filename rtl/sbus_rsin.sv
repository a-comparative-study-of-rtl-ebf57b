// sbus_rsin: single shared bus resource sharing network, configuration
// P/1 x 1 x 1 SBUS/R: P processors and R identical resources on one bus.
// The bus continuously broadcasts the number of free resources (free_cnt). A
// processor whose oldest queued task asks for no more resources than are free sends
// it to the bus; when several do so in the same cycle an arbiter picks one at random
// and the others stay queued and retry. The winner is given `need` free resources
// (the lowest-numbered ones), which become busy, and streams its task over the bus,
// one beat per clock, to all of them (bus_sel). The bus is free again the cycle after
// the last beat. A resource stays busy until it pulses svc_done. There is no
// buffering at the resources, so while all resources are busy the bus idles. Free-count
// broadcast, head-of-queue test and random arbitration follow the paper; the LFSR
// arbiter, lowest-first resource choice and beat timing are this design's.
module sbus_rsin
  import rsin_pkg::*;
#(
  parameter int unsigned P      = 16,
  parameter int unsigned R      = 32,
  parameter int unsigned QDEPTH = 8,
  localparam int unsigned NW    = $clog2(R+1),
  localparam int unsigned PW    = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [P-1:0]  task_push,
  input  task_t         task_in   [P],
  input  logic [NW-1:0] task_need [P],  // resources the task asks for (1..R)
  output logic [P-1:0]  task_full,
  input  logic [R-1:0]  svc_done,
  output beat_t         bus_beat,
  output logic [R-1:0]  bus_sel,
  output logic [R-1:0]  res_busy,
  output logic [NW-1:0] free_cnt,
  output logic          bus_active,
  output logic          grant,        // pulse: a task won the bus
  output logic [PW-1:0] grant_proc,
  output logic          conflict,     // pulse: more than one processor contended
  output logic [P-1:0]  proc_blocked, // head task waits for free resources
  output logic [P-1:0]  proc_done,
  output logic [P-1:0]  proc_overflow
);
  typedef struct packed {
    task_t          t;
    logic [NW-1:0]  need;
  } sreq_t;

  sreq_t        head [P];
  logic [P-1:0] head_valid, pop, elig;
  logic [PW-1:0] owner, start, pick;
  logic [LEN_W-1:0] cnt;
  logic [15:0]  lfsr;
  logic [R-1:0] mask;

  for (genvar i = 0; i < P; i++) begin : g_q
    task_fifo #(.T(sreq_t), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n, .push(task_push[i]),
      .din('{t: task_in[i], need: task_need[i]}), .pop(pop[i]),
      .head(head[i]), .head_valid(head_valid[i]), .full(task_full[i]),
      .overflow(proc_overflow[i]), .count()
    );
  end

  // free resources broadcast to every processor
  always_comb begin
    free_cnt = '0;
    for (int r = 0; r < R; r++) free_cnt += NW'(!res_busy[r]);
  end

  always_comb begin
    for (int i = 0; i < P; i++) begin
      elig[i]         = head_valid[i] && head[i].need != 0 && head[i].need <= free_cnt;
      proc_blocked[i] = head_valid[i] && !elig[i] && !(bus_active && owner == PW'(i));
    end
  end

  // random arbitration: scan from a pseudo-random start position
  assign start = PW'(lfsr % P);
  always_comb begin
    logic found;
    int   n, k;
    pick  = '0;
    found = 1'b0;
    n     = 0;
    for (int i = 0; i < P; i++) begin
      k = (int'(start) + i) % P;
      if (elig[k] && !found) begin pick = PW'(k); found = 1'b1; end
      if (elig[i]) n++;
    end
    grant    = !bus_active && found;
    conflict = grant && (n > 1);
  end
  assign grant_proc = pick;

  // the lowest `need` free resources of the winner
  always_comb begin
    int unsigned left;
    mask = '0;
    left = int'(head[pick].need);
    for (int r = 0; r < R; r++)
      if (!res_busy[r] && left != 0) begin mask[r] = 1'b1; left--; end
  end

  always_comb begin
    bus_beat = '0;
    if (bus_active) begin
      bus_beat.valid = 1'b1;
      bus_beat.last  = (cnt == head[owner].t.len - 1'b1);
      bus_beat.tag   = head[owner].t.tag;
    end
    pop = '0;
    if (bus_active && bus_beat.last) pop[owner] = 1'b1;
  end
  assign proc_done = pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr       <= 16'hACE1;
      bus_active <= 1'b0;
      owner      <= '0;
      cnt        <= '0;
      bus_sel    <= '0;
      res_busy   <= '0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      res_busy <= (res_busy & ~svc_done) | (grant ? mask : '0);
      if (grant) begin
        bus_active <= 1'b1;
        owner      <= pick;
        cnt        <= '0;
        bus_sel    <= mask;
      end else if (bus_active) begin
        cnt <= cnt + 1'b1;
        if (bus_beat.last) begin
          bus_active <= 1'b0;
          bus_sel    <= '0;
        end
      end
    end
  end
endmodule
