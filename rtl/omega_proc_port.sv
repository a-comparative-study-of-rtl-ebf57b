// omega_proc_port: the processor end of one input link of the Omega network.
// Tasks, each asking for `need` resources, wait in a task_fifo. When the status S on
// the link shows at least `need` reachable free resources, the oldest task is sent
// into the network as a query Q(need), after a random delay of 0 to 2**BACKOFF_W-1
// clocks so that processors woken by the same status change do not all collide. The
// port then collects completions C and rejects J until they account for the whole
// query. Fully satisfied: the task's beats are sent, one per clock, the last one
// flagged, then a release L breaks the connection and the task leaves the queue.
// Otherwise the resources found (if any) are released, the task stays at the head of
// the queue and is retried only after the status changes. Status-driven retry and
// the random delay follow the paper; the give-up-and-release rule for partly
// satisfied queries and the LFSR delay are this design's.
module omega_proc_port
  import rsin_pkg::*;
#(
  parameter int unsigned CW        = 6,
  parameter int unsigned QDEPTH    = 8,
  parameter int unsigned BACKOFF_W = 2,
  parameter logic [7:0]  SEED      = 8'hB7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          task_push,
  input  task_t         task_in,
  input  logic [CW-1:0] task_need,
  output logic          task_full,
  output logic          q_v,
  output logic [CW-1:0] q_n,
  output logic          l,
  input  logic [CW-1:0] s,
  input  logic          j_v,
  input  logic [CW-1:0] j_n,
  input  logic          c_v,
  input  logic [CW-1:0] c_n,
  output beat_t         d_out,
  output logic          connected,  // task being transmitted
  output logic          rejected,   // pulse: a query came back (partly) rejected
  output logic          done,       // pulse: task transmitted and released
  output logic          overflow
);
  typedef struct packed {
    task_t         t;
    logic [CW-1:0] need;
  } oreq_t;
  typedef enum logic [1:0] {IDLE, WAIT, SEND} st_e;

  st_e           st;
  oreq_t         head;
  logic          head_valid, pop;
  logic [CW-1:0] got, rej, got_n, rej_n, s_last;
  logic          retry, s_chg, go;
  logic [LEN_W-1:0] cnt;
  logic [7:0]    lfsr;
  logic [BACKOFF_W:0] bo;

  task_fifo #(.T(oreq_t), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .push(task_push), .din('{t: task_in, need: task_need}), .pop,
    .head, .head_valid, .full(task_full), .overflow, .count()
  );

  assign go    = (st == IDLE) && head_valid && head.need != 0 && head.need <= s &&
                 (!retry || s_chg) && bo == 0;
  assign got_n = got + (c_v ? c_n : '0);
  assign rej_n = rej + (j_v ? j_n : '0);
  assign connected = (st == SEND);

  always_comb begin
    d_out = '0;
    if (st == SEND) begin
      d_out.valid = 1'b1;
      d_out.last  = (cnt == head.t.len - 1'b1);
      d_out.tag   = head.t.tag;
    end
  end
  assign pop  = (st == SEND) && d_out.last;
  assign done = pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; got <= '0; rej <= '0; s_last <= '0; retry <= 1'b0; s_chg <= 1'b0;
      cnt <= '0; lfsr <= (SEED == 0) ? 8'h1 : SEED; bo <= '0;
      q_v <= 1'b0; q_n <= '0; l <= 1'b0; rejected <= 1'b0;
    end else begin
      lfsr     <= {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
      s_last   <= s;
      q_v      <= 1'b0;
      l        <= 1'b0;
      rejected <= 1'b0;
      if (s != s_last) begin
        s_chg <= 1'b1;
        // random delay before answering a new status
        if (st == IDLE && head_valid) bo <= {1'b0, BACKOFF_W'(lfsr)};
      end else if (bo != 0) bo <= bo - 1'b1;
      case (st)
        IDLE: if (go) begin
          q_v <= 1'b1; q_n <= head.need;
          got <= '0; rej <= '0; s_chg <= 1'b0;
          st  <= WAIT;
        end
        WAIT: begin
          got <= got_n;
          rej <= rej_n;
          if (got_n + rej_n == head.need) begin
            if (rej_n == 0) begin
              st <= SEND; cnt <= '0; retry <= 1'b0;
            end else begin
              rejected <= 1'b1;
              retry    <= 1'b1;
              l        <= (got_n != 0);
              st       <= IDLE;
            end
          end
        end
        SEND: begin
          cnt <= cnt + 1'b1;
          if (d_out.last) begin l <= 1'b1; st <= IDLE; end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
