// xbar_proc_port: the processor side of one crossbar row.
// Tasks are queued in a task_fifo. In every request cycle while a task waits and the
// processor holds no bus, it raises X(i,0). If X(i,M) comes back 0 the request was
// granted somewhere along the row, and from the next clock the task's beats are sent
// on DI(i), one per clock, the last one flagged. If X(i,M) comes back 1 the request
// found no free bus and is simply resubmitted in the next request cycle. After the
// last beat the processor raises X(i,0) in the next reset cycle to relinquish the bus,
// and pops the task. Resubmission and relinquish-by-reset follow the paper; the
// beat format and the one-beat-per-clock rate are this design's.
module xbar_proc_port
  import rsin_pkg::*;
#(
  parameter int unsigned QDEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  input  logic  task_push,
  input  task_t task_in,
  output logic  task_full,
  output logic  x_req,      // X(i,0)
  input  logic  x_ret,      // X(i,M)
  output beat_t di,         // DI(i)
  output logic  connected,  // holds a bus
  output logic  blocked,    // pulse: request returned unsatisfied
  output logic  granted,    // pulse: request satisfied
  output logic  done,       // pulse: task sent and bus relinquished
  output logic  overflow
);
  typedef enum logic [1:0] {IDLE, SEND, WRST} st_e;
  st_e          st;
  task_t        head;
  logic         head_valid, pop;
  logic [LEN_W-1:0] cnt;

  task_fifo #(.T(task_t), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .push(task_push), .din(task_in), .pop,
    .head, .head_valid, .full(task_full), .overflow, .count()
  );

  assign x_req     = (st == IDLE && head_valid && mode == MODE_REQ) ||
                     (st == WRST && mode == MODE_RST);
  assign granted   = (st == IDLE && head_valid && mode == MODE_REQ && !x_ret);
  assign blocked   = (st == IDLE && head_valid && mode == MODE_REQ &&  x_ret);
  assign pop       = (st == WRST && mode == MODE_RST);
  assign done      = pop;
  assign connected = (st != IDLE);

  always_comb begin
    di = '0;
    if (st == SEND) begin
      di.valid = 1'b1;
      di.last  = (cnt == head.len - 1'b1);
      di.tag   = head.tag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= IDLE;
      cnt <= '0;
    end else begin
      case (st)
        IDLE: if (granted) begin st <= SEND; cnt <= '0; end
        SEND: begin
          cnt <= cnt + 1'b1;
          if (di.last) st <= WRST;
        end
        WRST: if (mode == MODE_RST) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
