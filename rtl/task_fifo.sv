// task_fifo: the queue of waiting tasks held at a processor.
// Tasks that cannot yet be sent, or that were blocked or rejected by the network,
// wait here and are served in arrival (FIFO) order; the head is presented to the
// network interface, which pops it once the task has been transmitted. Circular
// buffer of DEPTH entries, first-word-fall-through: head/head_valid show the oldest
// entry combinationally; push and pop take effect at the clock edge and may happen
// in the same cycle. A push into a full queue is dropped and counted in `overflow`.
// The FIFO order follows the paper; depth and overflow handling are this design's.
module task_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     head,
  output logic head_valid,
  output logic full,
  output logic overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T mem [DEPTH];
  logic [AW-1:0] rd, wr;

  assign head_valid = (count != 0);
  assign full       = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign head       = mem[rd];

  wire do_pop  = pop && head_valid;
  wire do_push = push && (!full || do_pop);

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) wr <= inc(wr);
      if (do_pop)  rd <= inc(rd);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wr] <= din;
endmodule
