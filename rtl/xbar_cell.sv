// xbar_cell: one crosspoint C(i,j) of the crossbar RSIN, joining processor row i to
// bus column j.
// The request signal X enters from the left and the resource signal Y from above.
// In request mode a cell that sees both sets its control latch (connecting row i to
// bus j) and stops both signals; a request that finds no resource travels right, a
// resource that finds no request travels down, and a latch already on blocks the
// resource signal so that an earlier allocation is never disturbed. In reset mode
// X and Y pass straight through and X resets the latch, relinquishing the bus.
//   request mode: Xo = X & ~Y, Yo = ~X & Y & ~L, S = X & Y, R = 0
//   reset mode:   Xo = X,      Yo = Y,            S = 0,     R = X
//   data:         DO(i,j) = (L ? DI(i) : 0) | DO(i+1,j)   (wired-OR down the column)
// These equations are the paper's truth table. The control latch is realised here
// as a flip-flop written at the clock edge that ends a request or reset cycle, so a
// whole cycle of the switch is one clock; that, and using L (not its complement) to
// gate data in both modes, are this design's choices.
module xbar_cell
  import rsin_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  input  logic  x_in,    // X(i,j)
  input  logic  y_in,    // Y(i,j)
  output logic  x_out,   // X(i,j+1)
  output logic  y_out,   // Y(i+1,j)
  input  beat_t di,      // DI(i), data from processor i
  input  beat_t do_in,   // DO(i+1,j), data from the cells below
  output beat_t do_out,  // DO(i,j)
  output logic  latch    // L(i,j)
);
  logic set_l, rst_l;

  always_comb begin
    if (mode == MODE_REQ) begin
      x_out = x_in & ~y_in;
      y_out = ~x_in & y_in & ~latch;
      set_l = x_in & y_in;
      rst_l = 1'b0;
    end else begin
      x_out = x_in;
      y_out = y_in;
      set_l = 1'b0;
      rst_l = x_in;
    end
    do_out = beat_or(latch ? di : '0, do_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     latch <= 1'b0;
    else if (rst_l) latch <= 1'b0;
    else if (set_l) latch <= 1'b1;
  end
endmodule
