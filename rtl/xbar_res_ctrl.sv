// xbar_res_ctrl: resource controller R(j) at the top of crossbar column j, owning
// one shared bus and the R resources hung on it.
// In a request cycle it offers the bus (Y(0,j)=1) when the bus is idle and at least
// one of its resources is free. If the resource signal comes back 0 at the bottom of
// the column (Y(P,j)=0) the bus was taken: the bus is marked busy and the lowest free
// resource is reserved for the task. Beats arriving on the column's DO line are handed
// to that resource (res_sel). The beat flagged `last` ends the transmission; the bus
// becomes free again at the end of the next reset cycle, which is the cycle in which
// the owning processor clears its crosspoint latch. A resource stays busy until it
// reports svc_done (one-cycle pulse). Offering, observing Y(P,j) and busy tracking
// follow the paper; the release timing, the choice of the lowest free resource and
// the done pulse are this design's.
module xbar_res_ctrl
  import rsin_pkg::*;
#(
  parameter int unsigned R = 1   // resources on this bus
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mode_e        mode,
  output logic         y_avl,     // Y(0,j)
  input  logic         y_ret,     // Y(P,j)
  input  beat_t        bus_do,    // DO(0,j)
  input  logic [R-1:0] svc_done,  // resource r finished its task
  output beat_t        res_beat,  // beat delivered to the selected resource
  output logic [R-1:0] res_sel,   // resource receiving the current task
  output logic [R-1:0] res_busy,
  output logic         bus_busy,
  output logic         alloc      // pulse: the bus was allocated this cycle
);
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1;
  logic          releasing;
  logic [RW-1:0] cur, pick;
  logic          any_free;

  always_comb begin
    pick     = '0;
    any_free = 1'b0;
    for (int r = R-1; r >= 0; r--)
      if (!res_busy[r]) begin pick = RW'(r); any_free = 1'b1; end
  end

  assign y_avl    = (mode == MODE_REQ) && !bus_busy && any_free;
  assign alloc    = y_avl && !y_ret;
  assign res_beat = bus_busy ? bus_do : '0;
  always_comb begin
    res_sel = '0;
    if (bus_busy) res_sel[cur] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_busy  <= 1'b0;
      releasing <= 1'b0;
      cur       <= '0;
      res_busy  <= '0;
    end else begin
      for (int r = 0; r < R; r++)
        if (svc_done[r]) res_busy[r] <= 1'b0;
      if (alloc) begin
        bus_busy      <= 1'b1;
        cur           <= pick;
        res_busy[pick] <= 1'b1;
      end
      if (bus_busy && bus_do.valid && bus_do.last) releasing <= 1'b1;
      if (releasing && mode == MODE_RST) begin
        releasing <= 1'b0;
        bus_busy  <= 1'b0;
      end
    end
  end
endmodule
