// xbar_switch: the P x M crossbar of xbar_cell crosspoints that schedules requests
// without a central scheduler.
// Processor i drives X(i,0) on row i and reads X(i,M) back at the right edge: a 1
// returned at the end of a request cycle means the request found no bus and must be
// resubmitted. Resource controller j drives Y(0,j) down column j and reads Y(P,j)
// back at the bottom: a 0 returned while it offered Y(0,j)=1 means its bus was taken.
// The signals ripple from the top-left corner to the bottom-right in one clock (a
// combinational wave through at most P+M cells). Lower-numbered processors see free
// buses first and so have priority, as in the paper. Data from processor i appear
// on column j through the wired-OR DO chain when latch L(i,j) is on; DO(0,j) goes to
// resource controller j.
module xbar_switch
  import rsin_pkg::*;
#(
  parameter int unsigned P = 16,  // processors (rows)
  parameter int unsigned M = 32   // buses (columns)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  input  logic  [P-1:0] x_req,   // X(i,0)
  output logic  [P-1:0] x_ret,   // X(i,M)
  input  logic  [M-1:0] y_avl,   // Y(0,j)
  output logic  [M-1:0] y_ret,   // Y(P,j)
  input  beat_t di     [P],      // DI(i)
  output beat_t bus_do [M],      // DO(0,j)
  output logic  [M-1:0] latch [P]
);
  // Each cell's outputs are declared in its own generate scope so that the ripple
  // from cell to cell is seen by tools as the acyclic chain it is.
  for (genvar i = 0; i < P; i++) begin : g_row
    for (genvar j = 0; j < M; j++) begin : g_col
      logic  xo, yo;
      beat_t dout;
      logic  xi, yi;
      beat_t din;
      if (j == 0) begin : g_xl
        assign xi = x_req[i];
      end else begin : g_xi
        assign xi = g_row[i].g_col[j-1].xo;
      end
      if (i == 0) begin : g_yt
        assign yi = y_avl[j];
      end else begin : g_yi
        assign yi = g_row[i-1].g_col[j].yo;
      end
      if (i == P-1) begin : g_db
        assign din = '0;
      end else begin : g_di
        assign din = g_row[i+1].g_col[j].dout;
      end
      xbar_cell u_cell (
        .clk, .rst_n, .mode,
        .x_in (xi), .y_in (yi), .x_out(xo), .y_out(yo),
        .di   (di[i]), .do_in(din), .do_out(dout),
        .latch(latch[i][j])
      );
    end
    assign x_ret[i] = g_row[i].g_col[M-1].xo;
  end
  for (genvar j = 0; j < M; j++) begin : g_edge
    assign y_ret[j]  = g_row[P-1].g_col[j].yo;
    assign bus_do[j] = g_row[0].g_col[j].dout;
  end
endmodule
