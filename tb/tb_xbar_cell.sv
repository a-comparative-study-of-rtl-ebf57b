// tb_xbar_cell: exhaustive check of one crossbar crosspoint against its truth table.
// For both modes and every combination of X, Y and latch state it checks X(i,j+1),
// Y(i+1,j), the latch after the clock edge and the data OR chain, with the expected
// values written out from the table (not from the cell's equations).
module tb_xbar_cell;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mode_e mode;
  logic  x_in, y_in, x_out, y_out, latch;
  beat_t di, do_in, do_out;
  xbar_cell dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected (x_out, y_out, latch_after) for request mode, indexed by {x, y, l}
  //   x y l : xo yo l'
  logic [2:0] req_tab [8] = '{3'b000, 3'b001, 3'b010, 3'b001,
                              3'b100, 3'b101, 3'b001, 3'b001};
  // reset mode: xo = x, yo = y, latch cleared when x = 1
  logic [2:0] rst_tab [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                              3'b100, 3'b100, 3'b110, 3'b110};

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic set_latch(bit v);
    // drive the latch to v through the cell itself
    @(negedge clk);
    if (v) begin mode = MODE_REQ; x_in = 1; y_in = 1; end
    else   begin mode = MODE_RST; x_in = 1; y_in = 0; end
    @(negedge clk);
    x_in = 0; y_in = 0;
  endtask

  initial begin
    mode = MODE_REQ; x_in = 0; y_in = 0; di = '0; do_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++)
      for (int v = 0; v < 8; v++) begin
        logic [2:0] e;
        set_latch(v[0]);
        chk(latch == v[0], "latch preset");
        mode = m ? MODE_RST : MODE_REQ;
        x_in = v[2]; y_in = v[1];
        di    = '{valid: 1'b1, last: 1'b0, tag: 8'hA5};
        do_in = '{valid: 1'b0, last: 1'b1, tag: 8'h0F};
        e = m ? rst_tab[v] : req_tab[v];
        #1;
        chk(x_out == e[2], $sformatf("mode %0d xyl=%03b x_out", m, v));
        chk(y_out == e[1], $sformatf("mode %0d xyl=%03b y_out", m, v));
        chk(do_out == (v[0] ? beat_t'({1'b1, 1'b1, 8'hAF}) : do_in),
            $sformatf("mode %0d xyl=%03b data", m, v));
        @(negedge clk);
        chk(latch == e[0], $sformatf("mode %0d xyl=%03b latch", m, v));
        x_in = 0; y_in = 0;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
