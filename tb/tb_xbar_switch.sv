// tb_xbar_switch: random request and resource patterns against a row-by-row model
// of the crossbar's request and reset cycles. The model gives each requesting row,
// in order of row number, the lowest column that still carries a resource signal,
// a column being stopped by a row that takes it or that already holds it; reset
// cycles clear the rows that ask. Checked each cycle: X(i,M), Y(P,j), every latch,
// and that data reach a column only from the row connected to it.
module tb_xbar_switch;
  timeunit 1ns; timeprecision 1ps;
  import rsin_pkg::*;
  localparam int P = 5, M = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mode_e mode;
  logic [P-1:0] x_req, x_ret;
  logic [M-1:0] y_avl, y_ret;
  beat_t di [P], bus_do [M];
  logic [M-1:0] latch [P];
  xbar_switch #(.P(P), .M(M)) dut (.*);

  int checks = 0, failures = 0, ngrant = 0, nblock = 0, nrst = 0;
  logic [M-1:0] ml [P];   // model latches
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    mode = MODE_REQ; x_req = '0; y_avl = '0;
    for (int i = 0; i < P; i++) begin ml[i] = '0; di[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      logic [M-1:0] col, nml [P];
      logic [P-1:0] ex;
      @(negedge clk);
      mode = ($urandom_range(0, 2) == 0) ? MODE_RST : MODE_REQ;
      for (int i = 0; i < P; i++) begin
        // a row holding a bus does not request; it may reset
        x_req[i] = (mode == MODE_REQ) ? ((ml[i] == '0) && $urandom_range(0, 1))
                                      : ((ml[i] != '0) && $urandom_range(0, 2) == 0);
        di[i] = '{valid: 1'b1, last: 1'b0, tag: 8'(i + 1)};
      end
      y_avl = M'($urandom);
      // model
      col = y_avl;
      for (int i = 0; i < P; i++) begin
        nml[i] = ml[i];
        ex[i]  = x_req[i];
        if (mode == MODE_REQ) begin
          for (int j = 0; j < M; j++) begin
            if (ex[i] && col[j]) begin
              nml[i][j] = 1'b1; ex[i] = 1'b0; col[j] = 1'b0; ngrant++;
            end else if (!ex[i] && ml[i][j]) col[j] = 1'b0;
          end
          if (ex[i]) nblock++;
        end else if (x_req[i]) begin
          nml[i] = '0; nrst++;
        end
      end
      #1;
      chk(x_ret == ex, $sformatf("t=%0d x_ret %b exp %b", t, x_ret, ex));
      chk(y_ret == col, $sformatf("t=%0d y_ret %b exp %b", t, y_ret, col));
      for (int j = 0; j < M; j++) begin
        beat_t e;
        e = '0;
        for (int i = 0; i < P; i++) if (ml[i][j]) e = beat_or(e, di[i]);
        chk(bus_do[j] == e, $sformatf("t=%0d data on column %0d", t, j));
      end
      @(posedge clk); #1;
      for (int i = 0; i < P; i++) begin
        ml[i] = nml[i];
        chk(latch[i] == ml[i], $sformatf("t=%0d latches of row %0d", t, i));
      end
    end
    chk(ngrant > 0 && nblock > 0 && nrst > 0, "grants, blocked requests and resets all happened");
    $display("grants=%0d blocked=%0d resets=%0d", ngrant, nblock, nrst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
