// tb_task_fifo: random push/pop traffic against a queue model, including pushes
// into a full queue (dropped, flagged as overflow) and simultaneous push and pop.
module tb_task_fifo;
  timeunit 1ns; timeprecision 1ps;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, head_valid, full, overflow;
  logic [7:0] din, head;
  logic [$clog2(DEPTH+1)-1:0] count;
  task_fifo #(.T(logic [7:0]), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, novf = 0, nboth = 0;
  logic [7:0] q [$];
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      bit exp_ovf;
      @(negedge clk);
      chk(head_valid == (q.size() != 0), "head_valid");
      chk(count == q.size(), "count");
      chk(full == (q.size() == DEPTH), "full");
      if (q.size() != 0) chk(head == q[0], "head value");
      push = ($urandom_range(0, 99) < (t < 300 ? 70 : 30));
      pop  = ($urandom_range(0, 99) < 50);
      din  = 8'($urandom);
      exp_ovf = push && q.size() == DEPTH && !(pop && q.size() != 0);
      @(posedge clk);
      if (push && pop && q.size() != 0) nboth++;
      if (pop && q.size() != 0) void'(q.pop_front());
      if (push && !exp_ovf) q.push_back(din);
      #1;
      chk(overflow == exp_ovf, "overflow flag");
      if (exp_ovf) novf++;
    end
    chk(novf > 0, "an overflow happened");
    chk(nboth > 0, "simultaneous push and pop happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
