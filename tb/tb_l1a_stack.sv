// tb_l1a_stack: checks the readout-request FIFO against a queue model.
//
// Random pushes and pops (including pushes when full and pops when empty)
// for 2000 clocks; each clock compares dout (show-ahead), empty, full and
// count with a SystemVerilog queue, and checks that overflow is flagged.
module tb_l1a_stack;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic push = 0, pop = 0;
  logic [21:0] din = 0, dout;
  logic empty, full, ovf;
  logic [4:0] count;
  l1a_stack #(.W(22), .DEPTH(16)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic [21:0] q [$];
  bit saw_ovf = 0;
  initial begin
    #(10 * 10000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 2000; i++) begin
      int bias;
      bias = (i / 250) % 2;   // alternate filling and draining phases
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == 16), "full");
      check(count == 5'(q.size()), "count");
      if (q.size() != 0) check(dout == q[0], "head");
      push = ($urandom % 4) < (bias ? 3 : 1);
      pop  = ($urandom % 4) < (bias ? 1 : 3);
      din  = 22'($urandom);
      @(negedge clk);
      if (pop && q.size() != 0) void'(q.pop_front());
      if (push) begin
        if (q.size() < 16) q.push_back(din);
        else saw_ovf = 1;
      end
      if (saw_ovf) check(ovf, "overflow flagged");
    end
    check(saw_ovf, "bench reached overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
