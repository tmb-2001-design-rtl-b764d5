// tb_bxn_counter: checks the bunch-crossing counter.
//
// With a short LHC cycle (the register allows any length; the default 3564
// is used in the second half) it checks that the counter steps once per
// clock, wraps to 0 after lhc_cycle-1, that BX0 and BX reset load the
// offset, that a BX0 arriving when the counter is not at the offset sets the
// sticky sync error, and that L1 reset clears it. The expected count is
// kept by an independent model in the bench.
module tb_bxn_counter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic ttc_bx0 = 0, ttc_bxreset = 0, ttc_l1reset = 0;
  logic [11:0] lhc_cycle = 12'd20, bxn_offset = 12'd0, bxn;
  logic bx0_local, sync_err;
  bxn_counter dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  int model;
  initial begin
    #(10 * 20000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0; model = 0;
    for (int i = 0; i < 50; i++) begin
      check(bxn == 12'(model), $sformatf("count %0d expected %0d", bxn, model));
      check(bx0_local == (model == 0), "bx0_local");
      @(negedge clk);
      model = (model + 1) % 20;
    end
    // BX0 at the right place: no error
    while (bxn != 12'd19) @(negedge clk);
    ttc_bx0 = 1; @(negedge clk); ttc_bx0 = 0;
    check(bxn == 0 && !sync_err, "BX0 in step");
    // BX0 out of step
    repeat (5) @(negedge clk);
    ttc_bx0 = 1; @(negedge clk); ttc_bx0 = 0;
    check(bxn == 0 && sync_err, "BX0 out of step sets sync error");
    repeat (30) @(negedge clk);
    check(sync_err, "sync error is sticky");
    ttc_l1reset = 1; @(negedge clk); ttc_l1reset = 0;
    check(!sync_err, "L1 reset clears sync error");
    // offset and bx reset
    bxn_offset = 12'd7;
    ttc_bxreset = 1; @(negedge clk); ttc_bxreset = 0;
    check(bxn == 7, "BX reset loads the offset");
    // full LHC orbit
    lhc_cycle = 12'd3564; bxn_offset = 0;
    ttc_bxreset = 1; @(negedge clk); ttc_bxreset = 0;
    for (int i = 0; i < 3563; i++) @(negedge clk);
    check(bxn == 12'd3563, "last crossing of the orbit is 3563");
    @(negedge clk);
    check(bxn == 0, "orbit of 3564 crossings wraps to 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
