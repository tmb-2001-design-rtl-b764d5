// tb_scope: self-checking test of the built-in logic analyzer.
//
// Drives random values on all 96 probe channels, keeping a copy of every
// sample in the testbench, with channel 0 (the trigger) held low except at
// the chosen trigger clock. Each capture arms the scope, checks the waiting
// flag, fires the trigger, waits for trig_done and reads every bank at
// every address, expecting NPRE samples before the trigger, the trigger
// sample at address NPRE and the following samples after it. Captures
// trigger on channel 0 and on the force bit, one after the memory has
// wrapped; a last step checks that a stopped scope ignores triggers. A
// watchdog ends the run if it hangs.
module tb_scope;

  localparam int NCH = 96, DEPTH = 256, NPRE = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           rst, runstop, force_trig, waiting, trig_done;
  logic [NCH-1:0] probe;
  logic [2:0]     ram_sel;
  logic [7:0]     radr;
  logic [15:0]    rdata;

  scope #(.NCH(NCH), .DEPTH(DEPTH), .NPRE(NPRE)) dut (.*);

  int checks = 0, failures = 0;
  logic [NCH-1:0] all [$];     // every probe value, in the order the scope samples them
  int  trig_idx;               // index in all[] of the trigger sample
  bit  armed_tb, trig_ch0, force_prev;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the scope samples probe at each rising edge; mirror that here, and mark
  // the first trigger condition seen while the scope is recording
  always @(posedge clk) begin
    all.push_back(probe);
    if (armed_tb && trig_idx < 0 && dut.run && (probe[0] || (force_trig && !force_prev)))
      trig_idx = all.size() - 1;
    force_prev <= force_trig;
    probe <= {$urandom, $urandom, $urandom} & {{NCH-1{1'b1}}, 1'b0};
    if (trig_ch0) probe[0] <= 1'b1;
  end

  task automatic capture(input bit use_force, input int pre_clocks);
    @(negedge clk);
    runstop = 1'b1;
    armed_tb = 1'b1;
    trig_idx = -1;
    repeat (2) @(negedge clk);
    check(waiting && !trig_done, "waiting once armed");
    repeat (pre_clocks) @(negedge clk);
    check(waiting && trig_idx < 0, "still waiting before the trigger");
    if (use_force) force_trig = 1'b1;
    else           trig_ch0   = 1'b1;
    @(negedge clk);
    trig_ch0 = 1'b0;
    for (int k = 0; k < 400 && !trig_done; k++) @(negedge clk);
    force_trig = 1'b0;
    check(trig_done && !waiting && trig_idx >= 0, "done after the trigger");
    check(all.size() - trig_idx >= DEPTH - NPRE, "enough samples after the trigger");
    if (!use_force) check(all[trig_idx][0], "trigger sample has channel 0 set");
    // read back every bank at every address: address a is sample trig_idx - NPRE + a
    for (int b = 0; b < NCH / 16; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        ram_sel = 3'(b);
        radr    = 8'(a);
        @(negedge clk);
        check(rdata == all[trig_idx - NPRE + a][16*b +: 16], $sformatf("bank %0d address %0d", b, a));
      end
    // the scope has stopped: further clocks change nothing
    repeat (20) @(negedge clk);
    radr = 8'(NPRE);
    ram_sel = 3'd0;
    @(negedge clk);
    @(negedge clk);
    check(rdata == all[trig_idx][15:0], "memory frozen after the capture");
    runstop = 1'b0;
    armed_tb = 1'b0;
    @(negedge clk);
    check(!waiting && !trig_done, "disarmed");
  endtask

  initial begin
    rst = 1'b1; runstop = 1'b0; force_trig = 1'b0; ram_sel = '0; radr = '0;
    probe = '0; trig_ch0 = 1'b0; armed_tb = 1'b0; trig_idx = -1;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    capture(1'b0, 40);    // trigger on channel 0
    capture(1'b1, 300);   // forced trigger after the memory has wrapped
    capture(1'b0, 20);    // channel 0 again

    // a stopped scope ignores the trigger
    trig_ch0 = 1'b1;
    @(negedge clk);
    trig_ch0 = 1'b0;
    repeat (300) @(negedge clk);
    check(!waiting && !trig_done, "no capture while stopped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
