// tb_raw_hits_ram: checks the raw-hits storage around a pre-trigger.
//
// The input sample of each clock is that clock's number, so a stored time
// bin tells which clock it came from. For random buffers, pre-trigger
// depths and time-bin counts (including the default 7 time bins with 2
// before the pre-trigger) a start pulse in clock n must leave time bin k of
// the buffer holding the sample of clock n - fifo_pretrig + k. Reads have
// one clock of latency. Other buffers must be left untouched.
module tb_raw_hits_ram;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [239:0] din;
  logic [4:0] fifo_pretrig = 5'd2, fifo_tbins = 5'd7;
  logic start = 0;
  logic [2:0] start_buf = 0;
  logic busy;
  logic [7:0] rd_adr = 0;
  logic [239:0] rdata;
  raw_hits_ram #(.W(240), .NBUF(8), .TBW(5)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign din = {8{30'(cyc)}};
  int stamp [8][32];
  initial begin
    #(10 * 20000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    repeat (40) @(negedge clk);
    for (int b = 0; b < 8; b++) for (int k = 0; k < 32; k++) stamp[b][k] = -1;
    for (int trial = 0; trial < 30; trial++) begin
      int n;
      start_buf = 3'($urandom);
      if (trial == 0) begin fifo_pretrig = 2; fifo_tbins = 7; end
      else begin fifo_pretrig = 5'($urandom % 12); fifo_tbins = 5'(1 + $urandom % 16); end
      start = 1; n = cyc;
      @(negedge clk); start = 0;
      check(busy, "busy while writing");
      for (int k = 0; k < fifo_tbins; k++) stamp[start_buf][k] = n - fifo_pretrig + k;
      repeat (fifo_tbins) @(negedge clk);
      check(!busy, "done after fifo_tbins clocks");
      for (int b = 0; b < 8; b++)
        for (int k = 0; k < 16; k++)
          if (stamp[b][k] >= 0) begin
            rd_adr = {3'(b), 5'(k)};
            @(negedge clk);
            check(rdata[29:0] == 30'(stamp[b][k]) && rdata[239:210] == 30'(stamp[b][k]),
                  $sformatf("buffer %0d tbin %0d holds clock %0d, got %0d", b, k, stamp[b][k], rdata[29:0]));
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
