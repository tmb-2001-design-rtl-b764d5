// tb_buffer_manager: checks the raw-hits buffer allocator.
//
// Random allocations and frees (several buffers freed in one clock) for
// 3000 clocks, compared each clock with a bit-vector model: the lowest free
// buffer is offered, busy, the number busy, its peak, the empty / half /
// full-1 / full flags, and the sticky overflow on an allocation while full.
module tb_buffer_manager;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic alloc = 0;
  logic [7:0] free_mask = 0;
  logic wr_buf_ready, buf_empty, buf_half, buf_full1, buf_full, buf_ovf;
  logic [2:0] wr_buf_adr;
  logic [7:0] busy;
  logic [3:0] nbusy, nbusy_peak;
  buffer_manager #(.NBUF(8)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic [7:0] m = 0;
  int peak = 0;
  bit ovf_m = 0;
  initial begin
    #(10 * 10000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int n, lowest;
      n = $countones(m); lowest = -1;
      for (int b = 7; b >= 0; b--) if (!m[b]) lowest = b;
      check(busy == m, "busy list");
      check(nbusy == 4'(n), "number busy");
      check(nbusy_peak == 4'(peak), "peak busy");
      check(wr_buf_ready == (lowest >= 0), "ready");
      if (lowest >= 0) check(wr_buf_adr == 3'(lowest), "lowest free buffer offered");
      check(buf_empty == (n == 0) && buf_half == (n >= 4) && buf_full1 == (n == 7) && buf_full == (n == 8), "flags");
      check(buf_ovf == ovf_m, "overflow");
      alloc = ($urandom % 3) != 0;
      free_mask = (($urandom % 3) == 0) ? 8'($urandom) & 8'($urandom) : 8'h0;
      @(negedge clk);
      if (peak < n) peak = n;
      m = m & ~free_mask;
      if (alloc) begin
        if (lowest >= 0) m[lowest] = 1; else ovf_m = 1;
      end
    end
    check(ovf_m, "bench reached overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
