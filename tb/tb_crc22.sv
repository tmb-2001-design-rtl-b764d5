// tb_crc22: checks the 22-bit readout CRC against a bit-serial model.
//
// Feeds 200 random 16-bit frames, with random gaps where en is low, and
// compares crc and crc_next each clock with a model that shifts the frame
// bits in least significant first through the x^22 + x + 1 register. Also
// checks that init clears the register.
module tb_crc22;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic init = 0, en = 0;
  logic [15:0] din = 0;
  logic [21:0] crc, crc_next;
  crc22 dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic [21:0] step(input logic [21:0] c, input logic [15:0] d);
    for (int i = 0; i < 16; i++) begin
      logic msb;
      msb = c[21];
      c = c << 1;
      if (msb ^ d[i]) begin c[0] = ~c[0]; c[1] = ~c[1]; end
    end
    return c;
  endfunction
  logic [21:0] model;
  initial begin
    #(10 * 5000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0; model = 0;
    check(crc == 0, "zero after reset");
    for (int i = 0; i < 200; i++) begin
      en = ($urandom % 4) != 0; din = 16'($urandom);
      #1;
      check(crc_next == (en ? step(model, din) : model), "crc_next");
      @(negedge clk);
      if (en) model = step(model, din);
      check(crc == model, $sformatf("crc %h expected %h", crc, model));
    end
    // a known value: one frame 0001 from zero gives x^22 mod (x^22+x+1) shifted 15 times
    init = 1; @(negedge clk); init = 0;
    check(crc == 0, "init clears");
    en = 1; din = 16'h0001; @(negedge clk); en = 0;
    check(crc == 22'h3 << 15, "single bit gives the feedback taps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
