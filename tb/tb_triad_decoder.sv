// tb_triad_decoder: checks the triad one-shots of one CFEB.
//
// Each trial sends a triad (start bit, strip bit, 1/2-strip bit on three
// clocks) on several random lines at once, with a random persistence and a
// random hot-channel mask, and then compares all 192 1/2-strip and 48
// di-strip outputs for 20 clocks with the expected picture: the hit
// 1/2-strip 4*triad + 2*strip + halfstrip is high from the 4th clock after
// the start bit was applied for triad_persist+1 clocks, and masked lines
// stay silent. A final trial checks the documented 150 ns hold for
// persistence 5 (6 clocks of 25 ns) and that a line busy in its one-shot
// ignores a new start bit.
module tb_triad_decoder;
  import tmb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [NLY-1:0][NTRIAD-1:0] triad = '0, hcm = '1;
  logic [3:0] triad_persist = 4'd5;
  logic [NLY-1:0][NHS_CF-1:0] hs;
  logic [NLY-1:0][NTRIAD-1:0] ds;
  triad_decoder dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #(10 * 20000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [NLY-1:0][NTRIAD-1:0] sel_line, s_bit, h_bit;
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    for (int trial = 0; trial < 200; trial++) begin
      sel_line = '0;
      for (int i = 0; i < 6; i++) sel_line[$urandom % NLY][$urandom % NTRIAD] = 1'b1;
      s_bit = {NLY*NTRIAD{$urandom}} ^ 48'($urandom);
      h_bit = {NLY*NTRIAD{$urandom}} ^ 48'($urandom);
      hcm = (trial % 4 == 3) ? 48'($urandom) | 48'($urandom) : '1;
      triad_persist = 4'($urandom % 8);
      // clock 0: start, 1: strip, 2: 1/2-strip
      triad = sel_line;          @(negedge clk);
      triad = sel_line & s_bit;  @(negedge clk);
      triad = sel_line & h_bit;  @(negedge clk);
      triad = '0;
      // the start bit was applied 3 clocks ago; hits show from clock 4
      for (int c = 3; c < 20; c++) begin
        logic [NLY-1:0][NHS_CF-1:0] exp_hs;
        logic [NLY-1:0][NTRIAD-1:0] exp_ds;
        bit on;
        on = (c >= 4) && (c < 4 + int'(triad_persist) + 1);
        exp_hs = '0; exp_ds = '0;
        for (int l = 0; l < NLY; l++)
          for (int t = 0; t < NTRIAD; t++)
            if (on && sel_line[l][t] && hcm[l][t]) begin
              exp_hs[l][4*t + 2*s_bit[l][t] + h_bit[l][t]] = 1'b1;
              exp_ds[l][t] = 1'b1;
            end
        check(hs == exp_hs, $sformatf("trial %0d clock %0d 1/2-strips", trial, c));
        check(ds == exp_ds, $sformatf("trial %0d clock %0d di-strips", trial, c));
        @(negedge clk);
      end
    end
    // persistence 5 = 6 clocks of 25 ns = 150 ns; a start bit during the hold is ignored
    hcm = '1; triad_persist = 4'd5;
    triad[2][4] = 1; @(negedge clk); triad[2][4] = 1; @(negedge clk); triad[2][4] = 0; @(negedge clk);
    triad[2][4] = 1; @(negedge clk); triad[2][4] = 0;   // lands inside the hold
    begin
      int n;
      n = 0;
      for (int c = 0; c < 20; c++) begin
        if (hs[2][4*4 + 2]) n++;
        @(negedge clk);
      end
      check(n == 6, $sformatf("hold lasts 6 clocks (150 ns), saw %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
