// tb_clct_resolver: checks the selection of the two best CLCTs.
//
// Random sparse pattern-finder results on the 160 1/2-strip and 40 di-strip
// keys are ranked here by (layers hit, 1/2-strip over di-strip, pattern
// number), the lowest key winning ties. The best is CLCT0; CLCT1 is the best
// whose key (di-strip key d counts as 1/2-strip 4d) is more than 5
// 1/2-strips from CLCT0. The bench checks key, CFEB, pattern, bend, layer
// count, type and the valid flag against nph_pattern, one clock after the
// inputs.
module tb_clct_resolver;
  import tmb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [NHS-1:0][2:0] hs_nhit = '0, hs_pat = '0;
  logic [NDS-1:0][2:0] ds_nhit = '0, ds_pat = '0;
  logic [2:0] nph_pattern = 3'd4;
  clct_t clct0, clct1;
  clct_resolver #(.SEP(5)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #(10 * 20000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // candidate i: 0..159 1/2-strip, 160..199 di-strip
  function automatic int score(input int i);
    if (i < NHS) return hs_nhit[i] == 0 ? 0 : hs_nhit[i] * 16 + 8 + hs_pat[i];
    return ds_nhit[i-NHS] == 0 ? 0 : ds_nhit[i-NHS] * 16 + ds_pat[i-NHS];
  endfunction
  function automatic int keyof(input int i);
    return i < NHS ? i : 4 * (i - NHS);
  endfunction
  task automatic expect_clct(input clct_t c, input int i, input string tag);
    int s, k;
    s = score(i); k = keyof(i);
    check(c.key == 5'(k % 32) && c.cfeb == 3'(k / 32), $sformatf("%s key %0d expected %0d", tag, c.cfeb*32+c.key, k));
    check(c.nhit == 3'(s / 16) && c.hsds == s[3] && c.pat == 3'(s % 8) && c.bend == s[0], {tag, " pattern fields"});
    check(c.vpf == (s / 16 >= nph_pattern), {tag, " valid flag"});
  endtask
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int trial = 0; trial < 300; trial++) begin
      int b0, b1, s0, s1;
      hs_nhit = '0; hs_pat = '0; ds_nhit = '0; ds_pat = '0;
      for (int j = 0; j < 1 + $urandom % 6; j++) begin
        int k;
        k = $urandom % NHS;
        hs_nhit[k] = 3'(1 + $urandom % 6); hs_pat[k] = 3'(1 + $urandom % 7);
      end
      for (int j = 0; j < $urandom % 3; j++) begin
        int k;
        k = $urandom % NDS;
        ds_nhit[k] = 3'(1 + $urandom % 6); ds_pat[k] = 3'(1 + $urandom % 7);
      end
      nph_pattern = 3'(1 + $urandom % 6);
      b0 = -1; s0 = 0;
      for (int i = 0; i < NHS + NDS; i++) if (score(i) > s0) begin s0 = score(i); b0 = i; end
      b1 = -1; s1 = 0;
      for (int i = 0; i < NHS + NDS; i++) begin
        int dk;
        dk = keyof(i) - keyof(b0); if (dk < 0) dk = -dk;
        if (score(i) > s1 && dk > 5) begin s1 = score(i); b1 = i; end
      end
      @(negedge clk);
      if (b0 >= 0) expect_clct(clct0, b0, "clct0"); else check(clct0 == '0, "no clct0");
      if (b1 >= 0) expect_clct(clct1, b1, "clct1"); else check(clct1 == '0, "no clct1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
