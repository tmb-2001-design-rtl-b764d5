// tb_pattern_finder: checks the 1/2-strip pattern finder on 160 keys.
//
// Straight and bent six-layer tracks at known keys must give 6 layers and
// the expected pattern at the key; random sparse hit maps are compared key
// by key with a model that, for each pattern, counts the layers having any
// hit inside that layer's road (the road cells listed by the pattern
// envelope) and keeps the pattern with most layers, the higher pattern on a
// tie. pretrig and active_cfeb are checked against the threshold. The
// outputs are registered: they belong to the hits of the previous clock.
module tb_pattern_finder;
  import tmb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [NLY-1:0][NHS-1:0] hits = '0;
  pat_env_t env;
  logic [2:0] thresh = 3'd4;
  logic [NHS-1:0][2:0] key_nhit, key_pat;
  logic pretrig;
  logic [NCFEB-1:0] active_cfeb;
  assign env = default_env();
  pattern_finder #(.NKEY(NHS)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #(10 * 20000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic model(output logic [NHS-1:0][2:0] n_o, output logic [NHS-1:0][2:0] p_o);
    for (int k = 0; k < NHS; k++) begin
      int bn, bp;
      bn = 0; bp = 0;
      for (int p = 1; p <= NPAT; p++) begin
        int n;
        n = 0;
        for (int l = 0; l < NLY; l++) begin
          bit any;
          any = 0;
          for (int c = 0; c < NHS; c++)
            if (hits[l][c] && c - k + PAT_HW >= 0 && c - k + PAT_HW < PAT_W && env[p][l][c - k + PAT_HW])
              any = 1;
          n += any;
        end
        if (n > 0 && n >= bn) begin bn = n; bp = p; end
      end
      n_o[k] = 3'(bn); p_o[k] = 3'(bp);
    end
  endtask
  logic [NHS-1:0][2:0] en, ep;
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    // straight track at key 77
    hits = '0;
    for (int l = 0; l < NLY; l++) hits[l][77] = 1'b1;
    @(negedge clk);
    check(key_nhit[77] == 6 && key_pat[77] == 7, "straight track: 6 layers, pattern 7");
    check(pretrig && active_cfeb == 5'b00100, "straight track pre-triggers CFEB 2");
    // a track following pattern 1's road centre at key 100
    hits = '0;
    for (int l = 0; l < NLY; l++)
      for (int j = 0; j < PAT_W; j++)
        if (env[1][l][j] && (j == 0 || !env[1][l][j-1]) ) hits[l][100 + j - PAT_HW + 1] = 1'b1;
    @(negedge clk);
    check(key_nhit[100] == 6, "bent track: 6 layers at its key");
    // random sparse maps
    for (int trial = 0; trial < 40; trial++) begin
      for (int l = 0; l < NLY; l++) begin
        hits[l] = '0;
        for (int i = 0; i < 6; i++) hits[l][$urandom % NHS] = 1'b1;
      end
      thresh = 3'(1 + $urandom % 6);
      model(en, ep);
      @(negedge clk);
      begin
        bit pt; logic [NCFEB-1:0] af;
        pt = 0; af = '0;
        for (int k = 0; k < NHS; k++) begin
          check(key_nhit[k] == en[k] && key_pat[k] == ep[k],
                $sformatf("trial %0d key %0d: %0d/%0d expected %0d/%0d", trial, k, key_nhit[k], key_pat[k], en[k], ep[k]));
          if (en[k] >= thresh && en[k] != 0) begin pt = 1; af[k / 32] = 1; end
        end
        check(pretrig == pt, "pretrig");
        check(active_cfeb == af, "active CFEBs");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
