// pattern_finder: bend-pattern search over every key column of the chamber.
//
// For each key (a 1/2-strip, or a di-strip when instantiated on di-strip
// hits) and each of the 7 programmable bend patterns, a layer counts as hit
// when any of its hits falls inside that pattern's envelope for the layer.
// The envelope is a window of PAT_W cells centred on the key, so each
// pattern is a road through the six layers. The number of hit layers (0..6)
// is the pattern's score; each key keeps its best pattern (more layers wins,
// a tie goes to the higher pattern number). A key whose score reaches
// `thresh` pre-triggers; the CFEBs holding such keys are flagged active.
//
// Seven programmable patterns, programmable envelopes, 0..6 hits and the
// pre-trigger thresholds are the board's; the window width, the tie rule and
// the per-CFEB active flag rule are this design's choices.
//
// Timing: one register stage; results describe the hits of the previous
// cycle.
module pattern_finder
  import tmb_pkg::*;
#(
  parameter int unsigned NKEY = NHS   // 160 1/2-strip keys or 40 di-strip keys
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [NLY-1:0][NKEY-1:0]     hits,
  input  pat_env_t                     env,
  input  logic [2:0]                   thresh,
  output logic [NKEY-1:0][2:0]         key_nhit,
  output logic [NKEY-1:0][2:0]         key_pat,
  output logic                         pretrig,
  output logic [NCFEB-1:0]             active_cfeb
);

  localparam int unsigned KPC = NKEY / NCFEB; // keys per CFEB

  logic [NKEY-1:0][2:0] nhit_c, pat_c;

  for (genvar k = 0; k < NKEY; k++) begin : g_key
    // hits seen through the window centred on key k (zero beyond the edges)
    logic [NLY-1:0][PAT_W-1:0] win;
    for (genvar ly = 0; ly < NLY; ly++) begin : g_ly
      for (genvar j = 0; j < PAT_W; j++) begin : g_j
        if (k + j >= PAT_HW && k + j - PAT_HW < NKEY) begin : g_in
          assign win[ly][j] = hits[ly][k + j - PAT_HW];
        end else begin : g_out
          assign win[ly][j] = 1'b0;
        end
      end
    end

    always_comb begin
      logic [2:0] best_n, best_p, n;
      best_n = '0;
      best_p = '0;
      for (int p = 1; p <= NPAT; p++) begin
        n = '0;
        for (int ly = 0; ly < NLY; ly++)
          n = n + 3'(|(win[ly] & env[p][ly]));
        if (n != 0 && n >= best_n) begin
          best_n = n;
          best_p = 3'(p);
        end
      end
      nhit_c[k] = best_n;
      pat_c[k]  = best_p;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      key_nhit    <= '0;
      key_pat     <= '0;
      pretrig     <= 1'b0;
      active_cfeb <= '0;
    end else begin
      key_nhit <= nhit_c;
      key_pat  <= pat_c;
      pretrig  <= 1'b0;
      active_cfeb <= '0;
      for (int k = 0; k < NKEY; k++)
        if (nhit_c[k] >= thresh && nhit_c[k] != 0) begin
          pretrig <= 1'b1;
          active_cfeb[k / KPC] <= 1'b1;
        end
    end
  end

endmodule
