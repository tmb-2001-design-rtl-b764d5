// triad_decoder: comparator-triad decoder for one CFEB (6 layers x 8 triads).
//
// Each CFEB reports a hit on a di-strip (two cathode strips, four 1/2-strips)
// as a serial "triad" on one line per di-strip: a start bit (1), then one bit
// choosing the strip of the pair, then one bit choosing the 1/2-strip of
// that strip. The decoder turns the triad into a hit on one of 32 1/2-strips
// per layer and holds it for triad_persist+1 clocks (a one-shot), which sets
// the time over which the six layers may coincide for a pattern (5 = 150 ns).
// Di-strip hits are the OR of the four 1/2-strips of the di-strip. While a
// one-shot is active its line is ignored. A di-strip whose hot-channel-mask
// bit is 0 never starts.
//
// The persistence register, its 150 ns example and the per-di-strip hot
// channel mask are the board's; the three-bit triad format (start, strip,
// 1/2-strip, one bit per 25 ns clock after the 80 MHz inputs are
// demultiplexed) is the front-end board's usual format and an assumption.
//
// Timing: start bit registered in cycle n, strip bit n+1, 1/2-strip bit
// n+2; the hit is visible from cycle n+3 for triad_persist+1 cycles.
module triad_decoder
  import tmb_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NLY-1:0][NTRIAD-1:0] triad,     // one line per layer, di-strip
  input  logic [NLY-1:0][NTRIAD-1:0] hcm,       // 1 = di-strip enabled
  input  logic [3:0]             triad_persist,
  output logic [NLY-1:0][NHS_CF-1:0] hs,        // 1/2-strip hits
  output logic [NLY-1:0][NTRIAD-1:0] ds         // di-strip hits
);

  typedef enum logic [1:0] {T_IDLE, T_STRIP, T_HS, T_HOLD} tstate_e;

  logic [NLY-1:0][NTRIAD-1:0] triad_q;

  always_ff @(posedge clk) begin
    if (rst) triad_q <= '0;
    else     triad_q <= triad;
  end

  for (genvar ly = 0; ly < NLY; ly++) begin : g_ly
    for (genvar t = 0; t < NTRIAD; t++) begin : g_tr
      tstate_e    st;
      logic       strip_bit;
      logic [1:0] sel;
      logic [3:0] cnt;

      always_ff @(posedge clk) begin
        if (rst) begin
          st        <= T_IDLE;
          strip_bit <= 1'b0;
          sel       <= '0;
          cnt       <= '0;
        end else begin
          unique case (st)
            T_IDLE:  if (triad_q[ly][t] && hcm[ly][t]) st <= T_STRIP;
            T_STRIP: begin strip_bit <= triad_q[ly][t]; st <= T_HS; end
            T_HS: begin
              sel <= {strip_bit, triad_q[ly][t]};
              cnt <= triad_persist;
              st  <= T_HOLD;
            end
            T_HOLD: if (cnt == 0) st <= T_IDLE; else cnt <= cnt - 4'd1;
          endcase
        end
      end

      always_comb begin
        for (int h = 0; h < 4; h++)
          hs[ly][4*t+h] = (st == T_HOLD) && (sel == 2'(h));
        ds[ly][t] = (st == T_HOLD);
      end
    end
  end

endmodule
