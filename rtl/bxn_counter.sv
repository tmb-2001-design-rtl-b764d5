// bxn_counter: local bunch-crossing counter of the TMB.
//
// Counts LHC bunch crossings, one per 40 MHz clock, from 0 to lhc_cycle-1
// and wraps (lhc_cycle is 3564 for the LHC, 924 for the beam test). A TTC
// tmb_bxreset or bx0 presets the counter to bxn_offset. When a bx0 arrives
// while the counter would not have stepped to bxn_offset by itself,
// sync_err is set and held until the next l1reset or reset: the counter had
// drifted from the machine's orbit. bx0_local flags the crossings where the local counter reads zero.
// The wrap value, the offset preset and the two flags follow the board
// description; presetting on bx0 as well as on bxreset is this design's
// choice.
//
// Timing: bxn is a register; a preset pulse in cycle n gives bxn_offset in
// cycle n+1.
module bxn_counter #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ttc_bx0,
  input  logic         ttc_bxreset,
  input  logic         ttc_l1reset,
  input  logic [W-1:0] lhc_cycle,
  input  logic [W-1:0] bxn_offset,
  output logic [W-1:0] bxn,
  output logic         bx0_local,
  output logic         sync_err
);

  // where the counter would go without a BX0
  logic [W-1:0] bxn_step;
  assign bxn_step = (bxn >= lhc_cycle - W'(1)) ? '0 : bxn + W'(1);

  always_ff @(posedge clk) begin
    if (rst) begin
      bxn      <= bxn_offset;
      sync_err <= 1'b0;
    end else begin
      if (ttc_bx0 || ttc_bxreset) bxn <= bxn_offset;
      else bxn <= bxn_step;

      if (ttc_l1reset) sync_err <= 1'b0;
      else if (ttc_bx0 && (bxn_step != bxn_offset)) sync_err <= 1'b1;
    end
  end

  assign bx0_local = (bxn == '0);

endmodule
