// ttc_decoder: TTC fast-command decoder and FMM trigger-state machine.
//
// The crate control board (CCB) broadcasts TTC commands on ccb_cmd with a
// strobe. This block decodes the six codes the TMB acts on from ccb_cmd[5:0]
// (bx0 = 01, l1reset = 03, start_trigger = 06, stop_trigger = 07,
// MPC inject = 24, tmb_bxreset = 32, all hex) into one-cycle pulses.
// A VME-driven generator can replace the backplane bus: when
// vme_ccb_cmd_enable is set the backplane command is disconnected and a
// rising edge of vme_ccb_cmd_strobe issues vme_ccb_cmd once. ccb_ignore_rx
// blocks backplane commands altogether.
//
// The FMM machine powers up in STOP (triggering halted) and needs a TTC
// start_trigger to run. stop_trigger returns it to STOP from any state.
// l1reset passes through RESYNC. Leaving STOP or RESYNC, the machine waits
// in WAITBX0 for the next bx0 and then enters RUN. trig_stop is high in
// every state but RUN. The codes and the machine's reaction to the four
// commands follow the board description; the WAITBX0/RESYNC states and the
// state encoding are this design's choice.
//
// Timing: inputs are registered once; pulses appear one cycle after the
// strobe, fmm_state changes on the same edge as the pulse.
module ttc_decoder
  import tmb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // backplane fast control bus
  input  logic [7:0] ccb_cmd,
  input  logic       ccb_cmd_strobe,
  input  logic       ccb_ignore_rx,
  // VME internal command generator (ADR_CCB_CMD)
  input  logic       vme_ccb_cmd_enable,
  input  logic       vme_ccb_cmd_strobe,
  input  logic [7:0] vme_ccb_cmd,
  // decoded pulses
  output logic       ttc_bx0,
  output logic       ttc_l1reset,
  output logic       ttc_start_trigger,
  output logic       ttc_stop_trigger,
  output logic       ttc_mpc_inject,
  output logic       ttc_bxreset,
  // state
  output fmm_state_e fmm_state,
  output logic       trig_stop
);

  logic       vme_strobe_q;
  logic [5:0] cmd;
  logic       strobe;

  // command source select; the VME strobe fires once per rising edge
  always_comb begin
    if (vme_ccb_cmd_enable) begin
      cmd    = vme_ccb_cmd[5:0];
      strobe = vme_ccb_cmd_strobe && !vme_strobe_q;
    end else begin
      cmd    = ccb_cmd[5:0];
      strobe = ccb_cmd_strobe && !ccb_ignore_rx;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vme_strobe_q      <= 1'b0;
      ttc_bx0           <= 1'b0;
      ttc_l1reset       <= 1'b0;
      ttc_start_trigger <= 1'b0;
      ttc_stop_trigger  <= 1'b0;
      ttc_mpc_inject    <= 1'b0;
      ttc_bxreset       <= 1'b0;
    end else begin
      vme_strobe_q      <= vme_ccb_cmd_strobe;
      ttc_bx0           <= strobe && (cmd == TTC_BX0);
      ttc_l1reset       <= strobe && (cmd == TTC_L1RESET);
      ttc_start_trigger <= strobe && (cmd == TTC_START_TRIG);
      ttc_stop_trigger  <= strobe && (cmd == TTC_STOP_TRIG);
      ttc_mpc_inject    <= strobe && (cmd == TTC_MPC_INJECT);
      ttc_bxreset       <= strobe && (cmd == TTC_BXRESET);
    end
  end

  // FMM machine, advanced by the decoded pulses
  always_ff @(posedge clk) begin
    if (rst) fmm_state <= FMM_STOP;
    else if (ttc_stop_trigger) fmm_state <= FMM_STOP;
    else if (ttc_l1reset) fmm_state <= FMM_RESYNC;
    else begin
      unique case (fmm_state)
        FMM_STOP:    if (ttc_start_trigger) fmm_state <= FMM_WAITBX0;
        FMM_RESYNC:  fmm_state <= FMM_WAITBX0;
        FMM_WAITBX0: if (ttc_bx0) fmm_state <= FMM_RUN;
        FMM_RUN:     ;
      endcase
    end
  end

  assign trig_stop = (fmm_state != FMM_RUN);

endmodule
