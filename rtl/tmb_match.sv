// tmb_match: ALCT*CLCT coincidence and MPC frame builder.
//
// Anode LCTs from the ALCT board arrive each clock and are delayed by
// alct_delay clocks so that they line up with the slower cathode path. When
// the sequencer presents a CLCT (clct_trig), a coincidence window of
// clct_width clocks opens. The first delayed ALCT with its valid flag set
// inside the window makes a match, and the window position where it fell is
// recorded (match_time) for off-line timing statistics. If the window closes
// without an ALCT the event is CLCT-only. A valid ALCT that arrives with no
// window open is ALCT-only. The decision is then filtered by the allow bits:
// a match passes if allow_match, a CLCT-only if allow_clct, an ALCT-only if
// allow_alct; anything else is a TMB reject.
//
// A passing event is sent to the MPC as two LCTs of two 16-bit frames each,
// in the ADR_MPC0/1_FRAME0/1 layout: frame0 = {vpf, quality[3:0], 1/2-strip
// flag, pattern[2:0], ALCT key wire group}, frame1 = {csc_id, bx0_local,
// ALCT bxn[0], sync_err, bend, CLCT key 1/2-strip 0..159}. mpc_delay clocks
// after the frames go out, the MPC's accept bits are latched.
//
// The delay, window, allow bits, frame layout and accept delay are the
// board's. The LCT quality code, {match, ALCT quality[1:0], 1/2-strip flag},
// and the way the second LCT borrows the first muon's ALCT or CLCT when only
// one second muon exists are this design's choices.
//
// Timing: a match is reported (tmb_done) the clock after the ALCT is seen in
// the window; a CLCT-only event the clock after the window ends. Frames
// change with mpc_tx; mpc_accept is valid from accept_done.
module tmb_match
  import tmb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // ALCT board
  input  alct_t       alct0_in,
  input  alct_t       alct1_in,
  // sequencer
  input  logic        clct_trig,
  input  clct_t       clct0,
  input  clct_t       clct1,
  // configuration
  input  logic [3:0]  alct_delay,
  input  logic [3:0]  clct_width,
  input  logic        allow_alct,
  input  logic        allow_clct,
  input  logic        allow_match,
  input  logic [1:0]  sync_err_en,
  input  logic [3:0]  csc_id,
  input  logic [3:0]  mpc_delay,
  // MPC
  input  logic [1:0]  mpc_accept_in,
  // decision
  output logic        tmb_done,       // one pulse per decided event
  output logic        tmb_trig,       // event passed and was sent to the MPC
  output logic        tmb_reject,     // event failed the allow bits
  output logic        tmb_match_o,
  output logic        tmb_alct_only,
  output logic        tmb_clct_only,
  output logic [3:0]  match_time,
  output alct_t       alct0_match,
  output alct_t       alct1_match,
  // MPC frames
  output logic        mpc_tx,
  output logic [15:0] mpc0_frame0,
  output logic [15:0] mpc0_frame1,
  output logic [15:0] mpc1_frame0,
  output logic [15:0] mpc1_frame1,
  output logic        accept_done,
  output logic [1:0]  mpc_accept
);

  // ALCT delay line
  alct_t [15:0] a0_sr, a1_sr;
  alct_t        a0_d, a1_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      a0_sr <= '0;
      a1_sr <= '0;
    end else begin
      a0_sr <= {a0_sr[14:0], alct0_in};
      a1_sr <= {a1_sr[14:0], alct1_in};
    end
  end

  assign a0_d = (alct_delay == 0) ? alct0_in : a0_sr[alct_delay - 4'd1];
  assign a1_d = (alct_delay == 0) ? alct1_in : a1_sr[alct_delay - 4'd1];

  // coincidence window
  logic        win_open;
  logic [3:0]  win_pos;
  clct_t       c0_q, c1_q;

  function automatic logic [15:0] frame0(input logic vpf, input logic [3:0] q,
                                         input clct_t c, input alct_t a);
    return {vpf, q, c.hsds, c.pat, a.key};
  endfunction

  function automatic logic [15:0] frame1(input clct_t c, input alct_t a, input logic serr,
                                         input logic [3:0] id);
    logic [7:0] k;
    k = 8'(c.cfeb) * 8'd32 + 8'(c.key);
    return {id, c.bx0_local, a.bxn[0], serr, c.bend, k};
  endfunction

  task automatic send(input logic is_match, input logic is_aonly, input clct_t c0, input clct_t c1,
                      input alct_t a0, input alct_t a1);
    clct_t cs;
    alct_t as;
    logic [3:0] q0, q1;
    logic v1;
    cs = c1.vpf ? c1 : c0;
    as = a1.vpf ? a1 : a0;
    q0 = {is_match, a0.quality, c0.hsds};
    q1 = {is_match, as.quality, cs.hsds};
    v1 = c1.vpf || (is_match && a1.vpf);
    mpc0_frame0 <= frame0(is_aonly ? a0.vpf : c0.vpf, q0, c0, a0);
    mpc0_frame1 <= frame1(c0, a0, c0.sync_err & sync_err_en[0], csc_id);
    mpc1_frame0 <= frame0(is_aonly ? a1.vpf : v1, q1, cs, as);
    mpc1_frame1 <= frame1(cs, as, cs.sync_err & sync_err_en[1], csc_id);
  endtask

  logic [3:0] acc_cnt;
  logic       acc_wait;

  always_ff @(posedge clk) begin
    if (rst) begin
      win_open <= 1'b0; win_pos <= '0; c0_q <= '0; c1_q <= '0;
      tmb_done <= 1'b0; tmb_trig <= 1'b0; tmb_reject <= 1'b0;
      tmb_match_o <= 1'b0; tmb_alct_only <= 1'b0; tmb_clct_only <= 1'b0;
      match_time <= '0; alct0_match <= '0; alct1_match <= '0;
      mpc_tx <= 1'b0;
      mpc0_frame0 <= '0; mpc0_frame1 <= '0; mpc1_frame0 <= '0; mpc1_frame1 <= '0;
    end else begin
      tmb_done <= 1'b0; tmb_trig <= 1'b0; tmb_reject <= 1'b0; mpc_tx <= 1'b0;
      if (!win_open) begin
        if (clct_trig) begin
          win_open <= 1'b1;
          win_pos  <= '0;
          c0_q     <= clct0;
          c1_q     <= clct1;
          // an ALCT in the same clock as the CLCT sits at window position 0
          if (a0_d.vpf && clct_width != 0) begin
            win_open <= 1'b0;
            tmb_done <= 1'b1; tmb_match_o <= 1'b1; tmb_alct_only <= 1'b0; tmb_clct_only <= 1'b0;
            match_time <= '0; alct0_match <= a0_d; alct1_match <= a1_d;
            if (allow_match) begin
              tmb_trig <= 1'b1; mpc_tx <= 1'b1;
              send(1'b1, 1'b0, clct0, clct1, a0_d, a1_d);
            end else tmb_reject <= 1'b1;
          end else if (clct_width <= 1) begin
            win_open <= 1'b0;
            tmb_done <= 1'b1; tmb_match_o <= 1'b0; tmb_alct_only <= 1'b0; tmb_clct_only <= 1'b1;
            match_time <= '0; alct0_match <= '0; alct1_match <= '0;
            if (allow_clct) begin
              tmb_trig <= 1'b1; mpc_tx <= 1'b1;
              send(1'b0, 1'b0, clct0, clct1, '0, '0);
            end else tmb_reject <= 1'b1;
          end
        end else if (a0_d.vpf) begin
          tmb_done <= 1'b1; tmb_match_o <= 1'b0; tmb_alct_only <= 1'b1; tmb_clct_only <= 1'b0;
          match_time <= '0; alct0_match <= a0_d; alct1_match <= a1_d;
          if (allow_alct) begin
            tmb_trig <= 1'b1; mpc_tx <= 1'b1;
            send(1'b0, 1'b1, '0, '0, a0_d, a1_d);
          end else tmb_reject <= 1'b1;
        end
      end else begin
        logic [3:0] pos;
        pos = win_pos + 4'd1;
        win_pos <= pos;
        if (a0_d.vpf) begin
          win_open <= 1'b0;
          tmb_done <= 1'b1; tmb_match_o <= 1'b1; tmb_alct_only <= 1'b0; tmb_clct_only <= 1'b0;
          match_time <= pos; alct0_match <= a0_d; alct1_match <= a1_d;
          if (allow_match) begin
            tmb_trig <= 1'b1; mpc_tx <= 1'b1;
            send(1'b1, 1'b0, c0_q, c1_q, a0_d, a1_d);
          end else tmb_reject <= 1'b1;
        end else if (pos >= clct_width - 4'd1) begin
          win_open <= 1'b0;
          tmb_done <= 1'b1; tmb_match_o <= 1'b0; tmb_alct_only <= 1'b0; tmb_clct_only <= 1'b1;
          match_time <= '0; alct0_match <= '0; alct1_match <= '0;
          if (allow_clct) begin
            tmb_trig <= 1'b1; mpc_tx <= 1'b1;
            send(1'b0, 1'b0, c0_q, c1_q, '0, '0);
          end else tmb_reject <= 1'b1;
        end
      end
    end
  end

  // MPC accept, latched mpc_delay clocks after the frames were sent
  always_ff @(posedge clk) begin
    if (rst) begin
      acc_wait <= 1'b0; acc_cnt <= '0; accept_done <= 1'b0; mpc_accept <= '0;
    end else begin
      accept_done <= 1'b0;
      if (mpc_tx) begin
        acc_wait <= 1'b1;
        acc_cnt  <= mpc_delay;
        if (mpc_delay == 0) begin
          acc_wait <= 1'b0; accept_done <= 1'b1; mpc_accept <= mpc_accept_in;
        end
      end else if (acc_wait) begin
        if (acc_cnt == 4'd1) begin
          acc_wait <= 1'b0; accept_done <= 1'b1; mpc_accept <= mpc_accept_in;
        end
        acc_cnt <= acc_cnt - 4'd1;
      end
    end
  end

endmodule
