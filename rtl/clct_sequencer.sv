// clct_sequencer: CLCT pre-trigger and event sequencer.
//
// Watches the enabled trigger sources each clock: the CLCT pattern
// pre-trigger, the ALCT active-FEB flag, ALCT*CLCT (a CLCT pre-trigger while
// the ALCT active-FEB flag, delayed by alct_pre_trig_dly and stretched over
// alct_trig_width clocks, is high), and the external triggers from the ADB
// pulser, the DMB, the scintillator (clct_ext), the ALCT (alct_ext) and VME.
// Each external source first passes its own programmable delay.
//
// On a trigger the machine pre-triggers: it records the source vector, the
// active CFEB list and the bunch crossing, takes a free raw-hits buffer and
// starts the raw-hits write. With no free buffer and wr_buf_required set the
// event is discarded and counted. It then waits drift_delay clocks for the
// drift of the ionisation in the chamber, latches the two best CLCTs, and
// hands them to the TMB match. If the trigger came only from the CLCT
// pattern finder, valid_clct_required is set and the first CLCT is no longer
// valid, the event is an invalid pattern: it is counted, its buffer freed,
// and nothing is sent. External triggers always send their CLCTs, valid or
// not, so their raw hits get read out. After each event the flush timer
// holds the machine for flush_delay clocks. In stop_trigger the machine
// sits in STOP.
//
// Sources, delays, enables, drift delay, buffer requirement, valid-CLCT
// requirement, flush timer and discard counting are the board's. The state
// set and encoding, the counter widths and the single-event-at-a-time flow
// are this design's choices.
//
// Timing: pretrig pulses the clock after a source is seen; clct_trig follows
// drift_delay+2 clocks later. With a source held high, pre-triggers repeat
// every drift_delay + flush_delay + 4 clocks.
module clct_sequencer
  import tmb_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             trig_stop,
  // trigger sources
  input  logic             clct_pretrig,     // pattern finder, either 1/2 or di-strip
  input  logic             hs_pretrig,       // the 1/2-strip finder took part
  input  logic [NCFEB-1:0] clct_active_feb,
  input  logic             alct_active_feb,
  input  logic             adb_ext_trig,
  input  logic             dmb_ext_trig,
  input  logic             clct_ext_trig,
  input  logic             alct_ext_trig,
  input  logic             vme_ext_trig,
  // configuration
  input  logic [9:0]       trig_en,          // ADR_SEQ_TRIG_EN
  input  logic [3:0]       alct_trig_width,
  input  logic [3:0]       alct_pre_trig_dly,
  input  logic [3:0]       alct_pat_trig_dly,
  input  logic [3:0]       adb_ext_trig_dly,
  input  logic [3:0]       dmb_ext_trig_dly,
  input  logic [3:0]       clct_ext_trig_dly,
  input  logic [3:0]       alct_ext_trig_dly,
  input  logic [1:0]       drift_delay,
  input  logic [3:0]       flush_delay,
  input  logic             wr_buf_required,
  input  logic             valid_clct_required,
  // time
  input  logic [11:0]      bxn,
  input  logic             sync_err,
  input  logic [15:0]      now,
  // buffers
  input  logic             wr_buf_ready,
  input  logic [2:0]       wr_buf_adr,
  output logic             buf_alloc,
  output logic             buf_free,
  output logic [2:0]       buf_free_adr,
  // CLCTs from the resolver
  input  clct_t            clct0_in,
  input  clct_t            clct1_in,
  // to the TMB match
  output logic             pretrig,
  output logic             clct_trig,
  output clct_t            clct0,
  output clct_t            clct1,
  output logic             ev_has_buf,
  output logic [2:0]       ev_buf_adr,
  output logic [11:0]      ev_bxn,
  output logic [15:0]      ev_t0,
  output logic [7:0]       ev_trig_src,
  output logic [NCFEB-1:0] ev_active_feb,
  output logic             ev_hs_pretrig,
  // status
  output logic [2:0]       clct_sm,
  output logic             invp,
  output logic [11:0]      cnt_discard_nobuf,
  output logic [11:0]      cnt_discard_invp,
  output logic [11:0]      cnt_pretrig
);

  typedef enum logic [2:0] {S_STOP, S_IDLE, S_DRIFT, S_XTMB, S_FLUSH} sstate_e;
  sstate_e st;

  // delayed trigger sources
  logic alct_pat_d, adb_d, dmb_d, clct_ext_d, alct_ext_d, alct_pre_d;
  pulse_delay u_d0 (.clk, .rst, .din(alct_active_feb), .dly(alct_pat_trig_dly), .dout(alct_pat_d));
  pulse_delay u_d1 (.clk, .rst, .din(adb_ext_trig),    .dly(adb_ext_trig_dly),  .dout(adb_d));
  pulse_delay u_d2 (.clk, .rst, .din(dmb_ext_trig),    .dly(dmb_ext_trig_dly),  .dout(dmb_d));
  pulse_delay u_d3 (.clk, .rst, .din(clct_ext_trig),   .dly(clct_ext_trig_dly), .dout(clct_ext_d));
  pulse_delay u_d4 (.clk, .rst, .din(alct_ext_trig),   .dly(alct_ext_trig_dly), .dout(alct_ext_d));
  pulse_delay u_d5 (.clk, .rst, .din(alct_active_feb), .dly(alct_pre_trig_dly), .dout(alct_pre_d));

  // ALCT pre-trigger window for ALCT*CLCT triggers
  logic [3:0] awin_cnt;
  logic       awin;
  always_ff @(posedge clk) begin
    if (rst) awin_cnt <= '0;
    else if (alct_pre_d) awin_cnt <= alct_trig_width;
    else if (awin_cnt != 0) awin_cnt <= awin_cnt - 4'd1;
  end
  assign awin = alct_pre_d || (awin_cnt != 0);

  logic [7:0] src;
  always_comb begin
    src[0] = trig_en[0] && clct_pretrig;
    src[1] = trig_en[1] && alct_pat_d;
    src[2] = trig_en[2] && clct_pretrig && awin;
    src[3] = trig_en[3] && adb_d;
    src[4] = trig_en[4] && dmb_d;
    src[5] = trig_en[5] && clct_ext_d;
    src[6] = trig_en[6] && alct_ext_d;
    src[7] = trig_en[7] && vme_ext_trig;
  end

  logic [3:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_STOP; cnt <= '0;
      buf_alloc <= 1'b0; buf_free <= 1'b0; buf_free_adr <= '0;
      pretrig <= 1'b0; clct_trig <= 1'b0; clct0 <= '0; clct1 <= '0;
      ev_has_buf <= 1'b0; ev_buf_adr <= '0; ev_bxn <= '0; ev_t0 <= '0;
      ev_trig_src <= '0; ev_active_feb <= '0; ev_hs_pretrig <= 1'b0;
      invp <= 1'b0;
      cnt_discard_nobuf <= '0; cnt_discard_invp <= '0; cnt_pretrig <= '0;
    end else begin
      buf_alloc <= 1'b0; buf_free <= 1'b0; pretrig <= 1'b0; clct_trig <= 1'b0; invp <= 1'b0;
      unique case (st)
        S_STOP: if (!trig_stop) st <= S_IDLE;
        S_IDLE: begin
          if (trig_stop) st <= S_STOP;
          else if (src != 0) begin
            if (wr_buf_ready || !wr_buf_required) begin
              pretrig       <= 1'b1;
              cnt_pretrig   <= cnt_pretrig + 12'd1;
              buf_alloc     <= wr_buf_ready;
              ev_has_buf    <= wr_buf_ready;
              ev_buf_adr    <= wr_buf_adr;
              ev_bxn        <= bxn;
              ev_t0         <= now;
              ev_trig_src   <= src;
              ev_hs_pretrig <= hs_pretrig;
              ev_active_feb <= trig_en[9] ? {NCFEB{1'b1}} : clct_active_feb;
              cnt           <= {2'b0, drift_delay};
              st            <= S_DRIFT;
            end else begin
              cnt_discard_nobuf <= cnt_discard_nobuf + 12'd1;
              cnt <= flush_delay;
              st  <= S_FLUSH;
            end
          end
        end
        S_DRIFT: begin
          if (cnt == 0) st <= S_XTMB;
          else cnt <= cnt - 4'd1;
        end
        S_XTMB: begin
          clct0 <= clct0_in;
          clct1 <= clct1_in;
          clct0.bxn <= ev_bxn[1:0];
          clct1.bxn <= ev_bxn[1:0];
          clct0.sync_err <= sync_err;
          clct1.sync_err <= sync_err;
          clct0.bx0_local <= (ev_bxn == 0);
          clct1.bx0_local <= (ev_bxn == 0);
          if (valid_clct_required && !clct0_in.vpf && (ev_trig_src & 8'hFE) == 0) begin
            invp <= 1'b1;
            cnt_discard_invp <= cnt_discard_invp + 12'd1;
            buf_free     <= ev_has_buf;
            buf_free_adr <= ev_buf_adr;
          end else begin
            clct_trig <= 1'b1;
          end
          cnt <= flush_delay;
          st  <= S_FLUSH;
        end
        S_FLUSH: begin
          if (cnt == 0) st <= S_IDLE;
          else cnt <= cnt - 4'd1;
        end
        default: st <= S_STOP;
      endcase
    end
  end

  assign clct_sm = st;

endmodule
