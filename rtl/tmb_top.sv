// tmb_top: trigger motherboard core, from CFEB triads and ALCT LCTs to the
// MPC frames and the DMB readout.
//
// Data flow, one 40 MHz clock:
//  * Five CFEBs each send 6 layers x 8 triads. triad_decoder turns each
//    3-bit triad into a 1/2-strip hit and a di-strip hit held for
//    triad_persist+1 clocks, after the hot-channel mask.
//  * Two pattern_finders, one over the 160 1/2-strips and one over the 40
//    di-strips, count the layers hit at every key. Either one reaching its
//    threshold is a CLCT pre-trigger; clct_resolver keeps the best two CLCTs.
//  * clct_sequencer takes pre-triggers and external triggers, grabs a free
//    raw-hits buffer from buffer_manager, starts raw_hits_ram storing the
//    triads around the pre-trigger, waits the drift delay and passes the two
//    CLCTs to tmb_match.
//  * tmb_match looks for an ALCT in the CLCT's window and sends two LCTs to
//    the MPC, or rejects the event.
//  * A sent event's buffer is queued in l1a_window. An L1A in the window
//    pushes a readout request into l1a_stack, and dmb_readout sends the event
//    to the DMB. Events without an L1A, rejected events and readouts done
//    free their buffers.
//  * ttc_decoder and bxn_counter follow the CCB's commands and crossing
//    number; vme_interface holds all configuration with the board defaults.
//  * mpc_injector sends VME-loaded frames to the MPC in place of the
//    trigger path's, and records the MPC's replies.
//  * cfeb_injector can play VME-loaded triad patterns into the CFEB inputs
//    (ORed with the cables), and scope records 96 probe signals around a
//    pre-trigger for VME read-back.
//
// Interface: triads arrive already demultiplexed from the 80 MHz cables
// (each CFEB's 24 lines at 80 MHz carry 48 triad lines at 40 MHz);
// the cable multiplexing, the clock DLLs, delay chips and the LVDS/GTLP pads
// are outside this core. The ALCT LCTs arrive as alct_t words. The MPC gets
// two 16-bit frames per LCT, the DMB 16-bit frames with first/last flags.
// The ev_* outputs are one-clock pulses marking each trigger decision for
// monitoring.
//
// Following the board: the block set, the register defaults, the buffer
// count, the L1A window, the readout format. This design's choices: how the
// blocks hand events to each other, that an ALCT-only trigger has no raw-hits
// buffer to read, and that a second CLCT trigger arriving while tmb_match is
// still deciding the first is dropped and its buffer freed.
//
// Timing: a triad start bit reaches the pre-trigger 5 clocks later; the MPC
// frames follow the pre-trigger by drift_delay+3 clocks plus the ALCT wait.
module tmb_top
  import tmb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // CFEB triads (5 CFEBs x 6 layers x 8 triads)
  input  logic [NCFEB-1:0][NLY-1:0][NTRIAD-1:0] cfeb_triad,
  // ALCT
  input  alct_t       alct0,
  input  alct_t       alct1,
  input  logic        alct_active_feb,
  // CCB
  input  logic [7:0]  ccb_cmd,
  input  logic        ccb_cmd_strobe,
  input  logic        ccb_l1accept,
  input  logic        adb_ext_trig,
  input  logic        dmb_ext_trig,
  input  logic        clct_ext_trig,
  input  logic        alct_ext_trig,
  output logic        tmb_l1a_request,
  // MPC
  output logic        mpc_tx,
  output logic [15:0] mpc0_frame0,
  output logic [15:0] mpc0_frame1,
  output logic [15:0] mpc1_frame0,
  output logic [15:0] mpc1_frame1,
  input  logic [1:0]  mpc_accept_in,
  // DMB
  output logic        dmb_wr,
  output logic [15:0] dmb_data,
  output logic        dmb_first,
  output logic        dmb_last,
  // VME
  input  logic        vme_req,
  input  logic        vme_write,
  input  logic [23:1] vme_adr,
  input  logic [5:0]  vme_am,
  input  logic [15:0] vme_wdata,
  input  logic [4:0]  ga,
  output logic        vme_ack,
  output logic [15:0] vme_rdata,
  // monitoring pulses
  output logic        ev_pretrig,
  output logic        ev_discard_nobuf,
  output logic        ev_invalid_pattern,
  output logic        ev_match,
  output logic        ev_clct_only,
  output logic        ev_alct_only,
  output logic        ev_tmb_reject,
  output logic        ev_l1a_in_window,
  output logic        ev_l1a_only,
  output logic        ev_nol1a,
  output logic        ev_readout_done,
  output logic [11:0] bxn,
  output logic [1:0]  fmm_state,
  output logic        inj_busy     // CFEB pattern injector playing
);

  // ---------------- configuration ----------------
  logic [NCFEB-1:0][NLY-1:0][NTRIAD-1:0] hcm;
  logic [NCFEB-1:0] mask_all;
  logic [NCFEB-1:0] inj_febsel, injector_mask;
  logic             scp_runstop, scp_force_trig, scp_waiting, scp_trig_done;
  logic [2:0]       scp_ram_sel;
  logic [7:0]       scp_radr;
  logic [15:0]      scp_rdata;
  logic [7:0]       mpc_nframes, mpc_adr;
  logic             mpc_inject, ttc_mpc_inj_en, mpc_wr;
  logic [3:0]       mpc_wen, mpc_ren, mpc_acc_rdata;
  logic [15:0]      mpc_wdata, mpc_rdata;
  logic             inj_trig_vme, inj_wr;
  logic [2:0]       inj_wen, inj_ren;
  logic [7:0]       inj_rwadr;
  logic [15:0]      inj_wdata, inj_rdata;
  logic [9:0]  seq_trig_en;
  logic [3:0]  alct_trig_width, alct_pre_trig_dly, alct_pat_trig_dly;
  logic [3:0]  adb_dly, dmb_dly, clct_ext_dly, alct_ext_dly;
  logic [4:0]  board_id;
  logic [3:0]  csc_id, run_id, triad_persist;
  logic [2:0]  hs_thresh, ds_thresh, nph_pattern;
  logic [1:0]  drift_delay;
  logic [2:0]  fifo_mode;
  logic [4:0]  fifo_tbins, fifo_pretrig;
  logic [7:0]  l1a_delay;
  logic [3:0]  l1a_window_cfg, l1a_offset;
  logic        l1a_internal;
  logic [11:0] bxn_offset, lhc_cycle;
  logic [1:0]  sync_err_en;
  logic        allow_alct, allow_clct, allow_match;
  logic [3:0]  mpc_delay, flush_delay, alct_delay, clct_width;
  logic        ccb_ignore_rx, seq_trig_l1aen;
  logic        vme_ccb_cmd_enable, vme_ccb_cmd_strobe;
  logic [7:0]  vme_ccb_cmd;
  logic        wr_buf_required, valid_clct_required, l1a_allow_nol1a;
  logic [15:0] led_reg;

  // status wires used by the register file
  clct_t       seq_clct0, seq_clct1;
  logic [7:0]  ev_trig_src;
  logic [7:0]  buf_busy;
  logic [3:0]  buf_nbusy, buf_nbusy_peak;
  logic [2:0]  clct_sm;
  logic [4:0]  read_sm;
  logic [1:0]  mpc_accept;
  logic        accept_done;
  fmm_state_e  fmm;

  vme_interface u_vme (
    .clk, .rst,
    .vme_req, .vme_write, .vme_adr, .vme_am, .vme_wdata, .ga, .vme_ack, .vme_rdata,
    .alct0_rcd(alct0), .alct1_rcd(alct1), .ccb_cmd_in(ccb_cmd), .fmm_state(fmm),
    .seq_clct0, .seq_clct1, .seq_trig_src(ev_trig_src),
    .buf_busy, .buf_nbusy, .buf_nbusy_peak, .clct_sm, .tmb_sm(3'd0), .read_sm,
    .mpc_accept, .mpc0_frame0, .mpc0_frame1, .mpc1_frame0, .mpc1_frame1,
    .inj_rdata, .inj_febsel, .injector_mask, .inj_trig_vme, .inj_wen, .inj_ren, .inj_rwadr,
    .inj_wdata, .inj_wr,
    .mpc_rdata, .mpc_acc_rdata, .mpc_nframes, .mpc_inject, .ttc_mpc_inj_en, .mpc_wen, .mpc_ren,
    .mpc_adr, .mpc_wdata, .mpc_wr,
    .scp_waiting, .scp_trig_done, .scp_rdata, .scp_runstop, .scp_force_trig, .scp_ram_sel, .scp_radr,
    .hcm, .mask_all, .seq_trig_en, .alct_trig_width, .alct_pre_trig_dly, .alct_pat_trig_dly,
    .adb_ext_trig_dly(adb_dly), .dmb_ext_trig_dly(dmb_dly),
    .clct_ext_trig_dly(clct_ext_dly), .alct_ext_trig_dly(alct_ext_dly),
    .board_id, .csc_id, .run_id, .triad_persist, .hs_thresh, .ds_thresh, .nph_pattern,
    .drift_delay, .fifo_mode, .fifo_tbins, .fifo_pretrig, .l1a_delay,
    .l1a_window(l1a_window_cfg), .l1a_internal, .l1a_offset, .bxn_offset,
    .tmb_sync_err_en(sync_err_en), .tmb_allow_alct(allow_alct), .tmb_allow_clct(allow_clct),
    .tmb_allow_match(allow_match), .mpc_delay, .ccb_ignore_rx, .seq_trig_l1aen,
    .vme_ccb_cmd_enable, .vme_ccb_cmd_strobe, .vme_ccb_cmd,
    .clct_flush_delay(flush_delay), .wr_buf_required, .valid_clct_required, .l1a_allow_nol1a,
    .alct_delay, .clct_width, .lhc_cycle, .led_reg
  );

  // ---------------- CCB commands and crossing counter ----------------
  logic ttc_bx0, ttc_l1reset, ttc_start, ttc_stop, ttc_inject, ttc_bxreset, trig_stop;
  logic bx0_local, sync_err;

  ttc_decoder u_ttc (
    .clk, .rst, .ccb_cmd, .ccb_cmd_strobe, .ccb_ignore_rx,
    .vme_ccb_cmd_enable, .vme_ccb_cmd_strobe, .vme_ccb_cmd,
    .ttc_bx0, .ttc_l1reset, .ttc_start_trigger(ttc_start), .ttc_stop_trigger(ttc_stop),
    .ttc_mpc_inject(ttc_inject), .ttc_bxreset, .fmm_state(fmm), .trig_stop
  );
  assign fmm_state = fmm;

  bxn_counter u_bxn (
    .clk, .rst, .ttc_bx0, .ttc_bxreset, .ttc_l1reset, .lhc_cycle, .bxn_offset,
    .bxn, .bx0_local, .sync_err
  );

  // ---------------- triads to hits ----------------
  logic [NCFEB-1:0][NLY-1:0][NHS_CF-1:0] hs_cf;
  logic [NCFEB-1:0][NLY-1:0][NTRIAD-1:0] ds_cf;
  logic [NLY-1:0][NHS-1:0] hs_hits;
  logic [NLY-1:0][NDS-1:0] ds_hits;

  // CFEB pattern injector: started by a rising edge of the VME start bit,
  // or by clct_ext_trig when SEQ_TRIG_EN bit 8 routes it here
  logic inj_trig_vme_q, inj_start;
  logic [NCFEB-1:0][NLY-1:0][NTRIAD-1:0] inj_triad, triad_in;
  always_ff @(posedge clk) begin
    if (rst) inj_trig_vme_q <= 1'b0;
    else     inj_trig_vme_q <= inj_trig_vme;
  end
  assign inj_start = (inj_trig_vme && !inj_trig_vme_q) || (clct_ext_trig && seq_trig_en[8]);

  cfeb_injector u_inj (
    .clk, .rst, .inj_febsel, .injector_mask, .inj_wen, .inj_ren, .inj_adr(inj_rwadr),
    .inj_wdata, .inj_wr, .inj_rdata, .inj_start, .busy(inj_busy), .inj_triad
  );

  for (genvar c = 0; c < NCFEB; c++) begin : g_cfeb
    assign triad_in[c] = (mask_all[c] ? cfeb_triad[c] : '0) | inj_triad[c];
    triad_decoder u_triad (
      .clk, .rst,
      .triad(triad_in[c]),
      .hcm(hcm[c]), .triad_persist,
      .hs(hs_cf[c]), .ds(ds_cf[c])
    );
    for (genvar l = 0; l < NLY; l++) begin : g_ly
      assign hs_hits[l][c*NHS_CF +: NHS_CF] = hs_cf[c][l];
      assign ds_hits[l][c*NTRIAD +: NTRIAD] = ds_cf[c][l];
    end
  end

  // ---------------- pattern finding ----------------
  logic [NHS-1:0][2:0] hs_nhit, hs_pat;
  logic [NDS-1:0][2:0] ds_nhit, ds_pat;
  logic hs_pretrig, ds_pretrig;
  logic [NCFEB-1:0] hs_afeb, ds_afeb;

  pattern_finder #(.NKEY(NHS)) u_pf_hs (
    .clk, .rst, .hits(hs_hits), .env(default_env()), .thresh(hs_thresh),
    .key_nhit(hs_nhit), .key_pat(hs_pat), .pretrig(hs_pretrig), .active_cfeb(hs_afeb)
  );
  pattern_finder #(.NKEY(NDS)) u_pf_ds (
    .clk, .rst, .hits(ds_hits), .env(default_env()), .thresh(ds_thresh),
    .key_nhit(ds_nhit), .key_pat(ds_pat), .pretrig(ds_pretrig), .active_cfeb(ds_afeb)
  );

  clct_t res_clct0, res_clct1;
  clct_resolver u_res (
    .clk, .rst, .hs_nhit, .hs_pat, .ds_nhit, .ds_pat, .nph_pattern,
    .clct0(res_clct0), .clct1(res_clct1)
  );

  // ---------------- sequencer and buffers ----------------
  logic        wr_buf_ready, buf_alloc;
  logic [2:0]  wr_buf_adr;
  logic        seq_free, win_free, rdo_free, rej_free;
  logic [2:0]  seq_free_adr, win_free_adr, rdo_free_adr, rej_free_adr;
  logic [7:0]  free_mask;
  logic        b_empty, b_half, b_full1, b_full, b_ovf;
  logic [3:0]  nbusy4, npeak4;
  logic [15:0] now;
  logic        pretrig, clct_trig, invp, ev_has_buf, ev_hs_pretrig;
  logic [2:0]  ev_buf_adr;
  logic [11:0] ev_bxn;
  logic [15:0] ev_t0;
  logic [NCFEB-1:0] ev_active_feb;
  logic [11:0] cnt_nobuf, cnt_invp, cnt_pretrig;
  logic        vme_trig_q, vme_ext_trig;

  always_ff @(posedge clk) begin
    if (rst) vme_trig_q <= 1'b0;
    else     vme_trig_q <= seq_trig_en[7];
  end
  assign vme_ext_trig = seq_trig_en[7] && !vme_trig_q;

  clct_sequencer u_seq (
    .clk, .rst, .trig_stop,
    .clct_pretrig(hs_pretrig || ds_pretrig), .hs_pretrig,
    .clct_active_feb(hs_afeb | ds_afeb), .alct_active_feb,
    .adb_ext_trig, .dmb_ext_trig, .clct_ext_trig(clct_ext_trig && !seq_trig_en[8]), .alct_ext_trig, .vme_ext_trig,
    .trig_en(seq_trig_en), .alct_trig_width, .alct_pre_trig_dly, .alct_pat_trig_dly,
    .adb_ext_trig_dly(adb_dly), .dmb_ext_trig_dly(dmb_dly),
    .clct_ext_trig_dly(clct_ext_dly), .alct_ext_trig_dly(alct_ext_dly),
    .drift_delay, .flush_delay, .wr_buf_required, .valid_clct_required,
    .bxn, .sync_err, .now,
    .wr_buf_ready, .wr_buf_adr, .buf_alloc, .buf_free(seq_free), .buf_free_adr(seq_free_adr),
    .clct0_in(res_clct0), .clct1_in(res_clct1),
    .pretrig, .clct_trig, .clct0(seq_clct0), .clct1(seq_clct1),
    .ev_has_buf, .ev_buf_adr, .ev_bxn, .ev_t0, .ev_trig_src, .ev_active_feb, .ev_hs_pretrig,
    .clct_sm, .invp, .cnt_discard_nobuf(cnt_nobuf), .cnt_discard_invp(cnt_invp),
    .cnt_pretrig
  );

  always_comb begin
    free_mask = '0;
    if (seq_free) free_mask[seq_free_adr] = 1'b1;
    if (win_free) free_mask[win_free_adr] = 1'b1;
    if (rdo_free) free_mask[rdo_free_adr] = 1'b1;
    if (rej_free) free_mask[rej_free_adr] = 1'b1;
  end

  buffer_manager #(.NBUF(NBUF)) u_buf (
    .clk, .rst, .alloc(buf_alloc), .free_mask,
    .wr_buf_ready, .wr_buf_adr, .busy(buf_busy), .nbusy(nbusy4), .nbusy_peak(npeak4),
    .buf_empty(b_empty), .buf_half(b_half), .buf_full1(b_full1), .buf_full(b_full),
    .buf_ovf(b_ovf)
  );
  assign buf_nbusy      = nbusy4;
  assign buf_nbusy_peak = npeak4;

  // raw hits: the triads as received, one 240-bit sample per clock
  logic [RAW_W-1:0] raw_din, raw_rdata;
  logic [7:0]       raw_adr;
  logic             raw_busy;

  // The triads are delayed by the pre-trigger latency before they are
  // stored, so that time bin fifo_pretrig holds the clock in which the
  // triggering triads' start bits arrived.
  localparam int unsigned RAW_DLY = 6;
  logic [RAW_DLY-1:0][RAW_W-1:0] raw_pipe;

  always_ff @(posedge clk) begin
    if (rst) raw_pipe <= '0;
    else     raw_pipe <= {raw_pipe[RAW_DLY-2:0], triad_in};
  end
  assign raw_din = raw_pipe[RAW_DLY-1];

  raw_hits_ram #(.W(RAW_W), .NBUF(NBUF), .TBW(5)) u_raw (
    .clk, .rst, .din(raw_din), .fifo_pretrig, .fifo_tbins,
    .start(buf_alloc), .start_buf(wr_buf_adr), .busy(raw_busy),
    .rd_adr(raw_adr), .rdata(raw_rdata)
  );

  // ---------------- TMB match ----------------
  logic tm_tx;
  logic [3:0][15:0] tm_f;
  logic tmb_done, tmb_trig, tmb_reject, tmb_match_o, tmb_alct_only, tmb_clct_only;
  logic [3:0] match_time;
  alct_t alct0_match, alct1_match;

  tmb_match u_tmb (
    .clk, .rst, .alct0_in(alct0), .alct1_in(alct1),
    .clct_trig, .clct0(seq_clct0), .clct1(seq_clct1),
    .alct_delay, .clct_width, .allow_alct, .allow_clct, .allow_match, .sync_err_en,
    .csc_id, .mpc_delay, .mpc_accept_in,
    .tmb_done, .tmb_trig, .tmb_reject, .tmb_match_o, .tmb_alct_only, .tmb_clct_only,
    .match_time, .alct0_match, .alct1_match,
    .mpc_tx(tm_tx), .mpc0_frame0(tm_f[0]), .mpc0_frame1(tm_f[1]), .mpc1_frame0(tm_f[2]),
    .mpc1_frame1(tm_f[3]),
    .accept_done, .mpc_accept
  );

  // MPC test-pattern injector: its frames replace the trigger path's while
  // it sends. Started by a rising edge of the VME inject bit, or by the TTC
  // MPC-inject command when enabled.
  logic mpc_inject_q, mpc_inj_start, mpc_inj_tx, mpc_inj_busy;
  logic [3:0][15:0] mpc_inj_f;
  always_ff @(posedge clk) begin
    if (rst) mpc_inject_q <= 1'b0;
    else     mpc_inject_q <= mpc_inject;
  end
  assign mpc_inj_start = (mpc_inject && !mpc_inject_q) || (ttc_inject && ttc_mpc_inj_en);

  mpc_injector u_mpc_inj (
    .clk, .rst, .nframes(mpc_nframes), .start(mpc_inj_start), .mpc_delay,
    .wen(mpc_wen), .ren(mpc_ren), .adr(mpc_adr), .wdata(mpc_wdata), .wr(mpc_wr),
    .rdata(mpc_rdata), .acc_rdata(mpc_acc_rdata), .mpc_reply({2'b00, mpc_accept_in}),
    .busy(mpc_inj_busy), .tx(mpc_inj_tx), .frames(mpc_inj_f)
  );

  assign mpc_tx      = tm_tx || mpc_inj_tx;
  assign mpc0_frame0 = mpc_inj_tx ? mpc_inj_f[0] : tm_f[0];
  assign mpc0_frame1 = mpc_inj_tx ? mpc_inj_f[1] : tm_f[1];
  assign mpc1_frame0 = mpc_inj_tx ? mpc_inj_f[2] : tm_f[2];
  assign mpc1_frame1 = mpc_inj_tx ? mpc_inj_f[3] : tm_f[3];

  // event waiting for the TMB decision
  logic        pend;
  logic        p_has_buf, p_hs_pretrig;
  logic [2:0]  p_buf;
  logic [11:0] p_bxn;
  logic [15:0] p_t0;
  logic [7:0]  p_src;
  logic [NCFEB-1:0] p_afeb;
  clct_t       p_c0, p_c1;
  logic        clct_done, l1a_push;
  event_rec_t  rec_in, rec_q;
  logic        rec_wr, rec_upd;
  logic [2:0]  rec_buf, rec_q_buf;

  assign clct_done = tmb_done && !tmb_alct_only && pend;
  assign l1a_push  = clct_done && tmb_trig && p_has_buf;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend <= 1'b0; p_has_buf <= 1'b0; p_hs_pretrig <= 1'b0; p_buf <= '0; p_bxn <= '0;
      p_t0 <= '0; p_src <= '0; p_afeb <= '0; p_c0 <= '0; p_c1 <= '0;
      rej_free <= 1'b0; rej_free_adr <= '0;
      rec_q <= '0; rec_upd <= 1'b0;
    end else begin
      rej_free <= 1'b0;
      if (clct_done) begin
        pend <= 1'b0;
        if (tmb_reject && p_has_buf) begin
          rej_free     <= 1'b1;
          rej_free_adr <= p_buf;
        end
      end
      if (clct_trig) begin
        if (pend && !clct_done) begin
          // tmb_match is busy: this event cannot be decided, release its buffer
          rej_free     <= ev_has_buf;
          rej_free_adr <= ev_buf_adr;
        end else begin
          pend <= 1'b1; p_has_buf <= ev_has_buf; p_hs_pretrig <= ev_hs_pretrig;
          p_buf <= ev_buf_adr; p_bxn <= ev_bxn; p_t0 <= ev_t0; p_src <= ev_trig_src;
          p_afeb <= ev_active_feb; p_c0 <= seq_clct0; p_c1 <= seq_clct1;
        end
      end
      if (l1a_push) begin
        rec_q   <= rec_in;
        rec_upd <= 1'b1;
      end
      if (accept_done) rec_upd <= 1'b0;
    end
  end

  always_comb begin
    rec_in = '0;
    rec_in.clct0           = p_c0;
    rec_in.clct1           = p_c1;
    rec_in.bxn_pretrig     = p_bxn;
    rec_in.trig_src        = p_src;
    rec_in.active_feb      = p_afeb;
    rec_in.hs_pretrig      = p_hs_pretrig;
    rec_in.invalid_pattern = 1'b0;
    rec_in.tmb_match       = tmb_match_o;
    rec_in.alct_only       = tmb_alct_only;
    rec_in.clct_only       = tmb_clct_only;
    rec_in.match_time      = match_time;
    rec_in.mpc0_frame0     = tm_f[0];
    rec_in.mpc0_frame1     = tm_f[1];
    rec_in.mpc1_frame0     = tm_f[2];
    rec_in.mpc1_frame1     = tm_f[3];
    rec_in.mpc_accept      = 2'b00;
    rec_in.tbin_pretrig    = fifo_pretrig;
    if (!l1a_push) begin
      rec_in            = rec_q;
      rec_in.mpc_accept = mpc_accept;
    end
  end

  // the MPC accept bits arrive mpc_delay clocks after the frames and are
  // written into the stored record when they are latched

  assign rec_wr  = l1a_push || (accept_done && rec_upd);
  assign rec_buf = l1a_push ? p_buf : rec_q_buf;

  always_ff @(posedge clk) begin
    if (rst) rec_q_buf <= '0;
    else if (l1a_push) rec_q_buf <= p_buf;
  end

  // ---------------- L1A ----------------
  logic       rdo_push;
  rdo_desc_t  rdo_desc, stk_dout;
  logic       l1a_pulse, l1a_in_win, nol1a, queue_full;
  logic [3:0] l1a_rx_cnt, l1a_tx_cnt;
  logic       stk_empty, stk_full, stk_ovf, stk_pop;
  logic [4:0] stk_count;

  assign tmb_l1a_request = tmb_trig && seq_trig_l1aen;

  l1a_window #(.NQ(NBUF)) u_l1a (
    .clk, .rst, .ttc_l1reset,
    .ev_push(l1a_push), .ev_t0(p_t0), .ev_buf_adr(p_buf),
    .ccb_l1accept, .l1a_delay, .l1a_win(l1a_window_cfg), .l1a_internal, .l1a_allow_nol1a,
    .l1a_offset, .l1a_request(tmb_l1a_request), .bxn,
    .now, .rdo_push, .rdo_desc, .buf_free(win_free), .buf_free_adr(win_free_adr),
    .l1a_pulse, .l1a_in_window(l1a_in_win), .nol1a, .l1a_rx_cnt, .l1a_tx_cnt, .queue_full
  );

  l1a_stack #(.W($bits(rdo_desc_t)), .DEPTH(16)) u_stk (
    .clk, .rst, .push(rdo_push), .din(rdo_desc), .pop(stk_pop), .dout(stk_dout),
    .empty(stk_empty), .full(stk_full), .count(stk_count), .ovf(stk_ovf)
  );

  // ---------------- DMB readout ----------------
  logic rdo_busy;
  logic [3:0] cnt_tmbrej;

  dmb_readout u_rdo (
    .clk, .rst, .stk_empty, .stk_dout, .stk_pop,
    .rec_wr, .rec_buf, .rec_in,
    .raw_adr, .raw_rdata,
    .fifo_mode, .fifo_tbins, .fifo_pretrig, .board_id, .csc_id, .run_id,
    .cfeb_exists({NCFEB{1'b1}}), .hs_thresh, .ds_thresh, .triad_persist,
    .revcode(14'h0000),
    .buf_nbusy(nbusy4), .buf_busy, .buf_flags({b_empty, b_half, b_full1, b_full, b_ovf}),
    .wr_buf_adr, .wr_buf_ready,
    .cnt_nobuf(cnt_nobuf[3:0]), .cnt_invp(cnt_invp[3:0]), .cnt_tmbrej(cnt_tmbrej),
    .l1a_tx_cnt, .sync_err,
    .dmb_wr, .dmb_data, .dmb_first, .dmb_last, .busy(rdo_busy),
    .buf_free(rdo_free), .buf_free_adr(rdo_free_adr), .read_sm
  );

  always_ff @(posedge clk) begin
    if (rst) cnt_tmbrej <= '0;
    else if (tmb_reject) cnt_tmbrej <= cnt_tmbrej + 4'd1;
  end

  // ---------------- logic-analyzer scope ----------------
  // Channels follow the board's scope channel list; signals this core does
  // not have (ALCT pre-trigger window, DMB data-available mux and the like)
  // read as 0.
  logic [95:0] scp_probe;
  always_comb begin
    scp_probe = '0;
    scp_probe[0]     = pretrig;                 // sequencer pretrig
    scp_probe[1]     = |ev_active_feb;          // active_feb flag
    scp_probe[2]     = hs_pretrig || ds_pretrig;// any CFEB over threshold
    scp_probe[3]     = hs_pretrig;              // 1/2-strip (1) or di-strip pre-trigger
    scp_probe[4]     = !wr_buf_ready;           // write buffer busy
    scp_probe[5]     = wr_buf_ready;
    scp_probe[6]     = clct_ext_trig;
    scp_probe[7]     = alct_active_feb;
    scp_probe[9]     = seq_clct0.vpf;
    scp_probe[11]    = tmb_reject;
    scp_probe[12]    = ev_discard_nobuf;
    scp_probe[13]    = invp;
    scp_probe[14]    = tmb_reject;
    scp_probe[18:16] = seq_clct0.nhit;
    scp_probe[19]    = seq_clct0.hsds;
    scp_probe[22:20] = seq_clct1.nhit;
    scp_probe[23]    = seq_clct1.hsds;
    scp_probe[24]    = clct_trig;               // latch CLCT0
    scp_probe[25]    = clct_trig;               // latch CLCT1
    scp_probe[26]    = alct0.vpf;
    scp_probe[27]    = alct1.vpf;
    scp_probe[32]    = pretrig;
    scp_probe[33]    = mpc_tx;
    scp_probe[35]    = mpc_accept[0];
    scp_probe[36]    = mpc_accept[1];
    scp_probe[37]    = l1a_pulse;
    scp_probe[40]    = dmb_wr;                  // DMB readout busy
    scp_probe[43:41] = hs_thresh;
    scp_probe[46:44] = ds_thresh;
    scp_probe[48]    = pretrig;
    scp_probe[49]    = valid_clct_required;
    scp_probe[53:50] = nbusy4;
    scp_probe[62:59] = l1a_rx_cnt;
    scp_probe[64]    = pretrig;
    scp_probe[76:65] = bxn;
    scp_probe[95:80] = dmb_wr ? dmb_data : 16'h0000;
  end

  scope u_scope (
    .clk, .rst, .probe(scp_probe), .runstop(scp_runstop), .force_trig(scp_force_trig),
    .ram_sel(scp_ram_sel), .radr(scp_radr), .waiting(scp_waiting), .trig_done(scp_trig_done),
    .rdata(scp_rdata)
  );

  // ---------------- monitoring ----------------
  assign ev_pretrig         = pretrig;
  assign ev_invalid_pattern = invp;
  assign ev_match           = tmb_done && tmb_match_o;
  assign ev_clct_only       = tmb_done && tmb_clct_only;
  assign ev_alct_only       = tmb_done && tmb_alct_only;
  assign ev_tmb_reject      = tmb_reject;
  assign ev_l1a_in_window   = l1a_pulse && l1a_in_win;
  assign ev_l1a_only        = l1a_pulse && !l1a_in_win;
  assign ev_nol1a           = nol1a;
  assign ev_readout_done    = dmb_wr && dmb_last;

  logic [11:0] nobuf_q;
  always_ff @(posedge clk) begin
    if (rst) nobuf_q <= '0;
    else     nobuf_q <= cnt_nobuf;
  end
  assign ev_discard_nobuf = (cnt_nobuf != nobuf_q);

endmodule
