// tb_tmb_top: end-to-end test of the trigger motherboard core at its
// default configuration (no parameter overrides).
//
// The bench plays CCB, ALCT, CFEBs, MPC, DMB and VME master around tmb_top:
//  1. resets, checks the power-up register values over VME, then sends the
//     CCB commands start-trigger and BX0 and expects the FMM state to reach
//     RUN;
//  2. sends a straight six-layer muon on CFEB 1 with an ALCT one clock into
//     the CLCT window, and an L1A at the first clock of the L1A window
//     (l1a_delay = 128 clocks after the pre-trigger). It expects a match,
//     MPC frames carrying the right key, pattern and ALCT key, and a full
//     readout of 28 + 6*5*7 frames rounded up to a multiple of 4 (240), with
//     the CRC and word count recomputed here and the muon's triads found in
//     the raw hits;
//  3. sends an L1A with no event queued: an L1A-only short record of 8 frames;
//  4. sends a muon with no ALCT and no L1A: a CLCT-only trigger whose window
//     expires (no-L1A) and frees its buffer;
//  5. sends an ALCT alone: ALCT-only, rejected since ALCT-only triggers are
//     disabled by default;
//  6. raises the pattern requirement over VME to 6 layers and sends a
//     4-layer muon: it pre-triggers but is an invalid pattern;
//  7. sends ten muons in quick succession: eight take the eight buffers, the
//     rest are discarded for lack of a buffer;
//  8. switches the readout to header-only mode over VME and reads one event
//     out: 28 frames;
//  9. sends a CCB stop-trigger and expects the FMM to leave RUN.
// Every mechanism is counted from the monitoring pulses; one that never
// happened counts as a failure. A watchdog ends the run.
module tb_tmb_top;
  import tmb_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #12.5 clk = ~clk;

  logic [NCFEB-1:0][NLY-1:0][NTRIAD-1:0] cfeb_triad;
  alct_t alct0, alct1;
  logic alct_active_feb;
  logic [7:0] ccb_cmd;
  logic ccb_cmd_strobe, ccb_l1accept;
  logic adb_ext_trig, dmb_ext_trig, clct_ext_trig, alct_ext_trig, tmb_l1a_request;
  logic mpc_tx;
  logic [15:0] mpc0_frame0, mpc0_frame1, mpc1_frame0, mpc1_frame1;
  logic [1:0] mpc_accept_in;
  logic dmb_wr, dmb_first, dmb_last;
  logic [15:0] dmb_data;
  logic vme_req, vme_write, vme_ack;
  logic [23:1] vme_adr;
  logic [5:0] vme_am;
  logic [15:0] vme_wdata, vme_rdata;
  logic [4:0] ga;
  logic ev_pretrig, ev_discard_nobuf, ev_invalid_pattern, ev_match, ev_clct_only;
  logic ev_alct_only, ev_tmb_reject, ev_l1a_in_window, ev_l1a_only, ev_nol1a, ev_readout_done;
  logic [11:0] bxn;
  logic [1:0] fmm_state;
  logic inj_busy;

  tmb_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ---- mechanism counters ----
  int n_pretrig = 0, n_nobuf = 0, n_invp = 0, n_match = 0, n_conly = 0, n_aonly = 0, n_reject = 0;
  int n_l1a_win = 0, n_l1a_only = 0, n_nol1a = 0, n_readout = 0, n_pad = 0, n_fmm_run = 0, n_mpc = 0;
  int pretrig_cyc = 0, n_inj = 0, n_scope = 0, n_mpc_inj = 0;
  logic inj_busy_q;
  always @(posedge clk) begin
    inj_busy_q <= inj_busy;
    if (!rst && inj_busy && !inj_busy_q) n_inj++;
  end
  always @(posedge clk) if (!rst) begin
    if (ev_pretrig) begin n_pretrig++; pretrig_cyc = cyc; end
    if (ev_discard_nobuf)   n_nobuf++;
    if (ev_invalid_pattern) n_invp++;
    if (ev_match)           n_match++;
    if (ev_clct_only)       n_conly++;
    if (ev_alct_only)       n_aonly++;
    if (ev_tmb_reject)      n_reject++;
    if (ev_l1a_in_window)   n_l1a_win++;
    if (ev_l1a_only)        n_l1a_only++;
    if (ev_nol1a)           n_nol1a++;
    if (ev_readout_done)    n_readout++;
    if (mpc_tx)             n_mpc++;
    if (fmm_state == 2'd3)  n_fmm_run++;
  end

  // ---- DMB capture ----
  logic [15:0] frames [$];
  logic [15:0] ev_frames [$];
  bit          ev_ready;
  always @(posedge clk) if (!rst && dmb_wr) begin
    if (dmb_first && dmb_data == 16'h6B0C) frames = {};
    frames.push_back(dmb_data);
    if (dmb_last) begin
      ev_frames = frames;
      ev_ready  = 1'b1;
    end
  end

  // reference CRC: x^22 + x + 1, 16 bits per frame, least significant first
  function automatic logic [21:0] ref_crc(input logic [15:0] f [$], input int n);
    logic [21:0] c = '0;
    for (int k = 0; k < n; k++)
      for (int i = 0; i < 16; i++) begin
        logic fb;
        fb = c[21] ^ f[k][i];
        c  = {c[20:0], 1'b0};
        if (fb) c = c ^ 22'h3;
      end
    return c;
  endfunction

  // check the framing of a finished record; returns its length
  task automatic check_record(input int exp_len, input logic [11:0] eof_code, input string tag);
    int n;
    logic [21:0] c;
    n = ev_frames.size();
    check(n == exp_len, $sformatf("%s: %0d frames, expected %0d", tag, n, exp_len));
    if (n < 8) return;
    check(ev_frames[0] == 16'h6B0C, {tag, ": first frame 6B0C"});
    c = ref_crc(ev_frames, n - 4);
    check(ev_frames[n-4] == {5'b11011, c[10:0]},  {tag, ": CRC low half"});
    check(ev_frames[n-3] == {5'b11011, c[21:11]}, {tag, ": CRC high half"});
    check(ev_frames[n-2] == {4'b1101, eof_code},  {tag, ": end-of-frame marker"});
    check(ev_frames[n-1] == {5'b11011, 11'(n)},   {tag, ": word count"});
    check(n % 4 == 0 || exp_len == 8, {tag, ": multiple of 4"});
  endtask

  task automatic wait_record(input int max_cycles);
    int t = 0;
    while (!ev_ready && t < max_cycles) begin @(posedge clk); t++; end
    check(ev_ready, "a readout record arrived");
  endtask

  // ---- stimulus helpers ----
  task automatic tick(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic vme_cycle(input bit wr, input logic [7:0] adr, input logic [15:0] wd,
                           output logic [15:0] rd);
    @(negedge clk);
    vme_req = 1'b1; vme_write = wr; vme_adr = {ga, 11'b0, adr[7:1]}; vme_am = 6'h39;
    vme_wdata = wd;
    @(negedge clk);
    vme_req = 1'b0;
    check(vme_ack, $sformatf("VME acknowledge at %02h", adr));
    rd = vme_rdata;
  endtask

  task automatic vme_wr(input logic [7:0] adr, input logic [15:0] wd);
    logic [15:0] dummy;
    vme_cycle(1'b1, adr, wd, dummy);
  endtask

  task automatic vme_rd(input logic [7:0] adr, output logic [15:0] rd);
    vme_cycle(1'b0, adr, 16'h0, rd);
  endtask

  task automatic ccb(input logic [7:0] cmd);
    @(negedge clk);
    ccb_cmd = cmd; ccb_cmd_strobe = 1'b1;
    @(negedge clk);
    ccb_cmd_strobe = 1'b0; ccb_cmd = 8'h0;
  endtask

  // one muon: triad start bit, strip bit, 1/2-strip bit on the given layers
  task automatic muon(input int c, input int t, input bit s, input bit h, input logic [5:0] layers);
    @(negedge clk);
    for (int l = 0; l < NLY; l++) cfeb_triad[c][l][t] = layers[l];
    @(negedge clk);
    for (int l = 0; l < NLY; l++) cfeb_triad[c][l][t] = layers[l] & s;
    @(negedge clk);
    for (int l = 0; l < NLY; l++) cfeb_triad[c][l][t] = layers[l] & h;
    @(negedge clk);
    cfeb_triad = '0;
  endtask

  task automatic wait_pretrig(input int max_cycles, output bit seen);
    int t = 0;
    seen = 1'b0;
    while (t < max_cycles) begin
      @(posedge clk);
      #1;
      if (ev_pretrig) begin seen = 1'b1; return; end
      t++;
    end
  endtask

  initial begin
    #(25ns * 60000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rd;
    bit seen;
    int t_pre;
    int exp_key;
    cfeb_triad = '0; alct0 = '0; alct1 = '0; alct_active_feb = 1'b0;
    ccb_cmd = '0; ccb_cmd_strobe = 1'b0; ccb_l1accept = 1'b0;
    adb_ext_trig = 1'b0; dmb_ext_trig = 1'b0; clct_ext_trig = 1'b0; alct_ext_trig = 1'b0;
    mpc_accept_in = 2'b00;
    vme_req = 1'b0; vme_write = 1'b0; vme_adr = '0; vme_am = '0; vme_wdata = '0;
    ga = 5'd6;
    ev_ready = 1'b0;
    tick(5);
    rst = 1'b0;
    tick(5);

    // ---- 1: registers and run control ----
    vme_rd(8'h70, rd); check(rd == 16'h5245, "SEQ_CLCT default (persist 5, thresholds 4, drift 2)");
    vme_rd(8'h72, rd); check(rd == 16'h0239, "SEQ_FIFO default (mode 1, 7 tbins, pretrig 2)");
    vme_rd(8'h74, rd); check(rd[7:0] == 8'd128 && rd[11:8] == 4'd3, "L1A delay 128, window 3");
    vme_rd(8'hB4, rd); check(rd == 16'd3564, "LHC cycle 3564");
    vme_rd(8'h00, rd); check(rd[12:8] == ga, "geographic address in ID register");
    check(fmm_state == 2'd0, "FMM in stop after reset");
    ccb(8'h06);
    tick(3);
    check(fmm_state == 2'd2, "FMM waits for BX0 after start");
    ccb(8'h01);
    tick(3);
    check(fmm_state == 2'd3, "FMM runs after BX0");
    tick(20);

    // ---- 2: matched muon with L1A in window, full readout ----
    muon(1, 3, 1'b1, 1'b0, 6'b111111);
    wait_pretrig(20, seen);
    check(seen, "pre-trigger on a six-layer muon");
    t_pre = cyc;
    // the CLCT reaches the match window 4 clocks after the pre-trigger; the
    // ALCT, delayed 1 clock inside the TMB, lands one clock into the window
    tick(3);
    @(negedge clk);
    alct0 = '{bxn: 2'd0, key: 7'd77, amu: 1'b0, quality: 2'd3, vpf: 1'b1};
    alct1 = '0;
    @(negedge clk);
    alct0 = '0;
    tick(10);
    check(n_mpc == 1, "LCTs sent to the MPC");
    exp_key = 1 * 32 + 4 * 3 + 2 - 1;  // lowest key whose straight road covers the hits
    check(mpc0_frame1[7:0] == 8'(exp_key), $sformatf("MPC key %0d, expected %0d", mpc0_frame1[7:0], exp_key));
    check(mpc0_frame0[15] == 1'b1, "MPC LCT0 valid");
    check(mpc0_frame0[9:7] == 3'd7, "MPC straight pattern");
    check(mpc0_frame0[6:0] == 7'd77, "MPC ALCT key");
    check(mpc0_frame0[14] == 1'b1, "MPC quality has the match bit");
    check(mpc0_frame1[15:12] == 4'd5, "MPC CSC id 5");
    // L1A at the first clock of the window: 128 clocks after the trigger
    // source was seen, which is one clock before the pre-trigger pulse
    while (cyc < t_pre + 126) @(posedge clk);
    @(negedge clk); ccb_l1accept = 1'b1;
    @(negedge clk); ccb_l1accept = 1'b0;
    ev_ready = 1'b0;
    wait_record(2000);
    check_record(240, 12'hE0F, "full readout");
    if (ev_frames.size() == 240) begin
      int hits_found = 0, hits_wrong = 0;
      check(ev_frames[22] == 16'h6E0B, "6E0B after the header");
      check(ev_frames[233] == 16'h6E0C, "6E0C after the raw hits");
      check(ev_frames[234] == 16'h2AAA && ev_frames[235] == 16'h5555, "padding pair");
      if (ev_frames[234] == 16'h2AAA) n_pad++;
      for (int k = 23; k < 233; k++) begin
        int c, tb, ly;
        c  = (k - 23) / 42; tb = ((k - 23) % 42) / 6; ly = (k - 23) % 6;
        check(ev_frames[k][14:12] == 3'(c) && ev_frames[k][11:8] == 4'(tb),
              $sformatf("raw frame %0d labels cfeb %0d tbin %0d", k, c, tb));
        if (c == 1 && (tb == 2 || tb == 3) && ev_frames[k][7:0] == 8'h08) hits_found++;
        else if (ev_frames[k][7:0] != 0) hits_wrong++;
      end
      // start bit and strip bit: two clocks of each of the six layers
      check(hits_found == 12, $sformatf("muon triads in raw hits: %0d of 12", hits_found));
      check(hits_wrong == 0, "no stray raw hits");
      check(ev_frames[2][14:13] == 2'd0, "L1A type 0 (in window)");
      check(ev_frames[11][0] == 1'b1, "header records the match");
    end
    tick(50);

    // ---- 3: L1A with nothing in its window ----
    ev_ready = 1'b0;
    @(negedge clk); ccb_l1accept = 1'b1;
    @(negedge clk); ccb_l1accept = 1'b0;
    wait_record(200);
    check_record(8, 12'hEEF, "L1A-only short record");
    if (ev_frames.size() == 8) check(ev_frames[2][14:13] == 2'd2, "L1A type 2 (no event)");
    tick(20);

    // ---- 4: CLCT-only, no L1A ----
    muon(3, 5, 1'b0, 1'b1, 6'b111111);
    wait_pretrig(20, seen);
    check(seen, "pre-trigger for the CLCT-only muon");
    tick(300);
    check(dut.u_buf.nbusy == 0, "all buffers free after the window closed");

    // ---- 5: ALCT alone ----
    @(negedge clk);
    alct0 = '{bxn: 2'd1, key: 7'd10, amu: 1'b0, quality: 2'd1, vpf: 1'b1};
    @(negedge clk);
    alct0 = '0;
    tick(10);

    // ---- 6: invalid pattern ----
    vme_wr(8'h70, 16'h5A45);     // pattern requirement 6 layers
    muon(2, 1, 1'b1, 1'b1, 6'b001111);
    wait_pretrig(20, seen);
    check(seen, "four-layer muon still pre-triggers");
    tick(20);
    check(n_invp == 1, "four-layer muon is an invalid pattern");
    vme_wr(8'h70, 16'h5245);
    tick(20);

    // ---- 7: buffers run out ----
    for (int i = 0; i < 10; i++) begin
      muon(i % 5, i % 8, 1'b0, 1'b0, 6'b111111);
      tick(12);
    end
    tick(20);
    check(n_nobuf >= 1, "pre-triggers discarded for lack of a buffer");
    tick(300);
    check(dut.u_buf.nbusy == 0, "buffers recovered after the L1A windows");

    // ---- 8: header-only readout ----
    vme_wr(8'h72, 16'h0238);     // mode 0
    muon(0, 2, 1'b1, 1'b0, 6'b111111);
    wait_pretrig(20, seen);
    t_pre = cyc;
    while (cyc < t_pre + 127) @(posedge clk);
    ev_ready = 1'b0;
    @(negedge clk); ccb_l1accept = 1'b1;
    @(negedge clk); ccb_l1accept = 1'b0;
    wait_record(500);
    check_record(28, 12'hE0F, "header-only readout");
    vme_wr(8'h72, 16'h0239);

    // ---- 8b: CFEB pattern injector ----
    // clear every injector RAM word, then load one six-layer muon on CFEB 2,
    // di-strip 3, strip 1, 1/2-strip 1 (triad bits in time bins 10..12)
    vme_wr(8'h42, 16'h7C1F | (16'h1F << 5));
    for (int a = 0; a < 256; a++) begin
      vme_wr(8'h44, 16'((a << 6) | 7));
      vme_wr(8'h46, 16'h0000);
    end
    vme_wr(8'h42, 16'h7C1F | (16'h04 << 5));
    for (int a = 10; a < 13; a++) begin
      vme_wr(8'h44, 16'((a << 6) | 7));
      vme_wr(8'h46, 16'h0808);
    end
    begin
      logic [15:0] rd;
      vme_wr(8'h44, 16'((11 << 6) | (1 << 3)));
      tick(2);
      vme_rd(8'h48, rd);
      check(rd == 16'h0808, "injector RAM read back");
      vme_wr(8'h44, 16'((20 << 6) | (4 << 3)));
      tick(2);
      vme_rd(8'h48, rd);
      check(rd == 16'h0000, "injector RAM cleared word");
    end
    begin
      int t_start;
      vme_wr(8'h98, 16'h0001);                   // arm the scope
      vme_wr(8'h42, 16'hFC1F | (16'h04 << 5));   // start
      t_start = cyc;
      wait_pretrig(300, seen);
      check(seen, "injected muon pre-triggers");
      check(cyc - t_start >= 10 && cyc - t_start < 40, $sformatf("injected pre-trigger time %0d", cyc - t_start));
      check(inj_busy, "injector still playing at pre-trigger");
      vme_wr(8'h42, 16'h7C1F);
      tick(600);
      check(!inj_busy, "injector playback finished");
      check(dut.u_buf.nbusy == 0, "buffers free after the injected event");
      // the scope triggered on that pre-trigger: sample 16 has it, sample 15 not
      begin
        logic [15:0] rd;
        vme_rd(8'h98, rd);
        check(rd[7] && !rd[6], "scope triggered and done");
        if (rd[7]) n_scope++;
        vme_wr(8'h98, 16'h1001);
        tick(2);
        vme_rd(8'h9A, rd);
        check(rd[0], "scope channel 0 set at the trigger sample");
        vme_wr(8'h98, 16'h0F01);
        tick(2);
        vme_rd(8'h9A, rd);
        check(!rd[0], "scope channel 0 clear before the trigger");
        vme_wr(8'h98, 16'h1011);               // bank 4: channel 64 is the pre-trigger too
        tick(2);
        vme_rd(8'h9A, rd);
        check(rd[0], "scope channel 64 set at the trigger sample");
        vme_wr(8'h98, 16'h0000);
        vme_rd(8'h98, rd);
        check(!rd[7] && !rd[6], "scope stopped");
      end
    end

    // ---- 8c: MPC injector, started by the TTC MPC-inject command ----
    for (int a = 0; a < 5; a++)
      for (int f = 0; f < 4; f++) begin
        vme_wr(8'h92, 16'((a << 8) | (1 << f)));
        vme_wr(8'h94, 16'(16'hA000 | (a << 4) | f));
      end
    vme_wr(8'h92, 16'h0000);
    begin
      int n_tx0, t0;
      n_tx0 = n_mpc;
      ccb(8'h24);
      t0 = cyc;
      do begin @(posedge clk); #1; end while (!mpc_tx && cyc < t0 + 20);
      check(mpc_tx && mpc0_frame0 == 16'hA000 && mpc0_frame1 == 16'hA001 &&
            mpc1_frame0 == 16'hA002 && mpc1_frame1 == 16'hA003, "first injected MPC frames");
      tick(30);
      check(n_mpc - n_tx0 == 5, $sformatf("five injected MPC frame sets (%0d)", n_mpc - n_tx0));
      if (n_mpc - n_tx0 == 5) n_mpc_inj++;
    end

    // ---- 9: stop ----
    ccb(8'h07);
    tick(3);
    check(fmm_state == 2'd0, "FMM stops on stop-trigger");

    // ---- mechanism tally ----
    $display("pretrig=%0d match=%0d clct_only=%0d alct_only=%0d reject=%0d invp=%0d nobuf=%0d",
             n_pretrig, n_match, n_conly, n_aonly, n_reject, n_invp, n_nobuf);
    $display("l1a_in_window=%0d l1a_only=%0d nol1a=%0d readouts=%0d pad=%0d mpc=%0d inject=%0d",
             n_l1a_win, n_l1a_only, n_nol1a, n_readout, n_pad, n_mpc, n_inj);
    check(n_pretrig > 0, "mechanism: pre-trigger");
    check(n_match > 0, "mechanism: ALCT*CLCT match");
    check(n_conly > 0, "mechanism: CLCT-only trigger");
    check(n_aonly > 0, "mechanism: ALCT-only");
    check(n_reject > 0, "mechanism: TMB reject");
    check(n_invp > 0, "mechanism: invalid pattern");
    check(n_nobuf > 0, "mechanism: no-buffer discard");
    check(n_l1a_win > 0, "mechanism: L1A in window");
    check(n_l1a_only > 0, "mechanism: L1A-only");
    check(n_nol1a > 0, "mechanism: no L1A, buffer flushed");
    check(n_readout >= 3, "mechanism: readouts (full, short, header-only)");
    check(n_pad > 0, "mechanism: readout padding");
    check(n_mpc > 0, "mechanism: MPC transmit");
    check(n_fmm_run > 0, "mechanism: FMM run state");
    check(n_inj > 0, "mechanism: CFEB pattern injection");
    check(n_scope > 0, "mechanism: scope capture");
    check(n_mpc_inj > 0, "mechanism: MPC injection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
