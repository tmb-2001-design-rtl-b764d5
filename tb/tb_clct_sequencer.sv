// tb_clct_sequencer: checks the pre-trigger and event sequencer.
//
// Covers: no triggers while stopped; a CLCT pattern pre-trigger that takes
// the offered buffer and reaches tmb_match drift_delay+2 clocks later with
// the latched CLCTs, crossing number and trigger source; each external
// trigger source arriving its programmed delay + 1 clocks before the
// pre-trigger, and ignored when disabled; ALCT*CLCT needing the ALCT
// active-FEB flag within its stretched window; an invalid pattern freeing
// its buffer while an external trigger with the same invalid CLCT is still
// sent; a discard when no buffer is free; the repeat interval of
// drift_delay + flush_delay + 4 clocks; and "all CFEBs active".
module tb_clct_sequencer;
  import tmb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic trig_stop = 1, clct_pretrig = 0, hs_pretrig = 0, alct_active_feb = 0;
  logic [NCFEB-1:0] clct_active_feb = 5'b00010, ev_active_feb;
  logic adb_ext_trig = 0, dmb_ext_trig = 0, clct_ext_trig = 0, alct_ext_trig = 0, vme_ext_trig = 0;
  logic [9:0] trig_en = 10'h001;
  logic [3:0] alct_trig_width = 3, alct_pre_trig_dly = 0, alct_pat_trig_dly = 0;
  logic [3:0] adb_ext_trig_dly = 1, dmb_ext_trig_dly = 1, clct_ext_trig_dly = 7, alct_ext_trig_dly = 7;
  logic [1:0] drift_delay = 2;
  logic [3:0] flush_delay = 1;
  logic wr_buf_required = 1, valid_clct_required = 1;
  logic [11:0] bxn = 0, ev_bxn, cnt_discard_nobuf, cnt_discard_invp, cnt_pretrig;
  logic sync_err = 0;
  logic [15:0] now = 0, ev_t0;
  logic wr_buf_ready = 1;
  logic [2:0] wr_buf_adr = 3'd4, buf_free_adr, ev_buf_adr, clct_sm;
  logic buf_alloc, buf_free, pretrig, clct_trig, ev_has_buf, ev_hs_pretrig, invp;
  clct_t clct0_in = '0, clct1_in = '0, clct0, clct1;
  logic [7:0] ev_trig_src;
  clct_sequencer dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) begin bxn <= bxn + 1; now <= now + 1; end
  initial begin
    #(10 * 50000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // clocks from the current negedge until pretrig is seen (-1 if not within n)
  task automatic wait_for(input int n, ref logic sig, output int t);
    t = -1;
    for (int i = 1; i <= n; i++) begin
      @(negedge clk);
      if (sig && t < 0) t = i;
    end
  endtask
  int cnt_pre, cnt_ct, cnt_inv, cnt_alloc, cnt_free;
  always @(posedge clk) if (!rst) begin
    cnt_pre += pretrig; cnt_ct += clct_trig; cnt_inv += invp; cnt_alloc += buf_alloc; cnt_free += buf_free;
  end
  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask
  initial begin
    int t;
    clct_t good;
    good = '0; good.vpf = 1; good.nhit = 6; good.pat = 7; good.key = 9; good.cfeb = 1; good.hsds = 1;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    // stopped
    clct_pretrig = 1; repeat (10) @(negedge clk); clct_pretrig = 0;
    check(cnt_pre == 0, "no pre-trigger while stopped");
    trig_stop = 0; repeat (3) @(negedge clk);
    // pattern pre-trigger
    clct0_in = good; hs_pretrig = 1;
    clct_pretrig = 1; @(negedge clk); clct_pretrig = 0;
    check(pretrig && buf_alloc && ev_has_buf && ev_buf_adr == 4, "pre-trigger takes the offered buffer");
    check(ev_trig_src == 8'h01 && ev_active_feb == 5'b00010 && ev_hs_pretrig, "source and active CFEBs recorded");
    begin
      logic [11:0] b;
      b = ev_bxn;
      wait_for(8, clct_trig, t);
      check(t == 4, $sformatf("CLCT to TMB %0d clocks after pre-trigger, expected drift 2 + 2", t));
      check(clct0.key == 9 && clct0.cfeb == 1 && clct0.vpf && clct0.bxn == b[1:0], "latched CLCT0");
    end
    repeat (5) @(negedge clk);
    // external sources with their delays
    for (int s = 3; s <= 6; s++) begin
      int dly;
      trig_en = 10'h0;
      trig_en[s] = 1;
      dly = (s == 3) ? 1 : (s == 4) ? 1 : 7;
      case (s)
        3: adb_ext_trig = 1; 4: dmb_ext_trig = 1; 5: clct_ext_trig = 1; 6: alct_ext_trig = 1;
      endcase
      @(negedge clk);
      adb_ext_trig = 0; dmb_ext_trig = 0; clct_ext_trig = 0; alct_ext_trig = 0;
      t = -1;
      for (int i = 1; i <= 12; i++) begin
        if (pretrig && t < 0) t = i;
        @(negedge clk);
      end
      check(t == dly + 1, $sformatf("source %0d: pre-trigger %0d clocks after, expected %0d", s, t, dly + 1));
      check(ev_trig_src == 8'(1 << s), $sformatf("source %0d recorded", s));
      // disabled: nothing
      trig_en = 10'h0;
      case (s)
        3: adb_ext_trig = 1; 4: dmb_ext_trig = 1; 5: clct_ext_trig = 1; 6: alct_ext_trig = 1;
      endcase
      @(negedge clk);
      adb_ext_trig = 0; dmb_ext_trig = 0; clct_ext_trig = 0; alct_ext_trig = 0;
      cnt_pre = 0; repeat (12) @(negedge clk);
      check(cnt_pre == 0, $sformatf("source %0d ignored when disabled", s));
    end
    // ALCT*CLCT
    trig_en = 10'h004;
    cnt_pre = 0;
    clct_pretrig = 1; @(negedge clk); clct_pretrig = 0; repeat (10) @(negedge clk);
    check(cnt_pre == 0, "ALCT*CLCT needs the ALCT");
    alct_active_feb = 1; @(negedge clk); alct_active_feb = 0;
    @(negedge clk); @(negedge clk);
    clct_pretrig = 1; @(negedge clk); clct_pretrig = 0; repeat (10) @(negedge clk);
    check(cnt_pre == 1, "ALCT*CLCT inside the ALCT window");
    // invalid pattern
    trig_en = 10'h021; clct0_in = '0; clct0_in.nhit = 3;
    cnt_inv = 0; cnt_free = 0; cnt_ct = 0;
    clct_pretrig = 1; @(negedge clk); clct_pretrig = 0; repeat (10) @(negedge clk);
    check(cnt_inv == 1 && cnt_free == 1 && cnt_ct == 0 && cnt_discard_invp == 1, "invalid pattern freed and counted");
    clct_ext_trig = 1; @(negedge clk); clct_ext_trig = 0; repeat (16) @(negedge clk);
    check(cnt_inv == 1 && cnt_ct == 1, "external trigger sends even an invalid CLCT");
    // no buffer
    clct0_in = good; wr_buf_ready = 0; cnt_pre = 0;
    clct_pretrig = 1; @(negedge clk); clct_pretrig = 0; repeat (10) @(negedge clk);
    check(cnt_pre == 0 && cnt_discard_nobuf == 1, "no buffer: discarded and counted");
    wr_buf_required = 0;
    clct_pretrig = 1; @(negedge clk); clct_pretrig = 0; repeat (10) @(negedge clk);
    check(cnt_pre == 1 && !ev_has_buf, "buffer not required: pre-trigger without buffer");
    wr_buf_ready = 1; wr_buf_required = 1;
    // repeat interval and all CFEBs active
    trig_en = 10'h201; drift_delay = 1; flush_delay = 3;
    clct_pretrig = 1;
    begin
      int t0, t1;
      t0 = -1; t1 = -1;
      for (int i = 0; i < 40 && t1 < 0; i++) begin
        @(negedge clk);
        if (pretrig) begin if (t0 < 0) t0 = i; else t1 = i; end
      end
      check(t1 - t0 == 1 + 3 + 4, $sformatf("pre-trigger repeat %0d clocks", t1 - t0));
    end
    clct_pretrig = 0;
    check(ev_active_feb == 5'b11111, "all CFEBs active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
