// tb_dmb_readout: checks the DMB record formats.
//
// A model raw-hits RAM answers each read address one clock later with a
// pattern made from the address, so every raw-hits frame can be predicted:
// frame = {0, CFEB, time bin, triads of that CFEB and layer}. Records are
// requested through the stack interface for: full readout of all 5 CFEBs
// (7 time bins: 28 + 210 frames + 2 padding = 240), local mode reading only
// the CFEBs active at pre-trigger, full header only (28), short header (8),
// an event without a buffer (8, end marker EEF), odd time-bin counts that
// need no padding, and mode 4 (nothing). For each, the frame count, markers
// 6B0C / 6E0B / 6E0C / E0F or EEF, the padding pair, the CRC recomputed
// here, the word count, first/last flags and the buffer release are checked.
module tb_dmb_readout;
  import tmb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic stk_empty = 1, stk_pop, rec_wr = 0;
  rdo_desc_t stk_dout = '0;
  logic [2:0] rec_buf = 0, wr_buf_adr = 0, buf_free_adr;
  event_rec_t rec_in = '0;
  logic [7:0] raw_adr;
  logic [RAW_W-1:0] raw_rdata;
  logic [2:0] fifo_mode = 1, hs_thresh = 4, ds_thresh = 4;
  logic [4:0] fifo_tbins = 7, fifo_pretrig = 2, board_id = 21, buf_flags = 0, read_sm;
  logic [3:0] csc_id = 5, run_id = 0, triad_persist = 5, buf_nbusy = 0, cnt_nobuf = 0, cnt_invp = 0, cnt_tmbrej = 0, l1a_tx_cnt = 0;
  logic [NCFEB-1:0] cfeb_exists = '1;
  logic [13:0] revcode = 14'h123;
  logic [7:0] buf_busy = 0;
  logic wr_buf_ready = 1, sync_err = 0;
  logic dmb_wr, dmb_first, dmb_last, busy, buf_free;
  logic [15:0] dmb_data;
  dmb_readout dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic [7:0] triads(input logic [7:0] adr, input int c, input int l);
    return adr ^ 8'(c * 37 + l * 11 + 1);
  endfunction
  always_ff @(posedge clk)
    for (int c = 0; c < NCFEB; c++)
      for (int l = 0; l < NLY; l++)
        raw_rdata[(c*NLY + l)*NTRIAD +: NTRIAD] <= triads(raw_adr, c, l);
  initial begin
    #(10 * 50000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [15:0] fr [$];
  int nfirst, nfree, free_adr;
  always @(posedge clk) if (!rst) begin
    if (dmb_wr) begin fr.push_back(dmb_data); if (dmb_first) nfirst++; end
    if (buf_free) begin nfree++; free_adr = buf_free_adr; end
  end
  always @(posedge clk) if (stk_pop) stk_empty <= 1;
  function automatic logic [21:0] ref_crc(input int n);
    logic [21:0] c;
    c = '0;
    for (int k = 0; k < n; k++)
      for (int i = 0; i < 16; i++) begin
        logic fb;
        fb = c[21] ^ fr[k][i];
        c = {c[20:0], 1'b0};
        if (fb) c = c ^ 22'h3;
      end
    return c;
  endfunction
  task automatic run(input logic [2:0] mode, input bit has_buf, input int tbins, input logic [4:0] active, input string tag);
    int ncf, exp_n, raw_n, n, pad;
    logic [21:0] c;
    logic [2:0] b;
    b = 3'($urandom);
    fifo_mode = mode; fifo_tbins = 5'(tbins);
    rec_in = '0; rec_in.active_feb = active; rec_in.tbin_pretrig = 2;
    @(negedge clk); rec_wr = 1; rec_buf = b; @(negedge clk); rec_wr = 0;
    stk_dout = '0; stk_dout.has_buf = has_buf; stk_dout.buf_adr = b; stk_dout.l1a_type = has_buf ? 2'd0 : 2'd2;
    stk_dout.bxn_l1a = 12'hABC; stk_dout.l1a_cnt = 4'd3;
    fr = {}; nfirst = 0; nfree = 0;
    stk_empty = 0;
    repeat (400) @(negedge clk);
    ncf = (mode == 2) ? $countones(active) : NCFEB;
    n = fr.size();
    if (mode == 4) begin check(n == 0, {tag, ": nothing read out"}); return; end
    if (!has_buf || mode == 3) exp_n = 8;
    else begin
      raw_n = (mode == 0) ? 0 : 6 * ncf * tbins;
      exp_n = 28 + raw_n;
      pad = (exp_n % 4 != 0) ? 2 : 0;
      exp_n += pad;
    end
    check(n == exp_n, $sformatf("%s: %0d frames, expected %0d", tag, n, exp_n));
    if (n != exp_n) return;
    check(fr[0] == 16'h6B0C, {tag, ": 6B0C"});
    c = ref_crc(n - 4);
    check(fr[n-4] == {5'b11011, c[10:0]} && fr[n-3] == {5'b11011, c[21:11]}, {tag, ": CRC"});
    check(fr[n-2] == ((exp_n == 8) ? 16'hDEEF : 16'hDE0F), {tag, ": end marker"});
    check(fr[n-1] == {5'b11011, 11'(n)}, {tag, ": word count"});
    check(nfree == has_buf && (!has_buf || free_adr == b), {tag, ": buffer released"});
    if (exp_n == 8) begin
      check(fr[2][3:0] == 4'd3 && fr[3][11:0] == 12'hABC, {tag, ": L1A number and crossing"});
      return;
    end
    check(fr[2][14:13] == 2'd0 && fr[2][12:8] == 5'd21 && fr[2][7:4] == 4'd5, {tag, ": type, board id, CSC id"});
    check(fr[22] == 16'h6E0B && nfirst == 2, {tag, ": 6E0B and first flags"});
    check(fr[23 + raw_n] == 16'h6E0C, {tag, ": 6E0C"});
    if (pad != 0) check(fr[24 + raw_n] == 16'h2AAA && fr[25 + raw_n] == 16'h5555, {tag, ": padding"});
    begin
      int k, bad;
      k = 23; bad = 0;
      for (int cf = 0; cf < NCFEB && raw_n != 0; cf++) begin
        if (mode == 2 && !active[cf]) continue;
        for (int t = 0; t < tbins; t++)
          for (int l = 0; l < NLY; l++) begin
            if (fr[k] != {1'b0, 3'(cf), 4'(t), triads({b, 5'(t)}, cf, l)}) bad++;
            k++;
          end
      end
      check(bad == 0, $sformatf("%s: %0d raw-hits frames wrong", tag, bad));
    end
  endtask
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    run(3'd1, 1, 7, 5'b00100, "full readout, 5 CFEBs x 7 time bins");
    run(3'd2, 1, 7, 5'b01010, "local readout of 2 active CFEBs");
    run(3'd1, 1, 4, 5'b00001, "full readout, 4 time bins, no padding");
    run(3'd1, 1, 1, 5'b00001, "full readout, 1 time bin");
    run(3'd0, 1, 7, 5'b00001, "header only");
    run(3'd3, 1, 7, 5'b00001, "short header");
    run(3'd1, 0, 7, 5'b00001, "no buffer");
    run(3'd4, 1, 7, 5'b00001, "mode 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
