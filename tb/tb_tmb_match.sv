// tb_tmb_match: checks the ALCT*CLCT coincidence and the MPC frames.
//
// For window widths 1..5 and ALCT delays 0..3, a CLCT is presented and a
// single valid ALCT is placed at every offset from two clocks before the
// window to two after it. An ALCT landing at window position p (counted
// from 0 in the CLCT's clock, after the ALCT delay) must give a match with
// match_time p; otherwise the CLCT is CLCT-only when the window closes and
// the ALCT, outside any window, is ALCT-only. The allow bits decide which
// decisions reach the MPC; the rest are rejects. The frames are rebuilt
// here from the LCT fields, and the MPC accept bits must be sampled
// mpc_delay clocks after the frames went out.
module tb_tmb_match;
  import tmb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  alct_t alct0_in = '0, alct1_in = '0, alct0_match, alct1_match;
  logic clct_trig = 0;
  clct_t clct0 = '0, clct1 = '0;
  logic [3:0] alct_delay = 1, clct_width = 3, mpc_delay = 7, csc_id = 5, match_time;
  logic allow_alct = 0, allow_clct = 1, allow_match = 1;
  logic [1:0] sync_err_en = 2'b11, mpc_accept_in = 0, mpc_accept;
  logic tmb_done, tmb_trig, tmb_reject, tmb_match_o, tmb_alct_only, tmb_clct_only, mpc_tx, accept_done;
  logic [15:0] mpc0_frame0, mpc0_frame1, mpc1_frame0, mpc1_frame1;
  tmb_match dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #(10 * 100000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // decisions seen
  int n_match, n_conly, n_aonly, n_trig, n_rej, mt;
  logic [15:0] f00, f01;
  always @(posedge clk) if (!rst && tmb_done) begin
    if (tmb_match_o) begin n_match++; mt = match_time; end
    if (tmb_clct_only) n_conly++;
    if (tmb_alct_only) n_aonly++;
    if (tmb_trig) n_trig++;
    if (tmb_reject) n_rej++;
  end
  always @(posedge clk) if (!rst && mpc_tx) begin f00 = mpc0_frame0; f01 = mpc0_frame1; end
  task automatic clear(); n_match = 0; n_conly = 0; n_aonly = 0; n_trig = 0; n_rej = 0; mt = -1; endtask
  initial begin
    clct_t c;
    alct_t a;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    repeat (20) @(negedge clk);
    for (int w = 1; w <= 5; w++)
      for (int d = 0; d <= 3; d++)
        for (int off = -2; off <= w + 1; off++) begin
          clear();
          clct_width = 4'(w); alct_delay = 4'(d);
          allow_alct = off[0]; allow_clct = 1; allow_match = (w != 2);
          c = '0; c.vpf = 1; c.nhit = 6; c.pat = 3'(1 + $urandom % 7); c.bend = c.pat[0];
          c.hsds = 1; c.key = 5'($urandom); c.cfeb = 3'($urandom % 5); c.bx0_local = $urandom; c.sync_err = $urandom;
          a = '0; a.vpf = 1; a.quality = 2'($urandom); a.key = 7'($urandom % 112); a.bxn = 2'($urandom);
          // ALCT applied in clock (CLCT clock + off - d), so it is seen at window position off
          for (int t = -6; t <= 10; t++) begin
            clct_trig = (t == 0);
            clct0 = (t == 0) ? c : '0;
            alct0_in = (t == off - d) ? a : '0;
            @(negedge clk);
          end
          alct0_in = '0; clct_trig = 0;
          repeat (4) @(negedge clk);
          if (off >= 0 && off < w) begin
            check(n_match == 1 && n_conly == 0 && n_aonly == 0, $sformatf("w%0d d%0d off%0d: match", w, d, off));
            check(mt == off, $sformatf("w%0d d%0d off%0d: match time %0d", w, d, off, mt));
            check(n_trig == (w != 2) && n_rej == (w == 2), "match allowed or rejected");
            if (w != 2) begin
              check(f00 == {1'b1, 1'b1, a.quality, 1'b1, 1'b1, c.pat, a.key}, $sformatf("frame0 %h", f00));
              check(f01 == {csc_id, c.bx0_local, a.bxn[0], c.sync_err, c.bend, 8'(c.cfeb * 32 + c.key)}, $sformatf("frame1 %h", f01));
            end
          end else begin
            check(n_match == 0 && n_conly == 1 && n_aonly == 1, $sformatf("w%0d d%0d off%0d: CLCT-only and ALCT-only", w, d, off));
            check(n_trig == 1 + off[0] && n_rej == 1 - off[0], "allow bits for CLCT-only / ALCT-only");
          end
        end
    // MPC accept timing
    clct_width = 3; alct_delay = 1; mpc_delay = 7; allow_clct = 1;
    @(negedge clk); clct_trig = 1; clct0 = c; @(negedge clk); clct_trig = 0;
    while (!mpc_tx) @(negedge clk);
    repeat (7) @(negedge clk);
    mpc_accept_in = 2'b11; @(negedge clk); mpc_accept_in = 2'b00;
    check(accept_done && mpc_accept == 2'b11, "MPC accept sampled mpc_delay clocks after the frames");
    @(negedge clk);
    check(!accept_done, "accept_done is a pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
