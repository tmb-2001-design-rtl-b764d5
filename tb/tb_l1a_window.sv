// tb_l1a_window: checks L1A matching against the events' windows.
//
// Uses a short L1A delay (20 clocks) and the default 3-clock window. For
// each event pushed at time t0 an L1A is sent when the event's age
// (now - t0) is a chosen value from delay-2 to delay+win+1. An L1A inside
// [delay, delay+win) must produce a type-0 readout request with the event's
// buffer; one outside gives a type-2 L1A-only request without buffer, and
// the event, never matched, must free its buffer when its age reaches
// delay+win (or be read out as type 3 with l1a_allow_nol1a). The internal
// L1A mode must fire exactly at age = delay. The L1A counter and the
// offset loaded by l1reset are checked too.
module tb_l1a_window;
  import tmb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic ttc_l1reset = 0, ev_push = 0, ccb_l1accept = 0, l1a_internal = 0, l1a_allow_nol1a = 0, l1a_request = 0;
  logic [15:0] ev_t0 = 0, now;
  logic [2:0] ev_buf_adr = 0, buf_free_adr;
  logic [7:0] l1a_delay = 8'd20;
  logic [3:0] l1a_win = 4'd3, l1a_offset = 4'd0, l1a_rx_cnt, l1a_tx_cnt;
  logic [11:0] bxn = 12'h123;
  logic rdo_push, buf_free, l1a_pulse, l1a_in_window, nol1a, queue_full;
  rdo_desc_t rdo_desc;
  l1a_window #(.NQ(8)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #(10 * 20000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int n_rdo, n_free, n_type[4];
  rdo_desc_t last;
  logic [2:0] last_free;
  always @(posedge clk) if (!rst) begin
    if (rdo_push) begin n_rdo++; n_type[rdo_desc.l1a_type]++; last = rdo_desc; end
    if (buf_free) begin n_free++; last_free = buf_free_adr; end
  end
  task automatic clear(); n_rdo = 0; n_free = 0; n_type = '{0,0,0,0}; endtask
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int age = 18; age <= 24; age++) begin
      logic [2:0] b;
      bit inwin;
      b = 3'($urandom);
      inwin = age >= 20 && age < 23;
      clear();
      ev_push = 1; ev_t0 = now; ev_buf_adr = b;
      @(negedge clk); ev_push = 0;
      // age now 1; wait until the age wanted
      repeat (age - 1) @(negedge clk);
      check(now - ev_t0 == 16'(age), "bench timing");
      ccb_l1accept = 1; @(negedge clk); ccb_l1accept = 0;
      repeat (2) @(negedge clk);
      check(n_rdo == 1, $sformatf("age %0d: one readout request", age));
      if (inwin) begin
        check(last.l1a_type == 2'(L1A_NORMAL) && last.has_buf && last.buf_adr == b,
              $sformatf("age %0d: in window, event read out", age));
      end else begin
        check(last.l1a_type == 2'(L1A_ONLY) && !last.has_buf, $sformatf("age %0d: L1A-only", age));
      end
      check(last.bxn_l1a == bxn, "bxn of the L1A");
      repeat (30) @(negedge clk);
      if (inwin) check(n_free == 0, $sformatf("age %0d: matched event keeps its buffer", age));
      else check(n_free == 1 && last_free == b, $sformatf("age %0d: unmatched event frees its buffer", age));
    end
    // expiry timing: buffer freed when age reaches delay + window
    begin
      int t;
      clear();
      ev_push = 1; ev_t0 = now; ev_buf_adr = 3'd5;
      @(negedge clk); ev_push = 0;
      t = 1;
      while (!buf_free && t < 60) begin @(negedge clk); t++; end
      check(t == 24, $sformatf("buffer freed at age %0d, expected 24", t));
      @(negedge clk);
    end
    // no-L1A readout
    clear(); l1a_allow_nol1a = 1;
    ev_push = 1; ev_t0 = now; ev_buf_adr = 3'd6;
    @(negedge clk); ev_push = 0;
    repeat (40) @(negedge clk);
    check(n_rdo == 1 && n_type[3] == 1 && last.buf_adr == 6 && n_free == 0, "no-L1A event read out as type 3");
    l1a_allow_nol1a = 0;
    // internal L1A
    clear(); l1a_internal = 1;
    ev_push = 1; ev_t0 = now; ev_buf_adr = 3'd2;
    @(negedge clk); ev_push = 0;
    begin
      int t, at;
      t = 1; at = -1;
      while (t < 40) begin
        if (l1a_pulse && at < 0) at = t;
        @(negedge clk); t++;
      end
      check(at == 20, $sformatf("internal L1A at age %0d, expected 20", at));
    end
    check(n_rdo == 1 && n_type[0] == 1, "internal L1A reads the event out");
    l1a_internal = 0;
    // counters
    l1a_offset = 4'd9; ttc_l1reset = 1; @(negedge clk); ttc_l1reset = 0;
    check(l1a_rx_cnt == 9, "l1reset loads the L1A offset");
    ccb_l1accept = 1; @(negedge clk); ccb_l1accept = 0;
    check(l1a_rx_cnt == 10, "L1A counted");
    l1a_request = 1; @(negedge clk); l1a_request = 0;
    check(l1a_tx_cnt == 1, "L1A request counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
