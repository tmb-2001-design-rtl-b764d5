// tb_ttc_decoder: checks the CCB command decoder and the FMM run state.
//
// Sends every 6-bit command code from the CCB with a strobe and expects
// exactly the matching decoded pulse one clock later (BX0 01, L1Reset 03,
// start 06, stop 07, MPC inject 24, BX reset 32 hex), and none for other
// codes or without a strobe. Then checks that ccb_ignore_rx blocks the CCB,
// that a VME command fires once on its strobe's rising edge, and walks the
// FMM through stop -> wait-BX0 -> run -> resync -> wait-BX0 -> run -> stop.
module tb_ttc_decoder;
  import tmb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] ccb_cmd = 0, vme_ccb_cmd = 0;
  logic ccb_cmd_strobe = 0, ccb_ignore_rx = 0, vme_ccb_cmd_enable = 0, vme_ccb_cmd_strobe = 0;
  logic ttc_bx0, ttc_l1reset, ttc_start_trigger, ttc_stop_trigger, ttc_mpc_inject, ttc_bxreset, trig_stop;
  fmm_state_e fmm_state;
  ttc_decoder dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic [5:0] pulses();
    return {ttc_bxreset, ttc_mpc_inject, ttc_stop_trigger, ttc_start_trigger, ttc_l1reset, ttc_bx0};
  endfunction
  function automatic logic [5:0] expect_of(input logic [5:0] c);
    case (c)
      6'h01: return 6'b000001;
      6'h03: return 6'b000010;
      6'h06: return 6'b000100;
      6'h07: return 6'b001000;
      6'h24: return 6'b010000;
      6'h32: return 6'b100000;
      default: return 6'b0;
    endcase
  endfunction
  task automatic send(input logic [7:0] c, input bit strobe);
    @(negedge clk); ccb_cmd = c; ccb_cmd_strobe = strobe;
    @(negedge clk); ccb_cmd_strobe = 0;
  endtask
  initial begin
    #(10 * 5000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    check(fmm_state == FMM_STOP && trig_stop, "stopped after reset");
    // code decoding, one clock latency; stop/start codes skipped here
    for (int c = 0; c < 64; c++) begin
      if (c == 6 || c == 7 || c == 1 || c == 3) continue;
      @(negedge clk); ccb_cmd = 8'(c) | 8'hC0; ccb_cmd_strobe = 1;
      @(negedge clk); ccb_cmd_strobe = 0;
      check(pulses() == expect_of(6'(c)), $sformatf("decode code %02h", c));
      @(negedge clk);
      check(pulses() == 0, $sformatf("single pulse, code %02h", c));
    end
    send(8'h01, 0); check(pulses() == 0, "no strobe, no pulse");
    // FMM walk
    send(8'h01, 1); check(ttc_bx0, "bx0 pulse"); @(negedge clk);
    check(fmm_state == FMM_STOP, "bx0 alone does not start");
    send(8'h06, 1); check(ttc_start_trigger, "start pulse"); @(negedge clk);
    check(fmm_state == FMM_WAITBX0 && trig_stop, "start -> wait for BX0");
    send(8'h01, 1); @(negedge clk);
    check(fmm_state == FMM_RUN && !trig_stop, "BX0 -> run");
    send(8'h03, 1); check(ttc_l1reset, "l1reset pulse"); @(negedge clk);
    check(fmm_state == FMM_RESYNC, "l1reset -> resync");
    @(negedge clk);
    check(fmm_state == FMM_WAITBX0, "resync -> wait for BX0");
    send(8'h01, 1); @(negedge clk);
    check(fmm_state == FMM_RUN, "run again");
    // ignore_rx
    ccb_ignore_rx = 1;
    send(8'h07, 1); @(negedge clk);
    check(fmm_state == FMM_RUN, "CCB ignored");
    ccb_ignore_rx = 0;
    // VME command path: fires on the strobe's rising edge only
    vme_ccb_cmd_enable = 1; vme_ccb_cmd = 8'h07;
    @(negedge clk); vme_ccb_cmd_strobe = 1;
    @(negedge clk); check(ttc_stop_trigger, "VME stop command");
    @(negedge clk); check(!ttc_stop_trigger, "VME command fires once");
    check(fmm_state == FMM_STOP && trig_stop, "stop -> stopped");
    vme_ccb_cmd_strobe = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
