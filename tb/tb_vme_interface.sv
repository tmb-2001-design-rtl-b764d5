// tb_vme_interface: checks board selection, register defaults and decoding.
//
// Reads the power-up value of each configuration register and compares it
// with the register map's defaults, field by field where the decoded
// outputs show it. Writes random data to every read/write register and
// reads it back through the writable-bit masks; a write to a read-only
// register must change nothing. Accesses with a foreign geographic
// address, A[18:8] not zero or an address modifier other than 39/3D get no
// acknowledge; broadcast writes to board address 26 or 27 are taken,
// broadcast reads are not. Status inputs must appear in their registers.
module tb_vme_interface;
  import tmb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic vme_req = 0, vme_write = 0, vme_ack;
  logic [23:1] vme_adr = 0;
  logic [5:0] vme_am = 6'h39;
  logic [15:0] vme_wdata = 0, vme_rdata;
  logic [4:0] ga = 5'd9;
  alct_t alct0_rcd = '0, alct1_rcd = '0;
  logic [7:0] ccb_cmd_in = 8'h5A, seq_trig_src = 8'h21, buf_busy = 8'h0F;
  logic [1:0] fmm_state = 2'd3, mpc_accept = 2'b10;
  clct_t seq_clct0 = '0, seq_clct1 = '0;
  logic [3:0] buf_nbusy = 4, buf_nbusy_peak = 6;
  logic [2:0] clct_sm = 1, tmb_sm = 2;
  logic [4:0] read_sm = 3;
  logic [15:0] mpc0_frame0 = 16'h1111, mpc0_frame1 = 16'h2222, mpc1_frame0 = 16'h3333, mpc1_frame1 = 16'h4444;
  logic [NCFEB-1:0][NLY-1:0][NTRIAD-1:0] hcm;
  logic [NCFEB-1:0] mask_all;
  logic [9:0] seq_trig_en;
  logic [3:0] alct_trig_width, alct_pre_trig_dly, alct_pat_trig_dly, adb_ext_trig_dly, dmb_ext_trig_dly;
  logic [3:0] clct_ext_trig_dly, alct_ext_trig_dly, csc_id, run_id, triad_persist, l1a_window, l1a_offset;
  logic [4:0] board_id, fifo_tbins, fifo_pretrig;
  logic [2:0] hs_thresh, ds_thresh, nph_pattern, fifo_mode;
  logic [1:0] drift_delay, tmb_sync_err_en;
  logic [7:0] l1a_delay, vme_ccb_cmd;
  logic l1a_internal, tmb_allow_alct, tmb_allow_clct, tmb_allow_match, ccb_ignore_rx, seq_trig_l1aen;
  logic vme_ccb_cmd_enable, vme_ccb_cmd_strobe, wr_buf_required, valid_clct_required, l1a_allow_nol1a;
  logic [11:0] bxn_offset, lhc_cycle;
  logic [3:0] mpc_delay, clct_flush_delay, alct_delay, clct_width;
  logic [15:0] led_reg;
  logic [15:0] inj_rdata = 16'hBEEF, inj_wdata;
  logic [NCFEB-1:0] inj_febsel, injector_mask;
  logic inj_trig_vme, inj_wr;
  logic [2:0] inj_wen, inj_ren;
  logic [7:0] inj_rwadr;
  int n_inj_wr = 0;
  logic [15:0] mpc_rdata = 16'h7777, mpc_wdata;
  logic [3:0] mpc_acc_rdata = 4'hB, mpc_wen, mpc_ren;
  logic [7:0] mpc_nframes, mpc_adr;
  logic mpc_inject, ttc_mpc_inj_en, mpc_wr;
  logic scp_waiting = 1'b1, scp_trig_done = 1'b0;
  logic [15:0] scp_rdata = 16'hC0DE;
  logic scp_runstop, scp_force_trig;
  logic [2:0] scp_ram_sel;
  logic [7:0] scp_radr;
  always @(posedge clk) if (inj_wr) n_inj_wr++;
  vme_interface dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #(10 * 50000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic cyc(input bit wr, input logic [4:0] board, input logic [18:1] off, input logic [5:0] am,
                     input logic [15:0] wd, output logic [15:0] rd, output bit ack);
    @(negedge clk);
    vme_req = 1; vme_write = wr; vme_adr = {board, off}; vme_am = am; vme_wdata = wd;
    @(negedge clk);
    vme_req = 0;
    ack = vme_ack; rd = vme_rdata;
  endtask
  function automatic logic [18:1] a(input logic [7:0] adr); return {11'b0, adr[7:1]}; endfunction
  task automatic rd(input logic [7:0] adr, output logic [15:0] d);
    bit k;
    cyc(0, ga, a(adr), 6'h39, 0, d, k);
    check(k, $sformatf("ack on read %02h", adr));
  endtask
  task automatic wr(input logic [7:0] adr, input logic [15:0] d);
    logic [15:0] x; bit k;
    cyc(1, ga, a(adr), 6'h3D, d, x, k);
    check(k, $sformatf("ack on write %02h", adr));
  endtask
  // register map: offset, default, writable bits
  typedef struct { logic [7:0] adr; logic [15:0] dflt; logic [15:0] mask; } reg_t;
  reg_t regs [$];
  initial begin
    logic [15:0] d;
    bit k;
    regs = '{ '{8'h22, 16'h0000, 16'hFFFF}, '{8'h2A, 16'h0038, 16'h007F}, '{8'h2C, 16'h7504, 16'hFF7F},
              '{8'h42, 16'h7C1F, 16'hFFFF}, '{8'h68, 16'h0001, 16'h03FF}, '{8'h6A, 16'h1003, 16'hFFFF},
              '{8'h6C, 16'h0771, 16'h0FFF}, '{8'h6E, 16'h00B5, 16'h1FFF}, '{8'h70, 16'h5245, 16'hFFFF},
              '{8'h72, 16'h0239, 16'h1FFF}, '{8'h74, 16'h0380, 16'h1FFF}, '{8'h76, 16'h0000, 16'hFFFF},
              '{8'hAC, 16'h01C1, 16'h1FFF}, '{8'hB2, 16'h0031, 16'h00FF}, '{8'hB4, 16'h0DEC, 16'h0FFF},
              '{8'h4A, 16'hFFFF, 16'hFFFF}, '{8'h66, 16'hFFFF, 16'hFFFF},
              '{8'h44, 16'h0000, 16'h3FFF}, '{8'h46, 16'h0000, 16'hFFFF} };
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    // decoded defaults, as listed in the register map
    check(triad_persist == 5 && hs_thresh == 4 && ds_thresh == 4 && nph_pattern == 4 && drift_delay == 2, "CLCT defaults");
    check(fifo_mode == 1 && fifo_tbins == 7 && fifo_pretrig == 2, "FIFO defaults");
    check(l1a_delay == 128 && l1a_window == 3 && !l1a_internal, "L1A defaults");
    check(board_id == 21 && csc_id == 5 && run_id == 0, "ID defaults");
    check(alct_trig_width == 3 && adb_ext_trig_dly == 1 && dmb_ext_trig_dly == 1 && clct_ext_trig_dly == 7 && alct_ext_trig_dly == 7, "trigger delay defaults");
    check(seq_trig_en == 10'h001, "only CLCT pattern triggers enabled");
    check(tmb_allow_clct && tmb_allow_match && !tmb_allow_alct && mpc_delay == 7 && tmb_sync_err_en == 3, "TMB trigger defaults");
    check(alct_delay == 1 && clct_width == 3 && lhc_cycle == 3564, "timing defaults");
    check(clct_flush_delay == 1 && wr_buf_required && valid_clct_required, "sequencer mode defaults");
    check(mask_all == 5'h1F && hcm == '1, "all CFEBs and channels enabled");
    foreach (regs[i]) begin
      rd(regs[i].adr, d);
      check(d == regs[i].dflt, $sformatf("default of %02h: %04h expected %04h", regs[i].adr, d, regs[i].dflt));
    end
    // write / read back
    for (int pass = 0; pass < 3; pass++)
      foreach (regs[i]) begin
        logic [15:0] v, old;
        v = 16'($urandom);
        rd(regs[i].adr, old);
        wr(regs[i].adr, v);
        rd(regs[i].adr, d);
        check(d == ((old & ~regs[i].mask) | (v & regs[i].mask)), $sformatf("write %02h", regs[i].adr));
      end
    // field decoding after a write
    wr(8'h74, 16'h1000 | (16'd5 << 8) | 16'd77);
    check(l1a_delay == 77 && l1a_window == 5 && l1a_internal, "L1A register fields");
    wr(8'h4A + 8'd6 * 2, 16'hA55A);   // CFEB 2, layers 0 and 1
    check(hcm[2][0] == 8'h5A && hcm[2][1] == 8'hA5, "hot channel mask fields");
    // CFEB injector registers
    wr(8'h42, 16'h8000 | (16'h15 << 10) | (16'h0A << 5) | 16'h1F);
    check(inj_trig_vme && injector_mask == 5'h15 && inj_febsel == 5'h0A && mask_all == 5'h1F, "injector control fields");
    wr(8'h44, (16'd201 << 6) | (16'd5 << 3) | 16'd3);
    check(inj_rwadr == 8'd201 && inj_ren == 3'd5 && inj_wen == 3'd3, "injector address fields");
    begin
      int n0;
      n0 = n_inj_wr;
      wr(8'h46, 16'h1357);
      @(negedge clk);
      check(n_inj_wr == n0 + 1 && inj_wdata == 16'h1357, "one RAM write strobe per data write");
      wr(8'h44, 16'h0000);
      check(n_inj_wr == n0 + 1, "no RAM write strobe for other registers");
    end
    rd(8'h48, d); check(d == 16'hBEEF, "injector RAM read data");
    // MPC injector registers
    check(mpc_nframes == 5 && !mpc_inject && ttc_mpc_inj_en, "MPC injector defaults");
    rd(8'h90, d); check(d == 16'h2E05, "MPC injector control read with stored reply bits");
    wr(8'h90, 16'hFF0C);
    check(mpc_nframes == 12 && mpc_inject && ttc_mpc_inj_en, "MPC injector control fields");
    wr(8'h92, 16'h3A95);
    check(mpc_adr == 8'h3A && mpc_ren == 4'h9 && mpc_wen == 4'h5, "MPC injector address fields");
    wr(8'h94, 16'h4321);
    check(mpc_wdata == 16'h4321, "MPC injector write data");
    rd(8'h96, d); check(d == 16'h7777, "MPC injector read data");
    // scope registers
    wr(8'h98, 16'hA5FF);
    check(scp_runstop && scp_force_trig && scp_ram_sel == 3'd7 && scp_radr == 8'hA5, "scope control fields");
    rd(8'h98, d); check(d == 16'hA57F, "scope control read: status bits from the scope");
    rd(8'h9A, d); check(d == 16'hC0DE, "scope read data");
    // read-only registers
    rd(8'h00, d); check(d[12:8] == ga, "geographic address in ID");
    wr(8'h00, 16'hFFFF); rd(8'h00, d); check(d[12:8] == ga, "ID register is read-only");
    rd(8'h9E, d); check(d == {8'h0F, 4'd6, 4'd4}, "buffer status");
    rd(8'h7C, d); check(d[7:0] == 8'h21, "trigger source read-back");
    rd(8'h8A, d); check(d == 16'h2222, "MPC0 frame1 read-back");
    rd(8'h2E, d); check(d[7:0] == 8'h5A, "CCB command read-back");
    // selection
    cyc(0, 5'd3, a(8'h70), 6'h39, 0, d, k); check(!k, "other board ignored");
    cyc(0, ga, {11'h001, 7'h38}, 6'h39, 0, d, k); check(!k, "A[18:8] must be zero");
    cyc(0, ga, a(8'h70), 6'h29, 0, d, k); check(!k, "wrong address modifier ignored");
    cyc(1, 5'd26, a(8'h76), 6'h39, 16'h1230, d, k); check(k && bxn_offset == 12'h123, "broadcast write to all TMBs");
    cyc(1, 5'd27, a(8'h76), 6'h39, 16'h4560, d, k); check(k && bxn_offset == 12'h456, "broadcast write to all modules");
    cyc(0, 5'd26, a(8'h76), 6'h39, 0, d, k); check(!k, "no broadcast read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
