// vme_interface: A24/D16 VME slave and register file of the TMB FPGA.
//
// The crate controller reaches a TMB through A24 addressing with address
// modifier 39 (non-privileged) or 3D (supervisor) hex, 16-bit data, even
// addresses only. Address bits A[23:19] select the board: its slot's
// geographic address, or 26 (all TMBs) or 27 (all peripheral-crate modules)
// for broadcast writes. Within the board, A[18:8] must be 0 and A[7:1]
// selects one of the FPGA's 16-bit registers (offsets 00..B4 hex).
//
// Read/write configuration registers hold their power-up defaults from the
// register map and are decoded into the configuration outputs below.
// Read-only registers return the status inputs. A write to a read-only
// register, or to a read-only field, is ignored. The hardware bootstrap
// register at offset 70000 lives outside the FPGA and is not decoded here.
// A write of the CFEB-injector write-data register (46) also gives a
// one-clock inj_wr the clock after, and register 48 reads the injector RAM.
// Registers 98/9A control the scope and read its memory; 90-96 do the same
// for the MPC injector (write strobe mpc_wr after a write of 94).
//
// Register offsets, field positions, defaults, the AM codes and the board
// select follow the register map. The bus handshake is this design's
// simplification: the asynchronous VME strobes are assumed already
// synchronised into a one-clock request (vme_req), and the block answers the
// next clock with vme_ack (DTACK) and, for reads, vme_rdata.
module vme_interface
  import tmb_pkg::*;
#(
  parameter logic [3:0]  FW_TYPE    = 4'hC,     // normal CLCT/TMB firmware
  parameter logic [3:0]  FW_VERSION = 4'hE,     // E-series
  parameter logic [15:0] FW_MONTHDAY= 16'h0414, // BCD MMDD
  parameter logic [15:0] FW_YEAR    = 16'h2002, // BCD YYYY
  parameter logic [15:0] FW_REVCODE = 16'h0000
) (
  input  logic        clk,
  input  logic        rst,
  // bus (already synchronised)
  input  logic        vme_req,
  input  logic        vme_write,
  input  logic [23:1] vme_adr,
  input  logic [5:0]  vme_am,
  input  logic [15:0] vme_wdata,
  input  logic [4:0]  ga,
  output logic        vme_ack,
  output logic [15:0] vme_rdata,
  // read-only status
  input  alct_t       alct0_rcd,
  input  alct_t       alct1_rcd,
  input  logic [7:0]  ccb_cmd_in,
  input  logic [1:0]  fmm_state,
  input  clct_t       seq_clct0,
  input  clct_t       seq_clct1,
  input  logic [7:0]  seq_trig_src,
  input  logic [7:0]  buf_busy,
  input  logic [3:0]  buf_nbusy,
  input  logic [3:0]  buf_nbusy_peak,
  input  logic [2:0]  clct_sm,
  input  logic [2:0]  tmb_sm,
  input  logic [4:0]  read_sm,
  input  logic [1:0]  mpc_accept,
  input  logic [15:0] mpc0_frame0,
  input  logic [15:0] mpc0_frame1,
  input  logic [15:0] mpc1_frame0,
  input  logic [15:0] mpc1_frame1,
  input  logic [15:0] inj_rdata,
  input  logic [15:0] mpc_rdata,
  input  logic [3:0]  mpc_acc_rdata,  // {reserved, accept} stored at the MPC injector address
  input  logic        scp_waiting,
  input  logic        scp_trig_done,
  input  logic [15:0] scp_rdata,
  // configuration
  output logic [NCFEB-1:0][NLY-1:0][NTRIAD-1:0] hcm,
  output logic [NCFEB-1:0] mask_all,
  output logic [NCFEB-1:0] inj_febsel,
  output logic [NCFEB-1:0] injector_mask,
  output logic        inj_trig_vme,
  output logic [2:0]  inj_wen,
  output logic [2:0]  inj_ren,
  output logic [7:0]  inj_rwadr,
  output logic [15:0] inj_wdata,
  output logic [7:0]  mpc_nframes,
  output logic        mpc_inject,
  output logic        ttc_mpc_inj_en,
  output logic [3:0]  mpc_wen,
  output logic [3:0]  mpc_ren,
  output logic [7:0]  mpc_adr,
  output logic [15:0] mpc_wdata,
  output logic        mpc_wr,     // one clock per VME write of the MPC injector write-data register
  output logic        scp_runstop,
  output logic        scp_force_trig,
  output logic [2:0]  scp_ram_sel,
  output logic [7:0]  scp_radr,
  output logic        inj_wr,     // one clock per VME write of the injector write-data register
  output logic [9:0]  seq_trig_en,
  output logic [3:0]  alct_trig_width,
  output logic [3:0]  alct_pre_trig_dly,
  output logic [3:0]  alct_pat_trig_dly,
  output logic [3:0]  adb_ext_trig_dly,
  output logic [3:0]  dmb_ext_trig_dly,
  output logic [3:0]  clct_ext_trig_dly,
  output logic [3:0]  alct_ext_trig_dly,
  output logic [4:0]  board_id,
  output logic [3:0]  csc_id,
  output logic [3:0]  run_id,
  output logic [3:0]  triad_persist,
  output logic [2:0]  hs_thresh,
  output logic [2:0]  ds_thresh,
  output logic [2:0]  nph_pattern,
  output logic [1:0]  drift_delay,
  output logic [2:0]  fifo_mode,
  output logic [4:0]  fifo_tbins,
  output logic [4:0]  fifo_pretrig,
  output logic [7:0]  l1a_delay,
  output logic [3:0]  l1a_window,
  output logic        l1a_internal,
  output logic [3:0]  l1a_offset,
  output logic [11:0] bxn_offset,
  output logic [1:0]  tmb_sync_err_en,
  output logic        tmb_allow_alct,
  output logic        tmb_allow_clct,
  output logic        tmb_allow_match,
  output logic [3:0]  mpc_delay,
  output logic        ccb_ignore_rx,
  output logic        seq_trig_l1aen,
  output logic        vme_ccb_cmd_enable,
  output logic        vme_ccb_cmd_strobe,
  output logic [7:0]  vme_ccb_cmd,
  output logic [3:0]  clct_flush_delay,
  output logic        wr_buf_required,
  output logic        valid_clct_required,
  output logic        l1a_allow_nol1a,
  output logic [3:0]  alct_delay,
  output logic [3:0]  clct_width,
  output logic [11:0] lhc_cycle,
  output logic [15:0] led_reg
);

  // register offsets (byte address / 2)
  localparam int unsigned R_IDREG0   = 'h00 >> 1;
  localparam int unsigned R_IDREG1   = 'h02 >> 1;
  localparam int unsigned R_IDREG2   = 'h04 >> 1;
  localparam int unsigned R_IDREG3   = 'h06 >> 1;
  localparam int unsigned R_LED      = 'h22 >> 1;
  localparam int unsigned R_MOD_CFG  = 'h28 >> 1;
  localparam int unsigned R_CCB_CFG  = 'h2A >> 1;
  localparam int unsigned R_CCB_TRIG = 'h2C >> 1;
  localparam int unsigned R_CCB_STAT = 'h2E >> 1;
  localparam int unsigned R_ALCT0_RCD= 'h3A >> 1;
  localparam int unsigned R_ALCT1_RCD= 'h3C >> 1;
  localparam int unsigned R_CFEB_INJ = 'h42 >> 1;
  localparam int unsigned R_INJ_ADR  = 'h44 >> 1;
  localparam int unsigned R_INJ_WD   = 'h46 >> 1;
  localparam int unsigned R_INJ_RD   = 'h48 >> 1;
  localparam int unsigned R_HCM_FIRST= 'h4A >> 1;
  localparam int unsigned R_HCM_LAST = 'h66 >> 1;
  localparam int unsigned R_TRIG_EN  = 'h68 >> 1;
  localparam int unsigned R_TRIG_DLY0= 'h6A >> 1;
  localparam int unsigned R_TRIG_DLY1= 'h6C >> 1;
  localparam int unsigned R_SEQ_ID   = 'h6E >> 1;
  localparam int unsigned R_SEQ_CLCT = 'h70 >> 1;
  localparam int unsigned R_SEQ_FIFO = 'h72 >> 1;
  localparam int unsigned R_SEQ_L1A  = 'h74 >> 1;
  localparam int unsigned R_SEQ_OFFS = 'h76 >> 1;
  localparam int unsigned R_SEQ_CLCT0= 'h78 >> 1;
  localparam int unsigned R_SEQ_CLCT1= 'h7A >> 1;
  localparam int unsigned R_TRIG_SRC = 'h7C >> 1;
  localparam int unsigned R_TMB_TRIG = 'h86 >> 1;
  localparam int unsigned R_MPC0_F0  = 'h88 >> 1;
  localparam int unsigned R_MPC0_F1  = 'h8A >> 1;
  localparam int unsigned R_MPC1_F0  = 'h8C >> 1;
  localparam int unsigned R_MPC1_F1  = 'h8E >> 1;
  localparam int unsigned R_MPC_INJ  = 'h90 >> 1;
  localparam int unsigned R_MPC_RADR = 'h92 >> 1;
  localparam int unsigned R_MPC_WD   = 'h94 >> 1;
  localparam int unsigned R_MPC_RD   = 'h96 >> 1;
  localparam int unsigned R_SCP_CTRL = 'h98 >> 1;
  localparam int unsigned R_SCP_RD   = 'h9A >> 1;
  localparam int unsigned R_CCB_CMD  = 'h9C >> 1;
  localparam int unsigned R_BUF_STAT = 'h9E >> 1;
  localparam int unsigned R_SEQMOD   = 'hAC >> 1;
  localparam int unsigned R_SEQSM    = 'hAE >> 1;
  localparam int unsigned R_SEQCLCTM = 'hB0 >> 1;
  localparam int unsigned R_TMBTIM   = 'hB2 >> 1;
  localparam int unsigned R_LHC_CYC  = 'hB4 >> 1;
  localparam int unsigned NREG       = 128;

  // power-up value and writable bits of each read/write register
  function automatic logic [15:0] reg_default(input int unsigned r);
    if (r >= R_HCM_FIRST && r <= R_HCM_LAST) return 16'hFFFF;
    case (r)
      R_MOD_CFG:   return 16'h0004;
      R_CCB_CFG:   return 16'h0038;
      R_CCB_TRIG:  return 16'h7504;
      R_CFEB_INJ:  return 16'h7C1F;
      R_TRIG_EN:   return 16'h0001;
      R_TRIG_DLY0: return 16'h1003;
      R_TRIG_DLY1: return 16'h0771;
      R_SEQ_ID:    return 16'h00B5;
      R_SEQ_CLCT:  return 16'h5245;
      R_SEQ_FIFO:  return 16'h0239;
      R_SEQ_L1A:   return 16'h0380;
      R_TMB_TRIG:  return 16'h00FB;
      R_SEQMOD:    return 16'h01C1;
      R_MPC_INJ:   return 16'h0205;
      R_TMBTIM:    return 16'h0031;
      R_LHC_CYC:   return 16'h0DEC;
      default:     return 16'h0000;
    endcase
  endfunction

  function automatic logic [15:0] reg_wmask(input logic [6:0] r);
    if (r >= R_HCM_FIRST && r <= R_HCM_LAST) return 16'hFFFF;
    case (r)
      R_LED:       return 16'hFFFF;
      R_MOD_CFG:   return 16'h0C1F;
      R_CCB_CFG:   return 16'h007F;
      R_CCB_TRIG:  return 16'hFF7F;
      R_CFEB_INJ:  return 16'hFFFF;
      R_INJ_ADR:   return 16'h3FFF;
      R_INJ_WD:    return 16'hFFFF;
      R_TRIG_EN:   return 16'h03FF;
      R_TRIG_DLY0: return 16'hFFFF;
      R_TRIG_DLY1: return 16'h0FFF;
      R_SEQ_ID:    return 16'h1FFF;
      R_SEQ_CLCT:  return 16'hFFFF;
      R_SEQ_FIFO:  return 16'h1FFF;
      R_SEQ_L1A:   return 16'h1FFF;
      R_SEQ_OFFS:  return 16'hFFFF;
      R_TMB_TRIG:  return 16'h01FF;
      R_MPC_INJ:   return 16'h03FF;
      R_MPC_RADR:  return 16'hFFFF;
      R_MPC_WD:    return 16'hFFFF;
      R_SCP_CTRL:  return 16'hFF3F;
      R_CCB_CMD:   return 16'hFF0F;
      R_SEQMOD:    return 16'h1FFF;
      R_TMBTIM:    return 16'h00FF;
      R_LHC_CYC:   return 16'h0FFF;
      default:     return 16'h0000;
    endcase
  endfunction

  logic [15:0] regs [NREG];
  logic        sel;
  logic [6:0]  ri;
  logic        broadcast;

  assign ri        = vme_adr[7:1];
  assign broadcast = (vme_adr[23:19] == 5'd26) || (vme_adr[23:19] == 5'd27);
  assign sel = vme_req && (vme_am == 6'h39 || vme_am == 6'h3D) && (vme_adr[18:8] == '0) &&
               ((vme_adr[23:19] == ga) || (broadcast && vme_write));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < NREG; r++) regs[r] <= reg_default(r);
    end else if (sel && vme_write) begin
      regs[ri] <= (regs[ri] & ~reg_wmask(ri)) | (vme_wdata & reg_wmask(ri));
    end
  end

  function automatic logic [15:0] rd(input logic [6:0] r);
    case (r)
      7'(R_IDREG0):    return {3'b0, ga, FW_VERSION, FW_TYPE};
      7'(R_IDREG1):    return FW_MONTHDAY;
      7'(R_IDREG2):    return FW_YEAR;
      7'(R_IDREG3):    return FW_REVCODE;
      7'(R_MOD_CFG):   return {3'b0, 1'b0, regs[r][11:10], 5'h1F, regs[r][4:0]};
      7'(R_CCB_STAT):  return {7'b0, 1'b1, ccb_cmd_in};
      7'(R_ALCT0_RCD): return {3'b0, alct0_rcd};
      7'(R_ALCT1_RCD): return {3'b0, alct1_rcd};
      7'(R_SEQ_CLCT0): return seq_clct0[15:0];
      7'(R_SEQ_CLCT1): return seq_clct1[15:0];
      7'(R_SEQCLCTM):  return {6'b0, seq_clct1[20:16], seq_clct0[20:16]};
      7'(R_TRIG_SRC):  return {8'b0, seq_trig_src};
      7'(R_TMB_TRIG):  return {5'b0, mpc_accept, regs[r][8:0]};
      7'(R_INJ_RD):    return inj_rdata;
      7'(R_MPC_INJ):   return {2'b00, mpc_acc_rdata, regs[r][9:0]};
      7'(R_MPC_RD):    return mpc_rdata;
      7'(R_SCP_CTRL):  return {regs[r][15:8], scp_trig_done, scp_waiting, regs[r][5:0]};
      7'(R_SCP_RD):    return scp_rdata;
      7'(R_MPC0_F0):   return mpc0_frame0;
      7'(R_MPC0_F1):   return mpc0_frame1;
      7'(R_MPC1_F0):   return mpc1_frame0;
      7'(R_MPC1_F1):   return mpc1_frame1;
      7'(R_CCB_CMD):   return {regs[r][15:8], 2'b0, fmm_state, regs[r][3:0]};
      7'(R_BUF_STAT):  return {buf_busy, buf_nbusy_peak, buf_nbusy};
      7'(R_SEQSM):     return {5'b0, read_sm, tmb_sm, clct_sm};
      default:         return regs[r];
    endcase
  endfunction

  // the RAM write follows the register write by one clock, so it sees the new data
  logic inj_wr_q;
  always_ff @(posedge clk) begin
    if (rst) inj_wr_q <= 1'b0;
    else     inj_wr_q <= sel && vme_write && (ri == 7'(R_INJ_WD));
  end
  logic mpc_wr_q;
  always_ff @(posedge clk) begin
    if (rst) mpc_wr_q <= 1'b0;
    else     mpc_wr_q <= sel && vme_write && (ri == 7'(R_MPC_WD));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vme_ack   <= 1'b0;
      vme_rdata <= '0;
    end else begin
      vme_ack   <= sel;
      vme_rdata <= (sel && !vme_write) ? rd(ri) : 16'h0000;
    end
  end

  // configuration decode
  always_comb begin
    for (int c = 0; c < NCFEB; c++)
      for (int p = 0; p < 3; p++) begin
        hcm[c][2*p]   = regs[R_HCM_FIRST + 3*c + p][7:0];
        hcm[c][2*p+1] = regs[R_HCM_FIRST + 3*c + p][15:8];
      end
  end

  assign mask_all            = regs[R_CFEB_INJ][4:0];
  assign inj_febsel          = regs[R_CFEB_INJ][9:5];
  assign injector_mask       = regs[R_CFEB_INJ][14:10];
  assign inj_trig_vme        = regs[R_CFEB_INJ][15];
  assign inj_wen             = regs[R_INJ_ADR][2:0];
  assign inj_ren             = regs[R_INJ_ADR][5:3];
  assign inj_rwadr           = regs[R_INJ_ADR][13:6];
  assign inj_wdata           = regs[R_INJ_WD];
  assign inj_wr              = inj_wr_q;
  assign scp_runstop         = regs[R_SCP_CTRL][0];
  assign mpc_nframes         = regs[R_MPC_INJ][7:0];
  assign mpc_inject          = regs[R_MPC_INJ][8];
  assign ttc_mpc_inj_en      = regs[R_MPC_INJ][9];
  assign mpc_wen             = regs[R_MPC_RADR][3:0];
  assign mpc_ren             = regs[R_MPC_RADR][7:4];
  assign mpc_adr             = regs[R_MPC_RADR][15:8];
  assign mpc_wdata           = regs[R_MPC_WD];
  assign mpc_wr              = mpc_wr_q;
  assign scp_force_trig      = regs[R_SCP_CTRL][1];
  assign scp_ram_sel         = regs[R_SCP_CTRL][4:2];
  assign scp_radr            = regs[R_SCP_CTRL][15:8];
  assign seq_trig_en         = regs[R_TRIG_EN][9:0];
  assign alct_trig_width     = regs[R_TRIG_DLY0][3:0];
  assign alct_pre_trig_dly   = regs[R_TRIG_DLY0][7:4];
  assign alct_pat_trig_dly   = regs[R_TRIG_DLY0][11:8];
  assign adb_ext_trig_dly    = regs[R_TRIG_DLY0][15:12];
  assign dmb_ext_trig_dly    = regs[R_TRIG_DLY1][3:0];
  assign clct_ext_trig_dly   = regs[R_TRIG_DLY1][7:4];
  assign alct_ext_trig_dly   = regs[R_TRIG_DLY1][11:8];
  assign board_id            = regs[R_SEQ_ID][4:0];
  assign csc_id              = regs[R_SEQ_ID][8:5];
  assign run_id              = regs[R_SEQ_ID][12:9];
  assign triad_persist       = regs[R_SEQ_CLCT][3:0];
  assign hs_thresh           = regs[R_SEQ_CLCT][6:4];
  assign ds_thresh           = regs[R_SEQ_CLCT][9:7];
  assign nph_pattern         = regs[R_SEQ_CLCT][12:10];
  assign drift_delay         = regs[R_SEQ_CLCT][14:13];
  assign fifo_mode           = regs[R_SEQ_FIFO][2:0];
  assign fifo_tbins          = regs[R_SEQ_FIFO][7:3];
  assign fifo_pretrig        = regs[R_SEQ_FIFO][12:8];
  assign l1a_delay           = regs[R_SEQ_L1A][7:0];
  assign l1a_window          = regs[R_SEQ_L1A][11:8];
  assign l1a_internal        = regs[R_SEQ_L1A][12];
  assign l1a_offset          = regs[R_SEQ_OFFS][3:0];
  assign bxn_offset          = regs[R_SEQ_OFFS][15:4];
  assign tmb_sync_err_en     = regs[R_TMB_TRIG][1:0];
  assign tmb_allow_alct      = regs[R_TMB_TRIG][2];
  assign tmb_allow_clct      = regs[R_TMB_TRIG][3];
  assign tmb_allow_match     = regs[R_TMB_TRIG][4];
  assign mpc_delay           = regs[R_TMB_TRIG][8:5];
  assign ccb_ignore_rx       = regs[R_CCB_CFG][0];
  assign seq_trig_l1aen      = regs[R_CCB_TRIG][2];
  assign vme_ccb_cmd_enable  = regs[R_CCB_CMD][0];
  assign vme_ccb_cmd_strobe  = regs[R_CCB_CMD][1];
  assign vme_ccb_cmd         = regs[R_CCB_CMD][15:8];
  assign clct_flush_delay    = regs[R_SEQMOD][3:0];
  assign wr_buf_required     = regs[R_SEQMOD][6];
  assign valid_clct_required = regs[R_SEQMOD][7];
  assign l1a_allow_nol1a     = regs[R_SEQMOD][10];
  assign alct_delay          = regs[R_TMBTIM][3:0];
  assign clct_width          = regs[R_TMBTIM][7:4];
  assign lhc_cycle           = regs[R_LHC_CYC][11:0];
  assign led_reg             = regs[R_LED];

endmodule
