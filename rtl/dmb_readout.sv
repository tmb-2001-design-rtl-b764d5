// dmb_readout: builds each selected event's record for the DAQ motherboard.
//
// Pops events from the L1A readout stack and writes them, one 16-bit frame
// per clock, to the DMB FIFO. Bit 15 of a frame is the DDU-special flag,
// bits 14:0 are data. Three formats, chosen by fifo_mode and by whether the
// event kept a raw-hits buffer:
//
//   full readout (modes 1 and 2): 6B0C, 21 header frames, 6E0B, the raw hits
//     of each CFEB read out (mode 1: every instantiated CFEB, mode 2 "local":
//     only the CFEBs active at pre-trigger), 6E0C, an optional 2AAA 5555 pair
//     that makes the frame count a multiple of 4, two CRC frames, E0F and the
//     word count. Raw hits are one frame per CFEB, time bin and layer:
//     {CFEB[2:0], time bin[3:0], triads[7:0]}, CFEB by CFEB, time bin by time
//     bin, layers 0..5.
//   full header only (mode 0): the same without raw hits, always 28 frames.
//   short header (mode 3, or an event that had no buffer, e.g. L1A-only):
//     6B0C, 3 header frames, two CRC frames, EEF and the word count, 8 frames.
//   mode 4 reads nothing out.
// Trailer frames carry DDU code 101 (binary) in bits 14:12; the CRC and word
// count frames also set bit 11. The CRC covers every frame before the first
// CRC frame. The 8-entry event-record memory (the "distributed RAM" buffer
// for LCTs, match results and MPC frames) is written by the trigger path and
// read here. When the event is out its raw-hits buffer is freed.
//
// Frame order, markers, the header field list, the padding rule and the word
// counts (x = 28 + 6 * CFEBs * time bins [+2], 28, 8) follow the board's
// readout format. Bit positions inside header frames that the format leaves
// unclear, the CRC polynomial and the first_frame flag also set on 6E0B (as
// the format tables show) are this design's reading.
//
// Timing: dmb_wr marks a valid frame. Raw hits need one clock to read each
// time bin from the raw-hits RAM, so each CFEB-time-bin group takes 7 clocks
// for 6 frames.
module dmb_readout
  import tmb_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  // L1A readout stack
  input  logic             stk_empty,
  input  rdo_desc_t        stk_dout,
  output logic             stk_pop,
  // event record memory write port
  input  logic             rec_wr,
  input  logic [2:0]       rec_buf,
  input  event_rec_t       rec_in,
  // raw hits RAM read port
  output logic [7:0]       raw_adr,
  input  logic [RAW_W-1:0] raw_rdata,
  // configuration
  input  logic [2:0]       fifo_mode,
  input  logic [4:0]       fifo_tbins,
  input  logic [4:0]       fifo_pretrig,
  input  logic [4:0]       board_id,
  input  logic [3:0]       csc_id,
  input  logic [3:0]       run_id,
  input  logic [NCFEB-1:0] cfeb_exists,
  input  logic [2:0]       hs_thresh,
  input  logic [2:0]       ds_thresh,
  input  logic [3:0]       triad_persist,
  input  logic [13:0]      revcode,
  // status sampled at readout
  input  logic [3:0]       buf_nbusy,
  input  logic [7:0]       buf_busy,
  input  logic [4:0]       buf_flags,      // {empty, half, full-1, full, ovf}
  input  logic [2:0]       wr_buf_adr,
  input  logic             wr_buf_ready,
  input  logic [3:0]       cnt_nobuf,
  input  logic [3:0]       cnt_invp,
  input  logic [3:0]       cnt_tmbrej,
  input  logic [3:0]       l1a_tx_cnt,
  input  logic             sync_err,
  // DMB FIFO
  output logic             dmb_wr,
  output logic [15:0]      dmb_data,
  output logic             dmb_first,
  output logic             dmb_last,
  output logic             busy,
  output logic             buf_free,
  output logic [2:0]       buf_free_adr,
  output logic [4:0]       read_sm
);

  typedef enum logic [4:0] {
    R_IDLE, R_HDR, R_E0B, R_RAWRD, R_RAW, R_E0C, R_PAD1, R_PAD2,
    R_CRC0, R_CRC1, R_EOF, R_WC, R_DONE
  } rstate_e;

  rstate_e     st;
  event_rec_t  rec_mem [NBUF];
  event_rec_t  rec;
  rdo_desc_t   d;
  logic        short_hdr, do_hits;
  logic [NCFEB-1:0] rd_list;
  logic [4:0]  idx;
  logic [2:0]  cfeb;
  logic [4:0]  tbin;
  logic [2:0]  ly;
  logic [10:0] wc;

  always_ff @(posedge clk) begin
    if (rec_wr) rec_mem[rec_buf] <= rec_in;
  end

  // header frames 0..21 (full) or 0..3 (short)
  function automatic logic [14:0] hdr(input logic [4:0] i);
    logic [1:0] rtype;
    rtype = short_hdr ? 2'd3 : (fifo_mode == 3'd2) ? 2'd2 : (fifo_mode == 3'd1) ? 2'd1 : 2'd0;
    unique case (i)
      5'd0:  return 15'h6B0C;
      5'd1:  return {fifo_mode, 2'b0, (do_hits ? rd_list : 5'b0), fifo_tbins};
      5'd2:  return {d.l1a_type, board_id, csc_id, d.l1a_cnt};
      5'd3:  return {1'b0, rtype, d.bxn_l1a};
      5'd4:  return {1'b0, fifo_pretrig, d.has_buf, 3'(NCFEB), 5'd22};
      5'd5:  return {2'b0, rec.hs_pretrig, rec.trig_src, l1a_tx_cnt};
      5'd6:  return {1'b0, run_id, cfeb_exists, rec.active_feb};
      5'd7:  return {2'b0, sync_err, rec.bxn_pretrig};
      5'd8:  return rec.clct0[14:0];
      5'd9:  return rec.clct1[14:0];
      5'd10: return {2'b0, rec.invalid_pattern, rec.clct1[20:15], rec.clct0[20:15]};
      5'd11: return {triad_persist, rec.match_time, 2'b0, 2'b0,
                     rec.clct_only, rec.alct_only, rec.tmb_match};
      5'd12: return rec.mpc0_frame0[14:0];
      5'd13: return rec.mpc0_frame1[14:0];
      5'd14: return rec.mpc1_frame0[14:0];
      5'd15: return rec.mpc1_frame1[14:0];
      5'd16: return {1'b0, ds_thresh, hs_thresh, 2'b0, rec.mpc_accept,
                     rec.mpc1_frame1[15], rec.mpc1_frame0[15],
                     rec.mpc0_frame1[15], rec.mpc0_frame0[15]};
      5'd17: return {1'b0, buf_flags, wr_buf_adr, rec.tbin_pretrig, wr_buf_ready};
      5'd18: return {2'b0, 1'b0, buf_busy, buf_nbusy};
      5'd19: return {1'b0, d.buf_adr, rec.tbin_pretrig, d.has_buf, d.has_buf,
                     rec.tmb_match, rec.clct_only, rec.alct_only,
                     rec.tmb_match | rec.clct_only | rec.alct_only};
      5'd20: return {3'b0, cnt_tmbrej, cnt_invp, cnt_nobuf};
      5'd21: return {1'b0, revcode};
      default: return '0;
    endcase
  endfunction

  // first CFEB in a list at or after position s
  function automatic logic [3:0] next_cfeb(input logic [NCFEB-1:0] l, input int s);
    for (int c = 0; c < NCFEB; c++)
      if (c >= s && l[c]) return 4'(c);
    return 4'd15;
  endfunction

  // CRC over every frame before the first CRC frame
  logic        crc_init, crc_en;
  logic [21:0] crc, crc_next;
  crc22 u_crc (.clk, .rst, .init(crc_init), .en(crc_en), .din(dmb_data), .crc, .crc_next);
  assign crc_en = dmb_wr && !(st == R_CRC1 || st == R_EOF || st == R_WC || st == R_DONE || st == R_IDLE);

  assign raw_adr  = {d.buf_adr, tbin};
  assign busy     = (st != R_IDLE);
  assign read_sm  = st;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= R_IDLE; d <= '0; rec <= '0; short_hdr <= 1'b0; do_hits <= 1'b0; rd_list <= '0;
      idx <= '0; cfeb <= '0; tbin <= '0; ly <= '0; wc <= '0;
      stk_pop <= 1'b0; dmb_wr <= 1'b0; dmb_data <= '0; dmb_first <= 1'b0; dmb_last <= 1'b0;
      buf_free <= 1'b0; buf_free_adr <= '0; crc_init <= 1'b1;
    end else begin
      stk_pop <= 1'b0; dmb_wr <= 1'b0; dmb_first <= 1'b0; dmb_last <= 1'b0;
      buf_free <= 1'b0; crc_init <= 1'b0;
      if (dmb_wr) wc <= wc + 11'd1;
      unique case (st)
        R_IDLE: begin
          if (!stk_empty && !stk_pop) begin
            stk_pop   <= 1'b1;
            d         <= stk_dout;
            rec       <= rec_mem[stk_dout.buf_adr];
            short_hdr <= (fifo_mode == 3'd3) || !stk_dout.has_buf;
            do_hits   <= stk_dout.has_buf && (fifo_mode == 3'd1 || fifo_mode == 3'd2) && fifo_tbins != 0;
            rd_list   <= (fifo_mode == 3'd2) ? (rec_mem[stk_dout.buf_adr].active_feb & cfeb_exists)
                                             : cfeb_exists;
            idx       <= '0;
            wc        <= '0;
            crc_init  <= 1'b1;
            st        <= (fifo_mode > 3'd3) ? R_DONE : R_HDR;
          end
        end
        R_HDR: begin
          dmb_wr    <= 1'b1;
          dmb_data  <= {1'b0, hdr(idx)};
          dmb_first <= (idx == 0);
          idx       <= idx + 5'd1;
          if (idx == (short_hdr ? 5'd3 : 5'd21)) st <= short_hdr ? R_CRC0 : R_E0B;
        end
        R_E0B: begin
          logic [3:0] c;
          dmb_wr <= 1'b1; dmb_data <= 16'h6E0B; dmb_first <= 1'b1;
          c = next_cfeb(rd_list, 0);
          if (do_hits && c != 4'd15) begin
            cfeb <= c[2:0]; tbin <= '0; st <= R_RAWRD;
          end else st <= R_E0C;
        end
        R_RAWRD: begin
          ly <= '0;
          st <= R_RAW;
        end
        R_RAW: begin
          dmb_wr   <= 1'b1;
          dmb_data <= {1'b0, cfeb, tbin[3:0], raw_rdata[(cfeb*NLY + ly)*NTRIAD +: NTRIAD]};
          if (ly == 3'(NLY - 1)) begin
            if (tbin == fifo_tbins - 5'd1) begin
              logic [3:0] c;
              c = next_cfeb(rd_list, int'(cfeb) + 1);
              tbin <= '0;
              if (c == 4'd15) st <= R_E0C;
              else begin cfeb <= c[2:0]; st <= R_RAWRD; end
            end else begin
              tbin <= tbin + 5'd1;
              st   <= R_RAWRD;
            end
          end else ly <= ly + 3'd1;
        end
        R_E0C: begin
          dmb_wr <= 1'b1; dmb_data <= 16'h6E0C;
          // wc counts frames before the one on the bus; add it, this 6E0C and
          // the 4 trailer frames
          st <= ((wc + 11'd6) % 11'd4 != 0) ? R_PAD1 : R_CRC0;
        end
        R_PAD1: begin dmb_wr <= 1'b1; dmb_data <= 16'h2AAA; st <= R_PAD2; end
        R_PAD2: begin dmb_wr <= 1'b1; dmb_data <= 16'h5555; st <= R_CRC0; end
        R_CRC0: begin dmb_wr <= 1'b1; dmb_data <= {1'b1, 3'b101, 1'b1, crc_next[10:0]};  st <= R_CRC1; end
        R_CRC1: begin dmb_wr <= 1'b1; dmb_data <= {1'b1, 3'b101, 1'b1, crc[21:11]}; st <= R_EOF; end
        R_EOF: begin
          dmb_wr <= 1'b1;
          dmb_data <= short_hdr ? {1'b1, 3'b101, 12'hEEF} : {1'b1, 3'b101, 12'hE0F};
          st <= R_WC;
        end
        R_WC: begin
          dmb_wr <= 1'b1; dmb_last <= 1'b1;
          dmb_data <= {1'b1, 3'b101, 1'b1, wc + 11'd2}; // + frame on bus + this one
          st <= R_DONE;
        end
        R_DONE: begin
          buf_free     <= d.has_buf;
          buf_free_adr <= d.buf_adr;
          st           <= R_IDLE;
        end
        default: st <= R_IDLE;
      endcase
    end
  end

endmodule
