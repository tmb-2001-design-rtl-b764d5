// tmb_pkg: types and constants shared by the TMB2001 trigger-board logic.
//
// The board takes comparator "triads" from five cathode front-end boards
// (CFEBs, 6 layers x 8 triads each), finds cathode muon tracks (CLCTs),
// matches them with anode tracks (ALCTs), sends the result to the muon port
// card (MPC) and reads raw hits out to the DAQ motherboard (DMB).
//
// The CLCT and ALCT word layouts follow the register read-back formats
// (CLCT: 21 bits, ALCT: 13 bits). The TTC command codes are the ones the
// board decodes from the crate's fast control bus. The FMM state encoding,
// the readout descriptor and the event-record layouts are this design's own.
package tmb_pkg;

  // Chamber geometry
  localparam int NCFEB   = 5;   // CFEBs on one chamber
  localparam int NLY     = 6;   // CSC layers
  localparam int NTRIAD  = 8;   // triads (= di-strips) per layer per CFEB
  localparam int NHS_CF  = 32;  // 1/2-strips per layer per CFEB (4 per triad)
  localparam int NHS     = NCFEB * NHS_CF; // 160 key 1/2-strips
  localparam int NDS     = NCFEB * NTRIAD; // 40 key di-strips
  localparam int NPAT    = 7;   // programmable bend patterns, numbered 1..7
  localparam int NBUF    = 8;   // raw-hits / event buffers
  localparam int RAW_W   = NCFEB * NLY * NTRIAD; // 240 triad bits per time bin

  // Pattern envelopes: for each pattern 1..7 and layer, a window of
  // 2*PAT_HW+1 cells centred on the key (cell PAT_HW is the key column).
  localparam int PAT_HW = 5;
  localparam int PAT_W  = 2 * PAT_HW + 1;
  typedef logic [NPAT:1][NLY-1:0][PAT_W-1:0] pat_env_t;

  // Power-up envelope set, used until software loads its own. Pattern 7 is
  // a straight road; lower numbers bend more (6,5: 1 cell per 2 layers;
  // 4,3: 2; 2,1: 3), odd numbers bend one way, even the other (pattern lsb
  // = bend direction). Each layer's road is 3 cells wide. Key layer is 2.
  function automatic pat_env_t default_env();
    pat_env_t e;
    e = '0;
    for (int p = 1; p <= NPAT; p++) begin
      int m;
      m = (NPAT - p + 1) / 2;
      for (int ly = 0; ly < NLY; ly++) begin
        int off;
        off = (m * (ly - 2)) / 2;
        if (p[0]) off = -off;
        for (int d = -1; d <= 1; d++)
          if (PAT_HW + off + d >= 0 && PAT_HW + off + d < PAT_W)
            e[p][ly][PAT_HW + off + d] = 1'b1;
      end
    end
    return e;
  endfunction

  // Cathode LCT word, as read back at ADR_SEQ_CLCT0/1 + ADR_SEQCLCTM (21 bits)
  typedef struct packed {
    logic       bx0_local; // [20]
    logic       sync_err;  // [19]
    logic [1:0] bxn;       // [18:17]
    logic [2:0] cfeb;      // [16:14]
    logic [4:0] key;       // [13:9]  key 1/2-strip within the CFEB
    logic       bend;      // [8]     = pattern lsb
    logic       hsds;      // [7]     1 = 1/2-strip pattern, 0 = di-strip
    logic [2:0] pat;       // [6:4]
    logic [2:0] nhit;      // [3:1]
    logic       vpf;       // [0]
  } clct_t;

  // Anode LCT word, as read back at ADR_ALCT0_RCD/ADR_ALCT1_RCD (13 bits)
  typedef struct packed {
    logic [1:0] bxn;     // [12:11]
    logic [6:0] key;     // [10:4] key wire group
    logic       amu;     // [3]
    logic [1:0] quality; // [2:1]
    logic       vpf;     // [0]
  } alct_t;

  // TTC command codes decoded by the TMB (ccb_cmd[5:0])
  typedef enum logic [5:0] {
    TTC_BX0        = 6'h01,
    TTC_L1RESET    = 6'h03,
    TTC_START_TRIG = 6'h06,
    TTC_STOP_TRIG  = 6'h07,
    TTC_MPC_INJECT = 6'h24,
    TTC_BXRESET    = 6'h32
  } ttc_cmd_e;

  // FMM (fast merging module) trigger-state machine
  typedef enum logic [1:0] {
    FMM_STOP    = 2'd0,
    FMM_RESYNC  = 2'd1,
    FMM_WAITBX0 = 2'd2,
    FMM_RUN     = 2'd3
  } fmm_state_e;

  // Readout FIFO modes (ADR_SEQ_FIFO fifo_mode)
  typedef enum logic [2:0] {
    FIFO_NOHITS_FULL = 3'd0,
    FIFO_ALL_FULL    = 3'd1,
    FIFO_LOCAL_FULL  = 3'd2,
    FIFO_NOHITS_SHORT= 3'd3,
    FIFO_NONE        = 3'd4
  } fifo_mode_e;

  // L1A type codes in header frame 2
  typedef enum logic [1:0] {
    L1A_NORMAL   = 2'd0,
    L1A_ALCTONLY = 2'd1,
    L1A_ONLY     = 2'd2,
    L1A_NOL1A    = 2'd3
  } l1a_type_e;

  // Per-event record written at pre-trigger / TMB decision and read at
  // readout (the "8-event buffer for LCTs, TMB-match results and MPC frames")
  typedef struct packed {
    clct_t       clct0;
    clct_t       clct1;
    logic [11:0] bxn_pretrig;
    logic [7:0]  trig_src;
    logic [4:0]  active_feb;
    logic        hs_pretrig;
    logic        invalid_pattern;
    logic        tmb_match;
    logic        alct_only;
    logic        clct_only;
    logic [3:0]  match_time;
    logic [15:0] mpc0_frame0;
    logic [15:0] mpc0_frame1;
    logic [15:0] mpc1_frame0;
    logic [15:0] mpc1_frame1;
    logic [1:0]  mpc_accept;
    logic [4:0]  tbin_pretrig;
  } event_rec_t;

  // Descriptor pushed on the L1A readout stack
  typedef struct packed {
    logic [1:0]  l1a_type;
    logic        has_buf;
    logic [2:0]  buf_adr;
    logic [11:0] bxn_l1a;
    logic [3:0]  l1a_cnt;
  } rdo_desc_t;

endpackage
