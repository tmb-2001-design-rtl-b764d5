// cfeb_injector: VME-loaded pattern RAM that plays triads into the CFEB inputs.
//
// For test without a chamber, every CFEB has three RAMs of 256 x 16 bits,
// one per layer pair (layers 0/1, 2/3, 4/5). Each word holds the serial
// triad line values of one time bin for the pair: bits 7:0 are the 8
// di-strip lines of the even layer, bits 15:8 those of the odd layer. A
// hit is therefore written as its three triad bits (start, strip,
// 1/2-strip) in three successive addresses. When inj_start fires, the
// injector reads one address per clock from 0 to 255 and drives those
// words onto the triad lines of every CFEB whose injector_mask bit is set;
// the top ORs them with the cable triads.
//
// VME side: inj_febsel chooses the CFEB(s) a write goes to, inj_wen the
// RAM(s) of each, inj_adr the time bin; a write happens on the inj_wr pulse
// (a VME write of the write-data register). inj_rdata returns the addressed
// word of the lowest selected CFEB and the lowest read-enabled RAM.
//
// The RAM organisation (three layer-pair RAMs per CFEB, 8-bit address, 16
// bits of two layers per word), the CFEB select, the write/read enables and
// the injector mask are the board's. Playing all 256 addresses once per
// start, and ORing with the cable triads, are this design's choices: the
// length of a playback is not stated.
//
// Timing: inj_rdata follows the address/select one clock later. The first
// injected word appears on inj_triad two clocks after inj_start, and
// busy stays high for the 256 clocks of playback.
module cfeb_injector
  import tmb_pkg::*;
#(
  parameter int unsigned AW = 8   // injector RAM address bits (256 time bins)
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic [NCFEB-1:0]                     inj_febsel,   // CFEBs selected for RAM access
  input  logic [NCFEB-1:0]                     injector_mask,// CFEBs that take part in injection
  input  logic [2:0]                           inj_wen,      // write enable for RAM Ly01, Ly23, Ly45
  input  logic [2:0]                           inj_ren,      // read select for RAM Ly01, Ly23, Ly45
  input  logic [AW-1:0]                        inj_adr,      // RAM time-bin address
  input  logic [15:0]                          inj_wdata,    // {odd layer, even layer} triad bits
  input  logic                                 inj_wr,       // one-clock write strobe
  output logic [15:0]                          inj_rdata,    // addressed word read back
  input  logic                                 inj_start,    // start a playback
  output logic                                 busy,         // playback in progress
  output logic [NCFEB-1:0][NLY-1:0][NTRIAD-1:0] inj_triad    // injected triad lines
);

  localparam int unsigned DEPTH = 1 << AW;

  // one RAM per CFEB and layer pair, each with its own write enable; the
  // VME read port and the playback port read every RAM asynchronously
  logic [15:0] vme_word  [NCFEB][3];
  logic [15:0] play_word [NCFEB][3];
  logic [AW-1:0] ptr;

  for (genvar gc = 0; gc < NCFEB; gc++) begin : g_feb
    for (genvar gr = 0; gr < 3; gr++) begin : g_ram
      logic [15:0] mem [DEPTH];
      always_ff @(posedge clk)
        if (inj_wr && inj_febsel[gc] && inj_wen[gr]) mem[inj_adr] <= inj_wdata;
      assign vme_word[gc][gr]  = mem[inj_adr];
      assign play_word[gc][gr] = mem[ptr];
    end
  end

  int unsigned rc, rr;
  always_comb begin
    rc = 0;
    rr = 0;
    for (int c = NCFEB - 1; c >= 0; c--) if (inj_febsel[c]) rc = c;
    for (int r = 2; r >= 0; r--) if (inj_ren[r]) rr = r;
  end

  always_ff @(posedge clk) begin
    if (rst) inj_rdata <= '0;
    else     inj_rdata <= vme_word[rc][rr];
  end

  // playback
  logic          rd_en;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      ptr  <= '0;
    end else if (!busy) begin
      busy <= inj_start;
      ptr  <= '0;
    end else begin
      ptr <= ptr + 1'b1;
      if (ptr == AW'(DEPTH - 1)) busy <= 1'b0;
    end
  end

  assign rd_en = busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      inj_triad <= '0;
    end else begin
      for (int c = 0; c < NCFEB; c++)
        for (int r = 0; r < 3; r++) begin
          if (rd_en && injector_mask[c]) begin
            inj_triad[c][2*r]   <= play_word[c][r][7:0];
            inj_triad[c][2*r+1] <= play_word[c][r][15:8];
          end else begin
            inj_triad[c][2*r]   <= '0;
            inj_triad[c][2*r+1] <= '0;
          end
        end
    end
  end

endmodule
