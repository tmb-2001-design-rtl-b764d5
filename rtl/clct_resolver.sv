// clct_resolver: picks the two best cathode muons from the pattern finders.
//
// Candidates are all 160 1/2-strip keys and all 40 di-strip keys, each with
// its best pattern and layer count. A candidate's rank is
// {layers hit, 1/2-strip flag, pattern number}: more layers first, then
// 1/2-strip over di-strip, then the higher (straighter) pattern; equal ranks
// go to the lower key. The first CLCT is the best candidate. The second is
// the best candidate whose key lies more than SEP 1/2-strips from the first
// one's, so one muon is not reported twice. A di-strip key points to the
// lower 1/2-strip of its di-strip (key = 4 x di-strip). A CLCT is valid when
// its layer count reaches nph_pattern.
//
// "Best of 7 patterns for 2 muons", the 21-bit word, the di-strip key rule
// and nph_pattern are the board's; the rank order and the SEP exclusion are
// this design's choices. The bxn, sync_err and bx0_local fields are left 0
// here; the sequencer fills them when it latches the CLCT.
//
// Timing: one register stage.
module clct_resolver
  import tmb_pkg::*;
#(
  parameter int unsigned SEP = 5
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NHS-1:0][2:0]  hs_nhit,
  input  logic [NHS-1:0][2:0]  hs_pat,
  input  logic [NDS-1:0][2:0]  ds_nhit,
  input  logic [NDS-1:0][2:0]  ds_pat,
  input  logic [2:0]           nph_pattern,
  output clct_t                clct0,
  output clct_t                clct1
);

  localparam int NC = NHS + NDS;

  function automatic clct_t make_clct(input int unsigned hskey, input logic hsds,
                                      input logic [2:0] n, input logic [2:0] p,
                                      input logic [2:0] nph);
    clct_t c;
    c       = '0;
    c.vpf   = (n != 0) && (n >= nph);
    c.nhit  = n;
    c.pat   = p;
    c.hsds  = hsds;
    c.bend  = p[0];
    c.key   = 5'(hskey % NHS_CF);
    c.cfeb  = 3'(hskey / NHS_CF);
    return c;
  endfunction

  logic [NC-1:0][6:0]  rank;
  logic [NC-1:0][7:0]  ckey;
  clct_t c0_c, c1_c;

  always_comb begin
    for (int i = 0; i < NC; i++) begin
      if (i < NHS) begin
        rank[i] = (hs_nhit[i] == 0) ? 7'd0 : {hs_nhit[i], 1'b1, hs_pat[i]};
        ckey[i] = 8'(i);
      end else begin
        rank[i] = (ds_nhit[i-NHS] == 0) ? 7'd0 : {ds_nhit[i-NHS], 1'b0, ds_pat[i-NHS]};
        ckey[i] = 8'(4 * (i - NHS));
      end
    end
  end

  always_comb begin
    int b0, b1;
    logic [6:0] r0, r1;
    b0 = 0; r0 = '0;
    for (int i = 0; i < NC; i++)
      if (rank[i] > r0) begin r0 = rank[i]; b0 = i; end
    b1 = 0; r1 = '0;
    for (int i = 0; i < NC; i++)
      if (rank[i] > r1 &&
          ((ckey[i] > ckey[b0]) ? (ckey[i] - ckey[b0]) : (ckey[b0] - ckey[i])) > 8'(SEP)) begin
        r1 = rank[i]; b1 = i;
      end
    c0_c = (r0 == 0) ? '0 : make_clct(ckey[b0], r0[3], r0[6:4], r0[2:0], nph_pattern);
    c1_c = (r1 == 0) ? '0 : make_clct(ckey[b1], r1[3], r1[6:4], r1[2:0], nph_pattern);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      clct0 <= '0;
      clct1 <= '0;
    end else begin
      clct0 <= c0_c;
      clct1 <= c1_c;
    end
  end

endmodule
