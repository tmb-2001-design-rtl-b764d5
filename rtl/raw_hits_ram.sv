// raw_hits_ram: 8-event raw-hits store for the CFEB triad bits.
//
// The 240 triad lines (5 CFEBs x 6 layers x 8 di-strips) are sampled every
// clock into a programmable delay line. On a pre-trigger, the sequencer
// names a free event buffer and the block writes fifo_tbins consecutive time
// bins into it, the first being the sample taken fifo_pretrig clocks before
// the pre-trigger, so the readout sees the hits leading up to the trigger as
// well as those after it. The RAM holds NBUF buffers of 2**TBW time bins each,
// addressed {buffer, time bin}, with a separate read port for the readout.
//
// The 8-event buffer, fifo_tbins and fifo_pretrig are the board's; the delay
// line, the fixed per-buffer region of 32 time bins and the port timing are
// this design's choices.
//
// Timing: start in cycle n (the pre-trigger cycle) writes time bin k in cycle
// n+1+k; busy is high while writing. Reads are registered: rdata is valid the
// cycle after rd_adr is presented.
module raw_hits_ram #(
  parameter int unsigned W    = 240,
  parameter int unsigned NBUF = 8,
  parameter int unsigned TBW  = 5
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [W-1:0]                  din,
  input  logic [TBW-1:0]                fifo_pretrig,
  input  logic [TBW-1:0]                fifo_tbins,
  input  logic                          start,
  input  logic [$clog2(NBUF)-1:0]       start_buf,
  output logic                          busy,
  input  logic [$clog2(NBUF)+TBW-1:0]   rd_adr,
  output logic [W-1:0]                  rdata
);

  localparam int AW = $clog2(NBUF) + TBW;
  localparam int ND = 1 << TBW;

  logic [ND-1:0][W-1:0]       hist;   // hist[j] = sample from j+1 clocks ago
  logic [W-1:0]               mem [1 << AW];
  logic [$clog2(NBUF)-1:0]    wbuf;
  logic [TBW-1:0]             wtbin;

  always_ff @(posedge clk) begin
    hist <= {hist[ND-2:0], din};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      wbuf  <= '0;
      wtbin <= '0;
    end else if (start && !busy && fifo_tbins != 0) begin
      busy  <= 1'b1;
      wbuf  <= start_buf;
      wtbin <= '0;
    end else if (busy) begin
      if (wtbin == fifo_tbins - TBW'(1)) busy <= 1'b0;
      wtbin <= wtbin + TBW'(1);
    end
  end

  // In write cycle n+1+k, hist[fifo_pretrig] holds the sample of cycle
  // n+k-fifo_pretrig, which is time bin k.
  always_ff @(posedge clk) begin
    if (busy) mem[{wbuf, wtbin}] <= hist[fifo_pretrig];
    rdata <= mem[rd_adr];
  end

endmodule
