// buffer_manager: allocator for the 8 raw-hits event buffers.
//
// Each pre-trigger that stores raw hits takes one buffer; the buffer stays
// busy until the event has been read out or discarded. A priority encoder
// always points at the lowest-numbered free buffer (wr_buf_adr) and
// wr_buf_ready says one exists. Status for the buffer register and the
// readout header: the busy list, the number busy, the peak number busy since
// reset, and empty / half-full / full-1 / full flags. An allocation while
// full sets the sticky overflow flag and is ignored.
//
// Eight buffers, the priority encoding, the busy list, count and peak are the
// board's; the handshake (an alloc pulse, a mask of buffers to free so that
// several sources can free in the same clock)
// and "half full" meaning at least 4 busy are this design's choices.
//
// Timing: alloc takes wr_buf_adr at the clock edge; the busy list and all
// status outputs reflect it one cycle later. Allocating and freeing in the
// same cycle is allowed.
module buffer_manager #(
  parameter int unsigned NBUF = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     alloc,
  input  logic [NBUF-1:0]          free_mask,   // buffers released this clock
  output logic                     wr_buf_ready,
  output logic [$clog2(NBUF)-1:0]  wr_buf_adr,
  output logic [NBUF-1:0]          busy,
  output logic [$clog2(NBUF):0]    nbusy,
  output logic [$clog2(NBUF):0]    nbusy_peak,
  output logic                     buf_empty,
  output logic                     buf_half,
  output logic                     buf_full1,
  output logic                     buf_full,
  output logic                     buf_ovf
);

  localparam int AW = $clog2(NBUF);

  always_comb begin
    wr_buf_ready = 1'b0;
    wr_buf_adr   = '0;
    for (int i = NBUF - 1; i >= 0; i--)
      if (!busy[i]) begin
        wr_buf_ready = 1'b1;
        wr_buf_adr   = AW'(i);
      end
  end

  always_comb begin
    nbusy = '0;
    for (int i = 0; i < NBUF; i++) nbusy = nbusy + (AW+1)'(busy[i]);
  end

  assign buf_empty = (nbusy == 0);
  assign buf_half  = (nbusy >= (AW+1)'(NBUF / 2));
  assign buf_full1 = (nbusy == (AW+1)'(NBUF - 1));
  assign buf_full  = (nbusy == (AW+1)'(NBUF));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= '0;
      nbusy_peak <= '0;
      buf_ovf    <= 1'b0;
    end else begin
      busy <= busy & ~free_mask;
      if (alloc) begin
        if (wr_buf_ready) busy[wr_buf_adr] <= 1'b1;
        else buf_ovf <= 1'b1;
      end
      if (nbusy > nbusy_peak) nbusy_peak <= nbusy;
    end
  end

endmodule
