// mpc_injector: VME-loaded test patterns sent to the muon port card.
//
// Four RAMs of 256 x 16 bits hold, per address, the four frames of one
// MPC transfer: RAM 0 = muon 0 frame 0, RAM 1 = muon 0 frame 1, RAM 2 =
// muon 1 frame 0, RAM 3 = muon 1 frame 1. A start (the VME inject bit, or
// the TTC MPC-inject command when enabled) sends addresses 0..nframes-1,
// one per clock, with tx high; the top puts these frames on the MPC outputs
// in place of the trigger path's. mpc_delay clocks after each frame, the
// MPC's two accept bits and two reserved bits are stored at that frame's
// address, where VME can read them back with the frame data.
//
// VME side: wen selects the RAM(s) written on the wr pulse (a VME write of
// the write-data register), ren the RAM read back; adr is the shared
// address. acc_rdata returns the accept/reserved bits stored at adr.
//
// Following the board: four frame RAMs with an 8-bit address, the frame
// count (default 5), the VME and TTC starts, and the accept/reserved bits
// stored per injector address. The RAM-to-frame order, one frame set per
// clock, and taking the MPC reply mpc_delay clocks after each frame (as for
// normal triggers) are this design's choices.
//
// Timing: the first frames appear two clocks after start; rdata and
// acc_rdata follow the address one clock later.
module mpc_injector #(
  parameter int unsigned AW = 8   // RAM address bits (256 frame sets)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        nframes,      // frame sets to send per start
  input  logic              start,        // one-clock start pulse
  input  logic [3:0]        mpc_delay,    // clocks from a frame to its MPC reply
  input  logic [3:0]        wen,          // RAM write enables
  input  logic [3:0]        ren,          // RAM read select (lowest set bit)
  input  logic [AW-1:0]     adr,          // VME read/write address
  input  logic [15:0]       wdata,
  input  logic              wr,           // one-clock write strobe
  output logic [15:0]       rdata,        // addressed word of the selected RAM
  output logic [3:0]        acc_rdata,    // {reserved[1:0], accept[1:0]} stored at adr
  input  logic [3:0]        mpc_reply,    // {reserved[1:0], accept[1:0]} from the MPC
  output logic              busy,
  output logic              tx,           // frames below are valid
  output logic [3:0][15:0]  frames        // {muon1 f1, muon1 f0, muon0 f1, muon0 f0}
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [15:0] ram [4][DEPTH];
  logic [3:0]  acc [DEPTH];

  always_ff @(posedge clk) begin
    if (wr)
      for (int r = 0; r < 4; r++)
        if (wen[r]) ram[r][adr] <= wdata;
  end

  int unsigned rsel;
  always_comb begin
    rsel = 0;
    for (int r = 3; r >= 0; r--) if (ren[r]) rsel = r;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rdata     <= '0;
      acc_rdata <= '0;
    end else begin
      rdata     <= ram[rsel][adr];
      acc_rdata <= acc[adr];
    end
  end

  // sending
  logic [AW-1:0] ptr;
  logic [7:0]    left;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      ptr  <= '0;
      left <= '0;
    end else if (!busy) begin
      ptr  <= '0;
      left <= nframes;
      busy <= start && (nframes != 0);
    end else begin
      ptr  <= ptr + 1'b1;
      left <= left - 1'b1;
      if (left == 8'd1) busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tx     <= 1'b0;
      frames <= '0;
    end else begin
      tx <= busy;
      for (int r = 0; r < 4; r++) frames[r] <= busy ? ram[r][ptr] : 16'h0000;
    end
  end

  // address of each sent frame set, delayed to meet the MPC reply
  logic [15:0]         sent_v;
  logic [15:0][AW-1:0] sent_a;
  logic [AW-1:0]       ptr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sent_v <= '0;
      sent_a <= '0;
      ptr_q  <= '0;
    end else begin
      ptr_q  <= ptr;
      sent_v <= {sent_v[14:0], tx};
      sent_a <= {sent_a[14:0], ptr_q};
    end
  end

  // sent_*[0] is one clock after the frame; the reply comes mpc_delay after it
  always_ff @(posedge clk) begin
    if (mpc_delay != 4'd0 && sent_v[mpc_delay - 4'd1])
      acc[sent_a[mpc_delay - 4'd1]] <= mpc_reply;
  end

endmodule
