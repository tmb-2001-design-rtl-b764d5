// scope: built-in logic analyzer for timing in the trigger sequencer.
//
// Records NCH probe channels (6 banks of 16) for DEPTH clocks around a
// trigger, for reading back over VME. Setting runstop arms the scope: it
// records every clock into a circular memory and waits (waiting = 1) for
// the trigger, which is channel 0 (the sequencer pre-trigger) or a rising
// edge of force_trig. After the trigger it records DEPTH-NPRE more clocks
// and stops with trig_done = 1, so the memory holds NPRE clocks before the
// trigger and the rest after it. Clearing runstop resets the scope.
// Reading: ram_sel picks a bank of 16 channels and radr a sample, 0 being
// the oldest; rdata bit i is channel 16*ram_sel + i.
//
// Following the board: run/stop, forced trigger, trig-done and waiting
// flags, the 3-bit bank select with 16-bit read data, the 8-bit read
// address (256 samples) and channel 0 as the sequencer pre-trigger. The
// board's feature list speaks of 16 channels while its channel table lists
// 96 (ch00-ch95 in six banks); this block records all 96, and the 16-bit
// read port shows one bank at a time. The number of samples kept before
// the trigger (NPRE) and the circular recording are this design's choices;
// the sequencer readout mode (scp_auto) is not built.
//
// Timing: probe is sampled every clock while armed. The trigger sample is
// at read address NPRE. rdata follows ram_sel/radr one clock later.
module scope #(
  parameter int unsigned NCH   = 96,   // probe channels, 16 per bank
  parameter int unsigned DEPTH = 256,  // samples per channel
  parameter int unsigned NPRE  = 16    // samples kept before the trigger
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [NCH-1:0]             probe,       // channel inputs, ch00 = trigger
  input  logic                       runstop,     // 1 = run, 0 = stop and reset
  input  logic                       force_trig,  // rising edge forces a trigger
  input  logic [2:0]                 ram_sel,     // bank of 16 channels to read
  input  logic [$clog2(DEPTH)-1:0]   radr,        // sample to read, 0 = oldest
  output logic                       waiting,     // armed, waiting for the trigger
  output logic                       trig_done,   // triggered and full, ready to read
  output logic [15:0]                rdata        // 16 channels of the addressed sample
);

  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned NBANK = NCH / 16;

  logic [NCH-1:0] mem [DEPTH];
  logic [AW-1:0]  wptr;
  logic [AW:0]    post;      // samples still to record after the trigger
  logic           run, trig_seen, force_q;
  logic           trig;

  assign trig = probe[0] || (force_trig && !force_q);

  always_ff @(posedge clk) begin
    if (rst || !runstop) begin
      run       <= 1'b0;
      trig_seen <= 1'b0;
      waiting   <= 1'b0;
      trig_done <= 1'b0;
      wptr      <= '0;
      post      <= '0;
      force_q   <= 1'b0;
    end else begin
      force_q <= force_trig;
      if (!run && !trig_done) begin
        run     <= 1'b1;
        waiting <= 1'b1;
      end else if (run) begin
        mem[wptr] <= probe;
        wptr      <= wptr + 1'b1;
        if (!trig_seen) begin
          if (trig) begin
            trig_seen <= 1'b1;
            waiting   <= 1'b0;
            post      <= (AW+1)'(DEPTH - NPRE - 1);
            if (DEPTH - NPRE - 1 == 0) begin run <= 1'b0; trig_done <= 1'b1; end
          end
        end else begin
          post <= post - 1'b1;
          if (post == (AW+1)'(1)) begin
            run       <= 1'b0;
            trig_done <= 1'b1;
          end
        end
      end
    end
  end

  // after the stop wptr points at the oldest sample
  logic [NCH-1:0] word;
  logic [2:0]     bank;
  assign word = mem[wptr + radr];
  assign bank = (ram_sel < 3'(NBANK)) ? ram_sel : 3'd0;

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else     rdata <= word[16*bank +: 16];
  end

endmodule
