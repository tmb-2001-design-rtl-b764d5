// l1a_stack: the 16-event L1A readout stack.
//
// Events that a Level-1 Accept has selected for readout wait here, oldest
// first, until the DMB readout machine pops them to build their headers.
// It is a synchronous first-in first-out queue of DEPTH descriptors with a
// count, full and empty flags; a push while full is dropped and counted in
// the sticky overflow flag.
//
// The depth of 16 events is the board's; the push/pop handshake is this
// design's choice.
//
// Timing: dout shows the oldest entry combinationally (show-ahead); pop
// removes it at the clock edge. Push and pop may share a cycle.
module l1a_stack #(
  parameter int unsigned W     = 22,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH):0]     count,
  output logic                       ovf
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0; ovf <= 1'b0;
    end else begin
      if (do_push) wp <= wp + AW'(1);
      if (do_pop)  rp <= rp + AW'(1);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (push && !do_push) ovf <= 1'b1;
    end
  end

endmodule
