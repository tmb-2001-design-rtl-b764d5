// pulse_delay: programmable delay of a single-bit signal by 0..2**DW-1 clocks.
//
// Used for the sequencer's trigger-source delays (ADR_SEQ_TRIG_DLY0/1) and
// the ALCT pre-trigger delay. A shift register holds the last 2**DW-1
// samples; dly = 0 passes the input straight through.
module pulse_delay #(
  parameter int unsigned DW = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          din,
  input  logic [DW-1:0] dly,
  output logic          dout
);

  localparam int N = (1 << DW) - 1;

  logic [N-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst) sr <= '0;
    else     sr <= {sr[N-2:0], din};
  end

  assign dout = (dly == 0) ? din : sr[dly - DW'(1)];

endmodule
