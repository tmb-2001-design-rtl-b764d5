// crc22: 22-bit cyclic redundancy check over 16-bit readout frames.
//
// The DMB readout closes each event with a 22-bit CRC of the frames that
// precede it, sent as two 11-bit halves. This block folds one 16-bit frame
// per enabled clock into the CRC, least significant bit first, with the
// generator polynomial x^22 + x + 1 and an all-zero start value (init
// clears it). The CRC length and its split into [10:0] and [21:11] are the
// board's; the polynomial, bit order and start value are this design's
// choices.
//
// Timing: crc holds the CRC of all frames enabled since the last init, one
// clock after the last frame; crc_next already includes the frame on din.
module crc22 (
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        en,
  input  logic [15:0] din,
  output logic [21:0] crc,
  output logic [21:0] crc_next   // crc with the current din folded in when en
);

  function automatic logic [21:0] next_crc(input logic [21:0] c, input logic [15:0] d);
    logic [21:0] r;
    logic fb;
    r = c;
    for (int i = 0; i < 16; i++) begin
      fb = r[21] ^ d[i];
      r  = {r[20:0], 1'b0};
      if (fb) r = r ^ 22'h000003; // x^1 + x^0 terms of x^22 + x + 1
    end
    return r;
  endfunction

  assign crc_next = en ? next_crc(crc, din) : crc;

  always_ff @(posedge clk) begin
    if (rst || init) crc <= '0;
    else             crc <= crc_next;
  end

endmodule
