// l1a_window: Level-1 Accept matching for events waiting in buffers.
//
// Every event that the TMB decided on and that holds a raw-hits buffer is
// queued here with the time of its pre-trigger. Its L1A window opens
// l1a_delay clocks after the pre-trigger and stays open for l1a_window
// clocks. Events are handled oldest first, so only the head of the queue is
// compared with the clock:
//  * an L1A that arrives while the head's window is open selects that event
//    for readout (L1A type 0, with its buffer);
//  * an L1A with no open window is an L1A-only event, read out with a short
//    header and no buffer (type 2);
//  * a head whose window closes without an L1A is dropped and its buffer
//    freed, or, when l1a_allow_nol1a is set, read out as type 3.
// With l1a_internal set, the L1A is generated here at the moment each
// event's window opens instead of coming from the CCB. The block also counts
// received L1As (a 4-bit counter preset to l1a_offset by l1reset) and the
// L1A requests the TMB sent to the CCB.
//
// The delay, window, internal L1A, offset, L1A types and counters are the
// board's; the oldest-first queue of NQ events and the 16-bit time stamps
// are this design's choices.
//
// Timing: a readout descriptor is pushed the clock after the L1A arrives.
module l1a_window
  import tmb_pkg::*;
#(
  parameter int unsigned NQ = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ttc_l1reset,
  // events entering the queue
  input  logic        ev_push,
  input  logic [15:0] ev_t0,
  input  logic [2:0]  ev_buf_adr,
  // L1A and its configuration
  input  logic        ccb_l1accept,
  input  logic [7:0]  l1a_delay,
  input  logic [3:0]  l1a_win,
  input  logic        l1a_internal,
  input  logic        l1a_allow_nol1a,
  input  logic [3:0]  l1a_offset,
  input  logic        l1a_request,      // TMB asked the CCB for an L1A
  input  logic [11:0] bxn,
  // results
  output logic [15:0] now,
  output logic        rdo_push,
  output rdo_desc_t   rdo_desc,
  output logic        buf_free,
  output logic [2:0]  buf_free_adr,
  output logic        l1a_pulse,
  output logic        l1a_in_window,
  output logic        nol1a,
  output logic [3:0]  l1a_rx_cnt,
  output logic [3:0]  l1a_tx_cnt,
  output logic        queue_full
);

  localparam int AW = $clog2(NQ);

  logic [15:0] q_t0  [NQ];
  logic [2:0]  q_buf [NQ];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;

  logic        head_v;
  logic [15:0] age;
  logic [8:0]  close_t;
  logic        in_win, expired, pop;

  assign head_v  = (cnt != 0);
  assign age     = now - q_t0[rp];
  assign close_t = {1'b0, l1a_delay} + {5'b0, l1a_win};
  assign in_win  = head_v && age >= {8'b0, l1a_delay} && age < {7'b0, close_t};
  assign expired = head_v && age >= {7'b0, close_t};
  assign queue_full = (cnt == (AW+1)'(NQ));
  assign l1a_in_window = in_win;

  assign l1a_pulse = l1a_internal ? (head_v && age == {8'b0, l1a_delay}) : ccb_l1accept;
  assign pop = (l1a_pulse && in_win) || (!l1a_pulse && expired);

  always_ff @(posedge clk) begin
    if (ev_push && !queue_full) begin
      q_t0[wp]  <= ev_t0;
      q_buf[wp] <= ev_buf_adr;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      now <= '0; wp <= '0; rp <= '0; cnt <= '0;
      rdo_push <= 1'b0; rdo_desc <= '0; buf_free <= 1'b0; buf_free_adr <= '0;
      nol1a <= 1'b0; l1a_rx_cnt <= '0; l1a_tx_cnt <= '0;
    end else begin
      now <= now + 16'd1;
      rdo_push <= 1'b0; buf_free <= 1'b0; nol1a <= 1'b0;
      if (ev_push && !queue_full) wp <= wp + AW'(1);
      if (pop) rp <= rp + AW'(1);
      cnt <= cnt + (AW+1)'(ev_push && !queue_full) - (AW+1)'(pop);

      if (ttc_l1reset) l1a_rx_cnt <= l1a_offset;
      else if (l1a_pulse) l1a_rx_cnt <= l1a_rx_cnt + 4'd1;
      if (ttc_l1reset) l1a_tx_cnt <= '0;
      else if (l1a_request) l1a_tx_cnt <= l1a_tx_cnt + 4'd1;

      if (l1a_pulse) begin
        rdo_push          <= 1'b1;
        rdo_desc.bxn_l1a  <= bxn;
        rdo_desc.l1a_cnt  <= ttc_l1reset ? l1a_offset : l1a_rx_cnt + 4'd1;
        rdo_desc.has_buf  <= in_win;
        rdo_desc.buf_adr  <= in_win ? q_buf[rp] : 3'd0;
        rdo_desc.l1a_type <= in_win ? L1A_NORMAL : L1A_ONLY;
      end else if (expired) begin
        nol1a <= 1'b1;
        if (l1a_allow_nol1a) begin
          rdo_push          <= 1'b1;
          rdo_desc.bxn_l1a  <= bxn;
          rdo_desc.l1a_cnt  <= l1a_rx_cnt;
          rdo_desc.has_buf  <= 1'b1;
          rdo_desc.buf_adr  <= q_buf[rp];
          rdo_desc.l1a_type <= L1A_NOL1A;
        end else begin
          buf_free     <= 1'b1;
          buf_free_adr <= q_buf[rp];
        end
      end
    end
  end

endmodule
