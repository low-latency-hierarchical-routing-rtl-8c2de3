// packet_interface: turns a node's AER events into router messages.
//
// Events arriving on ev_valid/ev_event are collected in a buffer of sixteen
// 32-bit event slots (512 bits). When the buffer holds at least one event
// and no message is being sent, the buffer is copied into the message
// register and cleared, and a message of ten 64-bit flits is sent on
// tx_valid/tx_data/tx_ready:
//   flit 0, header: [63:57] destination node, [56:50] source node (node_id),
//                   [49:34] sequence number, [33:4] send time (now, taken when
//                   the header leaves), [3:0] = 0000
//   flit k = 1..9, tail: [63:4] bits 60*(k-1) .. 60*k-1 of the zero-extended
//                   512-bit event block, [3:0] = k (0001 .. 1001)
// Unused event slots are zero (their valid bit is 0).
// The injection ratio inj_ratio (percent, 0..100) limits how often a flit
// may leave: a credit counter gains inj_ratio each cycle and a flit needs
// 100 credits; credit is capped at 199, so an idle interface can send at most
// two flits back to back beyond its ratio. At 100 % a flit can leave every
// cycle, and a new message starts in the cycle the previous one's last tail
// leaves, so messages follow each other without a gap.
// The ten-flit format, its control codes, the 7-bit destination in the
// header's top bits and the 512-bit event block follow the published
// format; the rest of the header, the slot layout and the credit-based rate
// limiter are this design's choice.
module packet_interface
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  node_t       node_id,
  input  node_t       dest,
  input  logic [6:0]  inj_ratio,
  input  logic [STAMP_W-1:0] now,
  // events
  input  logic        ev_valid,
  input  aer_event_t  ev_event,
  output logic        ev_ready,
  // flits toward the router
  output logic        tx_valid,
  output flit_t       tx_data,
  input  logic        tx_ready,
  output logic [31:0] tx_msgs      // messages completely sent
);

  localparam int unsigned BLOCK_W = TAILS_PER_PKT * PAYLOAD_W;   // 540

  aer_event_t              buf_q [EVENTS_PER_PKT];
  logic [4:0]              buf_cnt;
  logic [EVENT_BITS-1:0]   msg_events;
  logic [BLOCK_W-1:0]      block;
  node_t                   msg_dest;
  logic [SEQ_W-1:0]        seq;
  logic                    sending;
  logic [3:0]              fi;          // flit index within the message
  logic [7:0]              credit;
  logic                    can_send, fire, last, start, take_ev;

  assign can_send = (credit >= 8'd100);
  assign tx_valid = sending && can_send;
  assign fire     = tx_valid && tx_ready;
  assign last     = fire && (fi == 4'(TAILS_PER_PKT));
  assign start    = (!sending || last) && (buf_cnt != '0);
  assign ev_ready = (buf_cnt < 5'(EVENTS_PER_PKT)) || start;
  assign take_ev  = ev_valid && ev_ready;
  assign block    = BLOCK_W'(msg_events);

  header_t hdr;
  always_comb begin
    hdr = '{dest: msg_dest, src: node_id, seq: seq, stamp: now, ctrl: CTRL_HEADER};
    if (fi == 4'd0) tx_data = flit_t'(hdr);
    else            tx_data = {block[PAYLOAD_W*(32'(fi)-1) +: PAYLOAD_W], ctrl_t'(fi)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < EVENTS_PER_PKT; i++) buf_q[i] <= '0;
      buf_cnt    <= '0;
      msg_events <= '0;
      msg_dest   <= '0;
      seq        <= '0;
      sending    <= 1'b0;
      fi         <= '0;
      credit     <= '0;
      tx_msgs    <= '0;
    end else begin
      // rate limiter
      begin
        automatic logic [8:0] c = 9'(credit) + 9'(inj_ratio) - (fire ? 9'd100 : 9'd0);
        credit <= (c > 9'd199) ? 8'd199 : 8'(c);
      end
      // event buffer and message start
      if (start) begin
        for (int i = 0; i < EVENTS_PER_PKT; i++) begin
          msg_events[EVENT_W*i +: EVENT_W] <= buf_q[i];
          buf_q[i] <= '0;
        end
        msg_dest <= dest;
        buf_cnt  <= take_ev ? 5'd1 : 5'd0;
        if (take_ev) buf_q[0] <= ev_event;
      end else if (take_ev) begin
        buf_q[buf_cnt[3:0]] <= ev_event;
        buf_cnt <= buf_cnt + 1'b1;
      end
      // flit output; a new message may start in the cycle the last tail leaves
      if (last) begin
        seq     <= seq + 1'b1;
        tx_msgs <= tx_msgs + 1'b1;
      end
      if (start) begin
        sending <= 1'b1;
        fi      <= '0;
      end else if (last) begin
        sending <= 1'b0;
        fi      <= '0;
      end else if (fire) begin
        fi <= fi + 1'b1;
      end
    end
  end

endmodule
