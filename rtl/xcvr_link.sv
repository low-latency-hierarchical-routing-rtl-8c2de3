// xcvr_link: behavioural model of one direction of a 10G transceiver link
// between two boards (or between a node and its router), at flit level.
//
// The real link is a vendor serial transceiver; this model keeps only what
// the network sees of it: a fixed flight time of LATENCY cycles and a receive
// FIFO at the far end. A flit accepted on tx_valid/tx_ready appears in the
// receive FIFO LATENCY cycles later and leaves it on rx_valid/rx_data when
// the receiving router's input is ready (rx_ready = router input not nearly
// full), so the router's nearly-full signal stops the receive FIFO from
// reading out. The sender is paused (tx_ready low) while the flits in flight
// plus those in the receive FIFO would fill it, so no flit is lost.
// The default LATENCY of 13 cycles is the measured mean transceiver latency
// of the loopback prototype at 100 MHz (13.42 cycles); the receive FIFO
// depth and the credit-style pause, which sees the far end's fill level
// without delay, are this model's choices. It is synthesizable but is not a
// model of the serializer, the line code or the 10.3125 Gb/s lane.
module xcvr_link
  import noc_pkg::*;
#(
  parameter int unsigned LATENCY  = 13,
  parameter int unsigned RX_DEPTH = 64,
  localparam int unsigned OW      = $clog2(RX_DEPTH + 1)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tx_valid,
  input  flit_t tx_data,
  output logic  tx_ready,
  output logic  rx_valid,
  output flit_t rx_data,
  input  logic  rx_ready
);

  // LATENCY-1 register stages, then the receive FIFO write: a flit sent at
  // one clock edge is at the receive FIFO head LATENCY edges later.
  localparam int unsigned ST = LATENCY - 1;
  logic [ST-1:0]      pipe_v;
  flit_t              pipe_d [ST];
  logic [OW-1:0]      occ;            // in flight + stored in the receive FIFO
  logic               send, pop, rx_empty;

  assign tx_ready = (occ < OW'(RX_DEPTH));
  assign send     = tx_valid && tx_ready;
  assign rx_valid = !rx_empty;
  assign pop      = rx_valid && rx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe_v <= '0;
      occ    <= '0;
    end else begin
      pipe_v[0] <= send;
      for (int s = 1; s < ST; s++) pipe_v[s] <= pipe_v[s-1];
      occ    <= occ + OW'(send) - OW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    pipe_d[0] <= tx_data;
    for (int s = 1; s < ST; s++) pipe_d[s] <= pipe_d[s-1];
  end

  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(RX_DEPTH), .AF_LEVEL(RX_DEPTH)) u_rx_fifo (
    .clk, .rst_n,
    .wr_en(pipe_v[ST-1]), .wr_data(pipe_d[ST-1]),
    .rd_en(pop), .rd_data(rx_data),
    .empty(rx_empty), .full(), .almost_full(), .count()
  );

  initial assert (LATENCY >= 2) else $error("xcvr_link: LATENCY must be at least 2");

endmodule
