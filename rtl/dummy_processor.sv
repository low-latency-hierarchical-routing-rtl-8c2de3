// dummy_processor: a traffic-injecting computing node.
//
// Sixteen neural_engines (each serving NEURONS neurons by time
// multiplexing, 16 x 32000 = 512,000 per node) fire at random with the
// probability fire_rate/65536 per neuron and time step. aer_merge joins
// their events into one AER stream and packet_interface packs them into
// ten-flit messages addressed to dest, sent at up to inj_ratio percent of
// the link's flit rate on tx_*.
// The receive side accepts every flit (rx_ready is always 1), checks that
// each message is one header followed by tails 0001..1001 and addressed to
// this node, and records the number of messages received, the latency of
// each header (now minus the send time in the header, in cycles) as a running
// sum and maximum, and the number of format errors.
// The engine count, neuron count, LFSR-against-firing-rate spike generation
// and the engines -> AER system -> interface chain follow the published
// node; the receive checker and counters are this design's instrumentation.
module dummy_processor
  import noc_pkg::*;
#(
  parameter int unsigned ENGINES = 16,
  parameter int unsigned NEURONS = 32000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  node_t       node_id,
  input  node_t       dest,
  input  logic [6:0]  inj_ratio,
  input  logic [15:0] fire_rate,
  input  logic        en,
  input  logic [STAMP_W-1:0] now,
  // to the router
  output logic        tx_valid,
  output flit_t       tx_data,
  input  logic        tx_ready,
  // from the router
  input  logic        rx_valid,
  input  flit_t       rx_data,
  output logic        rx_ready,
  // statistics
  output logic [31:0] tx_msgs,
  output logic [31:0] rx_msgs,
  output logic [47:0] rx_lat_sum,
  output logic [STAMP_W-1:0] rx_lat_max,
  output logic [15:0] rx_errors
);

  logic [ENGINES-1:0] e_valid, e_ready;
  logic [14:0]        e_neuron [ENGINES];
  logic [11:0]        e_tstep  [ENGINES];
  logic               m_valid, m_ready;
  aer_event_t         m_event;

  for (genvar e = 0; e < ENGINES; e++) begin : g_eng
    neural_engine #(.NEURONS(NEURONS), .SEED(16'(32'hB5AD + 32'h3C1 * e))) u_eng (
      .clk, .rst_n, .en, .fire_rate,
      .salt({node_id, 9'(e)}),
      .ev_valid(e_valid[e]), .ev_neuron(e_neuron[e]), .ev_tstep(e_tstep[e]),
      .ev_ready(e_ready[e])
    );
  end

  aer_merge #(.N(ENGINES)) u_aer (
    .clk, .rst_n,
    .in_valid(e_valid), .in_neuron(e_neuron), .in_tstep(e_tstep), .in_ready(e_ready),
    .out_valid(m_valid), .out_event(m_event), .out_ready(m_ready)
  );

  packet_interface u_if (
    .clk, .rst_n, .node_id, .dest, .inj_ratio, .now,
    .ev_valid(m_valid), .ev_event(m_event), .ev_ready(m_ready),
    .tx_valid, .tx_data, .tx_ready, .tx_msgs
  );

  // receive checker
  ctrl_t            expect_ctrl;
  header_t          rx_hdr;
  logic [STAMP_W-1:0] lat;
  assign rx_ready = 1'b1;
  assign rx_hdr   = header_t'(rx_data);
  assign lat      = now - rx_hdr.stamp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      expect_ctrl <= CTRL_HEADER;
      rx_msgs     <= '0;
      rx_lat_sum  <= '0;
      rx_lat_max  <= '0;
      rx_errors   <= '0;
    end else if (rx_valid) begin
      if (flit_ctrl(rx_data) != expect_ctrl ||
          (expect_ctrl == CTRL_HEADER && rx_hdr.dest != node_id)) begin
        rx_errors   <= rx_errors + 1'b1;
        expect_ctrl <= (flit_ctrl(rx_data) == CTRL_LAST) ? CTRL_HEADER : flit_ctrl(rx_data) + 1'b1;
      end else if (expect_ctrl == CTRL_LAST) begin
        expect_ctrl <= CTRL_HEADER;
        rx_msgs     <= rx_msgs + 1'b1;
      end else begin
        expect_ctrl <= expect_ctrl + 1'b1;
      end
      if (flit_ctrl(rx_data) == CTRL_HEADER) begin
        rx_lat_sum <= rx_lat_sum + 48'(lat);
        if (lat > rx_lat_max) rx_lat_max <= lat;
      end
    end
  end

endmodule
