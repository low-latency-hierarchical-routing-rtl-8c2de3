// hiaer_system: a two-level tree network of 128 traffic-injecting nodes.
//
// Nodes are grouped by eight under level-1 routers (N_NODES/8 of them);
// level-1 routers are grouped by eight under level-2 routers. With the
// default 128 nodes there are 16 level-1 and 2 level-2 routers, and the
// up ports of the two level-2 routers are linked to each other, so a message
// whose destination is in the other half crosses from one level-2 router to
// the other. Smaller systems (any multiple of 8 up to 64 nodes) have a single
// level-2 router whose up port is left open: its input is idle and anything
// it sends up is discarded. Every hop, node to router, router to router and
// back, runs through an xcvr_link (flight time LINK_LATENCY cycles plus a
// receive FIFO). Node n sits on port n%8 of level-1 router n/8, and level-1
// router r on port r%8 of level-2 router r/8, so node addresses follow the
// routers' hierarchical decode.
// Each node is configured at run time with an enable, a destination and an
// injection ratio, and all share one firing rate. A latency_counter follows
// probe messages from node probe_src to wherever they are addressed: it
// latches the source's next header, counts cycles until a header with the
// same source and sequence number arrives at any node, reports the count and
// starts again. A free-running cycle counter gives every node the same time
// base, as the whole system runs from a single 100 MHz clock.
// The tree (eight nodes per level-1 router, 128 nodes, level-2 routers that
// talk to each other, one clock) follows the published system; link
// latencies, buffer sizes of the links, the time base and the probe wiring
// are this design's choices.
module hiaer_system
  import noc_pkg::*;
#(
  parameter int unsigned N_NODES      = 128,
  parameter int unsigned DEPTH        = FIFO_DEPTH,
  parameter int unsigned AF_LEVEL     = FIFO_AF_LEVEL,
  parameter int unsigned LINK_LATENCY = 13,
  parameter int unsigned NEURONS      = 32000,
  localparam int unsigned N_L1        = N_NODES / 8,
  localparam int unsigned N_L2        = (N_L1 + 7) / 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [N_NODES-1:0] node_en,
  input  node_t       node_dest  [N_NODES],
  input  logic [6:0]  node_ratio [N_NODES],
  input  logic [15:0] fire_rate,
  input  node_t       probe_src,
  // per node statistics
  output logic [31:0] tx_msgs    [N_NODES],
  output logic [31:0] rx_msgs    [N_NODES],
  output logic [47:0] rx_lat_sum [N_NODES],
  output logic [STAMP_W-1:0] rx_lat_max [N_NODES],
  output logic [15:0] rx_errors  [N_NODES],
  // probe latency
  output logic        probe_valid,
  output logic [15:0] probe_latency,
  output logic [31:0] probe_samples
);

  localparam int unsigned P = NUM_PORTS;

  logic [STAMP_W-1:0] now;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  // node streams
  logic [N_NODES-1:0] n_tx_valid, n_tx_ready, n_rx_valid;
  flit_t              n_tx_data [N_NODES];
  flit_t              n_rx_data [N_NODES];

  // router ports
  logic [P-1:0] r1_in_valid [N_L1];
  logic [P-1:0] r1_in_ready [N_L1];
  logic [P-1:0] r1_out_valid[N_L1];
  logic [P-1:0] r1_out_ready[N_L1];
  flit_t        r1_in_data  [N_L1][P];
  flit_t        r1_out_data [N_L1][P];
  logic [P-1:0] r2_in_valid [N_L2];
  logic [P-1:0] r2_in_ready [N_L2];
  logic [P-1:0] r2_out_valid[N_L2];
  logic [P-1:0] r2_out_ready[N_L2];
  flit_t        r2_in_data  [N_L2][P];
  flit_t        r2_out_data [N_L2][P];

  // ---------------- nodes and their links ----------------
  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    localparam int unsigned R = n / 8;
    localparam int unsigned Q = n % 8;
    logic unused_rx_ready;

    dummy_processor #(.NEURONS(NEURONS)) u_node (
      .clk, .rst_n,
      .node_id(node_t'(n)), .dest(node_dest[n]), .inj_ratio(node_ratio[n]),
      .fire_rate, .en(node_en[n]), .now,
      .tx_valid(n_tx_valid[n]), .tx_data(n_tx_data[n]), .tx_ready(n_tx_ready[n]),
      .rx_valid(n_rx_valid[n]), .rx_data(n_rx_data[n]), .rx_ready(unused_rx_ready),
      .tx_msgs(tx_msgs[n]), .rx_msgs(rx_msgs[n]), .rx_lat_sum(rx_lat_sum[n]),
      .rx_lat_max(rx_lat_max[n]), .rx_errors(rx_errors[n])
    );

    xcvr_link #(.LATENCY(LINK_LATENCY)) u_up (
      .clk, .rst_n,
      .tx_valid(n_tx_valid[n]), .tx_data(n_tx_data[n]), .tx_ready(n_tx_ready[n]),
      .rx_valid(r1_in_valid[R][Q]), .rx_data(r1_in_data[R][Q]), .rx_ready(r1_in_ready[R][Q])
    );

    // the node always accepts (its rx_ready is tied high inside)
    xcvr_link #(.LATENCY(LINK_LATENCY)) u_down (
      .clk, .rst_n,
      .tx_valid(r1_out_valid[R][Q]), .tx_data(r1_out_data[R][Q]), .tx_ready(r1_out_ready[R][Q]),
      .rx_valid(n_rx_valid[n]), .rx_data(n_rx_data[n]), .rx_ready(unused_rx_ready)
    );
  end

  // ---------------- level-1 routers ----------------
  for (genvar r = 0; r < N_L1; r++) begin : g_l1
    localparam int unsigned J = r / 8;
    localparam int unsigned Q = r % 8;

    hiaer_router #(.LEVEL(1), .INDEX(r), .DEPTH(DEPTH), .AF_LEVEL(AF_LEVEL)) u_router (
      .clk, .rst_n,
      .in_valid(r1_in_valid[r]), .in_data(r1_in_data[r]), .in_ready(r1_in_ready[r]),
      .out_valid(r1_out_valid[r]), .out_data(r1_out_data[r]), .out_ready(r1_out_ready[r]),
      .out_busy(), .drop()
    );

    xcvr_link #(.LATENCY(LINK_LATENCY)) u_up (
      .clk, .rst_n,
      .tx_valid(r1_out_valid[r][UP_PORT]), .tx_data(r1_out_data[r][UP_PORT]),
      .tx_ready(r1_out_ready[r][UP_PORT]),
      .rx_valid(r2_in_valid[J][Q]), .rx_data(r2_in_data[J][Q]), .rx_ready(r2_in_ready[J][Q])
    );

    xcvr_link #(.LATENCY(LINK_LATENCY)) u_down (
      .clk, .rst_n,
      .tx_valid(r2_out_valid[J][Q]), .tx_data(r2_out_data[J][Q]), .tx_ready(r2_out_ready[J][Q]),
      .rx_valid(r1_in_valid[r][UP_PORT]), .rx_data(r1_in_data[r][UP_PORT]),
      .rx_ready(r1_in_ready[r][UP_PORT])
    );
  end

  // ---------------- level-2 routers ----------------
  for (genvar j = 0; j < N_L2; j++) begin : g_l2
    hiaer_router #(.LEVEL(2), .INDEX(j), .DEPTH(DEPTH), .AF_LEVEL(AF_LEVEL)) u_router (
      .clk, .rst_n,
      .in_valid(r2_in_valid[j]), .in_data(r2_in_data[j]), .in_ready(r2_in_ready[j]),
      .out_valid(r2_out_valid[j]), .out_data(r2_out_data[j]), .out_ready(r2_out_ready[j]),
      .out_busy(), .drop()
    );

    // down ports without a level-1 router: idle input, output drained
    for (genvar q = 0; q < 8; q++) begin : g_unused
      if (j * 8 + q >= N_L1) begin : g_open
        assign r2_in_valid[j][q]  = 1'b0;
        assign r2_in_data[j][q]   = '0;
        assign r2_out_ready[j][q] = 1'b1;
      end
    end

    if (N_L2 == 2) begin : g_peer
      // level-2 routers talk to each other through their up ports
      xcvr_link #(.LATENCY(LINK_LATENCY)) u_peer (
        .clk, .rst_n,
        .tx_valid(r2_out_valid[j][UP_PORT]), .tx_data(r2_out_data[j][UP_PORT]),
        .tx_ready(r2_out_ready[j][UP_PORT]),
        .rx_valid(r2_in_valid[1-j][UP_PORT]), .rx_data(r2_in_data[1-j][UP_PORT]),
        .rx_ready(r2_in_ready[1-j][UP_PORT])
      );
    end else begin : g_open_up
      assign r2_in_valid[j][UP_PORT]  = 1'b0;
      assign r2_in_data[j][UP_PORT]   = '0;
      assign r2_out_ready[j][UP_PORT] = 1'b1;
    end
  end

  // ---------------- latency probe ----------------
  localparam int unsigned TAG_W = NODE_W + SEQ_W;
  header_t            p_tx_hdr;
  logic               p_send;
  logic [TAG_W-1:0]   p_tag;
  logic [N_NODES-1:0] p_hit;
  logic               p_active;

  assign p_tx_hdr = header_t'(n_tx_data[probe_src]);
  assign p_send   = n_tx_valid[probe_src] && n_tx_ready[probe_src] &&
                    p_tx_hdr.ctrl == CTRL_HEADER;

  always_comb begin
    for (int n = 0; n < N_NODES; n++) begin
      automatic header_t h = header_t'(n_rx_data[n]);
      p_hit[n] = n_rx_valid[n] && h.ctrl == CTRL_HEADER && {h.src, h.seq} == p_tag;
    end
  end

  latency_counter #(.TAG_W(TAG_W), .CNT_W(16)) u_probe (
    .clk, .rst_n,
    .send_valid(p_send), .send_tag({p_tx_hdr.src, p_tx_hdr.seq}),
    .recv_valid(|p_hit), .recv_tag(p_tag),
    .lat_valid(probe_valid), .latency(probe_latency), .samples(probe_samples),
    .active(p_active), .probe_tag(p_tag)
  );

  initial assert (N_NODES % 8 == 0 && N_NODES >= 8 && N_NODES <= 128)
    else $error("hiaer_system: N_NODES must be a multiple of 8 between 8 and 128");

endmodule
