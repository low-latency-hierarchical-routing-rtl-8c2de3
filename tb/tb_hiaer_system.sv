// tb_hiaer_system: end-to-end run of the tree network with 32 nodes (four
// level-1 routers under one level-2 router), 64-word router FIFOs and
// 8-neuron engines to keep the run short.
// Phase 1, fan-in: every node sends to node 2 at a 100 % injection ratio,
// as in the published set-up where all nodes address node two. Phase 2:
// every node sends to the next node (n+1), which crosses level-1 clusters
// at every eighth node. After each phase the engines are stopped and the
// network drained; then every message sent must have been received, by the
// right node, with no format error. Mechanisms that must each happen at
// least once: contention for an output, a grant to other than the
// lowest-index requester (stochastic choice), input-FIFO back-pressure,
// an output FIFO too full to accept a header, a paused link, traffic up to
// and down from the level-2 router, and probe latency samples.
module tb_hiaer_system;
  import noc_pkg::*;
  localparam int N = 32;
  localparam int NL1 = N / 8;
  localparam int NL2 = (NL1 + 7) / 8;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] node_en;
  node_t node_dest [N];
  logic [6:0] node_ratio [N];
  logic [15:0] fire_rate;
  node_t probe_src;
  logic [31:0] tx_msgs [N], rx_msgs [N], probe_samples;
  logic [47:0] rx_lat_sum [N];
  logic [STAMP_W-1:0] rx_lat_max [N];
  logic [15:0] rx_errors [N], probe_latency;
  logic probe_valid;

  hiaer_system #(.N_NODES(N), .DEPTH(64), .AF_LEVEL(52), .NEURONS(8)) dut (.*);

  `include "tb_system_checks.svh"

  initial begin
    run_workloads(3000, 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
