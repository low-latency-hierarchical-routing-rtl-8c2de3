// tb_hiaer_system_full: the tree network at its full size and default
// parameters: 128 nodes, 16 level-1 and 2 level-2 routers, 1024-word router
// FIFOs, 13-cycle links and 16 engines of 32000 neurons per node.
// Phase 1: for 3000 cycles every node sends to node 2 at a 100 %
// injection ratio (the published fan-in set-up); the 1024-word FIFOs on the
// way fill up, and draining them at node 2's one flit per cycle takes
// most of the run. Phase 2: every node sends to the next node at
// 50 %, and every fourth node to the node 64 places on, which crosses
// between the two level-2 routers. After each phase the network is drained
// and every message must have arrived intact at the right node; the same
// mechanisms as in the reduced test must each occur at least once.
module tb_hiaer_system_full;
  import noc_pkg::*;
  localparam int N = 128;
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

  hiaer_system dut (.*);

  `include "tb_system_checks.svh"

  initial begin
    run_workloads(3000, 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
