// tb_sequential_injection: the sequential-activation latency experiment on
// a 16-node tree (two level-1 routers under one level-2 router). Every node
// addresses node 2. Node 0 starts alone at a 100 % injection ratio; every
// STEP cycles one more node joins, in node order, at the same ratio, until
// all fifteen senders are on. For each step the testbench takes the mean
// header latency of the messages node 2 received in the second half of the
// step, when the new load has settled.
// Checked: every step delivers messages to node 2; once two or more nodes
// send, the link into node 2 stays busy (at least 90 % of the cycles carry a
// flit), since a saturated tree must not waste its bottleneck; the mean
// latency with several senders is above that of node 0 alone, since they
// queue for the same link; and the latency levels off instead of growing
// without bound, because the router FIFOs are finite and full FIFOs pause
// the senders: the last step's mean is below the FIFO depths along the path
// times the message length. At the end the engines stop, the network
// drains, and every message sent must have reached node 2 without a format
// error. Router FIFOs are 64 words here to keep the run short.
module tb_sequential_injection;
  import noc_pkg::*;
  localparam int N     = 16;
  localparam int DEST  = 2;
  localparam int STEP  = 2000;
  localparam int DEPTH = 64;

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

  hiaer_system #(.N_NODES(N), .DEPTH(DEPTH), .AF_LEVEL(DEPTH - 12), .NEURONS(8)) dut (.*);

  int checks = 0, failures = 0;
  longint busy_cycles = 0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (STEP * N + 100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // flits delivered into node 2's receive port
  always @(posedge clk)
    if (rst_n && dut.g_node[DEST].u_node.rx_valid && dut.g_node[DEST].u_node.rx_ready) busy_cycles++;

  function automatic longint sum_tx();
    longint s;
    s = 0;
    for (int n = 0; n < N; n++) s += tx_msgs[n];
    return s;
  endfunction

  int senders;
  longint msgs0, lat0, busy0, dm;
  longint mean_lat [N];
  longint last_rx;
  int still;

  initial begin
    fire_rate = 16'h4000;
    probe_src = 7'd0;
    node_en   = '0;
    for (int n = 0; n < N; n++) begin node_dest[n] = node_t'(DEST); node_ratio[n] = 7'd100; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    senders = 0;
    for (int n = 0; n < N; n++) begin
      if (n == DEST) continue;
      @(negedge clk);
      node_en[n] = 1'b1;
      senders++;
      repeat (STEP / 2) @(posedge clk);
      msgs0 = rx_msgs[DEST];
      lat0  = rx_lat_sum[DEST];
      busy0 = busy_cycles;
      repeat (STEP / 2) @(posedge clk);
      dm = rx_msgs[DEST] - msgs0;
      mean_lat[senders] = dm != 0 ? (rx_lat_sum[DEST] - lat0) / dm : 0;
      $display("senders=%0d messages=%0d mean latency=%0d cycles link busy=%0d of %0d",
               senders, dm, mean_lat[senders], busy_cycles - busy0, STEP / 2);
      check(dm > 0, $sformatf("%0d senders: node 2 received messages", senders));
      if (senders >= 2)
        check((busy_cycles - busy0) * 10 >= (STEP / 2) * 9,
              $sformatf("%0d senders: link into node 2 saturated", senders));
    end
    for (int k = 3; k <= senders; k++)
      check(mean_lat[k] > mean_lat[1], $sformatf("%0d senders: latency above the single-sender value", k));
    // path: level-1 router input and output FIFOs, and at most one climb
    // through the level-2 router; each word ahead costs one cycle
    check(mean_lat[senders] < 6 * DEPTH * FLITS_PER_PKT,
          "latency levels off under full load");
    // drain
    node_en = '0;
    last_rx = -1; still = 0;
    while (still < 5000 && !(rx_msgs[DEST] == sum_tx() && still >= 300)) begin
      repeat (100) @(posedge clk);
      if (rx_msgs[DEST] == last_rx) still += 100; else still = 0;
      last_rx = rx_msgs[DEST];
    end
    check(rx_msgs[DEST] == sum_tx(), $sformatf("received %0d of %0d messages", rx_msgs[DEST], sum_tx()));
    for (int n = 0; n < N; n++) check(rx_errors[n] == 0, $sformatf("node %0d format errors", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
