// Body shared by the system testbenches: stimulus, mechanism counters and
// checks. The including module declares N, NL1, NL2, the top's ports and
// the instance dut.
  int checks = 0, failures = 0;
  int contention = 0, stochastic = 0, backpressure = 0, out_full = 0;
  int link_pause = 0, up_flits = 0, down_flits = 0, peer_flits = 0, probes = 0;
  longint probe_sum = 0;
  int cycle = 0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- mechanism counters ----
  for (genvar r = 0; r < NL1; r++) begin : g_mon1
    always @(posedge clk) if (rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        if ($countones(dut.g_l1[r].u_router.req_oi[o]) > 1) contention++;
        if (|dut.g_l1[r].u_router.grant_oi[o])
          for (int i = 0; i < NUM_PORTS; i++)
            if (dut.g_l1[r].u_router.req_oi[o][i]) begin
              if (!dut.g_l1[r].u_router.grant_oi[o][i]) stochastic++;
              break;
            end
        if (dut.g_l1[r].u_router.req_oi[o] != '0 && dut.g_l1[r].u_router.of_af[o]) out_full++;
      end
      if ((dut.r1_in_valid[r] & ~dut.r1_in_ready[r]) != '0) backpressure++;
      if (dut.r1_out_valid[r][UP_PORT] && dut.r1_out_ready[r][UP_PORT]) up_flits++;
      if (dut.r1_in_valid[r][UP_PORT] && dut.r1_in_ready[r][UP_PORT]) down_flits++;
    end
  end
  for (genvar j = 0; j < NL2; j++) begin : g_mon2
    always @(posedge clk) if (rst_n) begin
      if ((dut.r2_in_valid[j] & ~dut.r2_in_ready[j]) != '0) backpressure++;
      if (NL2 == 2 && dut.r2_out_valid[j][UP_PORT] && dut.r2_out_ready[j][UP_PORT]) peer_flits++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    cycle++;
    if ((dut.n_tx_valid & ~dut.n_tx_ready) != '0) link_pause++;
    if (probe_valid) begin probes++; probe_sum += probe_latency; end
  end

  function automatic longint sum_tx();
    longint s = 0;
    for (int n = 0; n < N; n++) s += tx_msgs[n];
    return s;
  endfunction
  function automatic longint sum_rx();
    longint s = 0;
    for (int n = 0; n < N; n++) s += rx_msgs[n];
    return s;
  endfunction

  // stop the engines, wait until the network is quiet, then compare
  task automatic drain_and_check(string phase, int quiet_needed);
    longint last;
    int still;
    node_en = '0;
    last = -1; still = 0;
    // done when all sent messages have arrived and nothing moved for
    // quiet_needed cycles; give up when nothing arrives for 5000 cycles
    forever begin
      repeat (100) @(posedge clk);
      if (sum_rx() == last) still += 100; else still = 0;
      last = sum_rx();
      if (sum_rx() == sum_tx() && still >= quiet_needed) break;
      if (still >= 5000) break;
    end
    check(sum_rx() == sum_tx(), $sformatf("%s: received %0d of %0d messages", phase, sum_rx(), sum_tx()));
    for (int n = 0; n < N; n++) check(rx_errors[n] == 0, $sformatf("%s: node %0d format errors", phase, n));
    $display("%s: %0d messages delivered, cycle %0d", phase, sum_tx(), cycle);
  endtask

  task automatic run_workloads(int fanin_cycles, int run_cycles);
    longint tx0, rx2;
    fire_rate = 16'h4000;
    probe_src = 7'd0;
    node_en = '0;
    for (int n = 0; n < N; n++) begin node_dest[n] = 7'd2; node_ratio[n] = 7'd100; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: fan-in to node 2
    @(negedge clk);
    node_en = '1;
    repeat (fanin_cycles) @(posedge clk);
    drain_and_check("fan-in to node 2", 300);
    check(rx_msgs[2] == sum_tx(), "fan-in: everything arrived at node 2");
    check(rx_lat_max[2] > 0, "fan-in: latency measured at node 2");
    $display("fan-in: mean header latency at node 2 %0d cycles, max %0d",
             rx_msgs[2] ? rx_lat_sum[2] / rx_msgs[2] : 0, rx_lat_max[2]);
    // phase 2: each node to the next; half ratio; the far half also across
    tx0 = sum_tx();
    rx2 = rx_msgs[2];
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      node_dest[n]  = node_t'((n + 1) % N);
      node_ratio[n] = 7'd50;
    end
    if (NL2 == 2) for (int n = 0; n < N; n += 4) node_dest[n] = node_t'((n + 64) % N);
    node_en = '1;
    repeat (run_cycles) @(posedge clk);
    drain_and_check("neighbour traffic", 300);
    check(sum_tx() > tx0, "neighbour: messages were sent");
    begin
      bit target [N];
      for (int n = 0; n < N; n++) target[n] = 0;
      for (int n = 0; n < N; n++) target[int'(node_dest[n])] = 1;
      for (int n = 0; n < N; n++)
        if (target[n] && n != 2) check(rx_msgs[n] > 0, $sformatf("neighbour: node %0d received", n));
    end
    // mechanisms
    $display("contention=%0d stochastic=%0d backpressure=%0d out_full=%0d link_pause=%0d up=%0d down=%0d peer=%0d probes=%0d mean_probe=%0d",
             contention, stochastic, backpressure, out_full, link_pause, up_flits, down_flits, peer_flits,
             probes, probes ? probe_sum / probes : 0);
    check(contention > 0, "contention for an output happened");
    check(stochastic > 0, "a grant beyond the lowest-index requester happened");
    check(backpressure > 0, "input FIFO back-pressure happened");
    check(out_full > 0, "a nearly full output FIFO held a request");
    check(link_pause > 0, "a link paused its sender");
    check(up_flits > 0 && down_flits > 0, "traffic through the level-2 router");
    if (NL2 == 2) check(peer_flits > 0, "traffic between the two level-2 routers");
    check(probes > 0, "probe latency samples");
  endtask
