// tb_hiaer_router: a level-1 router (index 2, nodes 16..23) with small
// FIFOs (64 words, nearly full at 52). First one message through the idle
// router checks the latency: the header written at cycle t is on the output
// at t+3 and the tails follow back to back. Then all nine inputs send random
// messages to random destinations while the outputs are drained at random
// rates. Every output must carry whole messages (a header and tails
// 0001..1001 with no other message in between), each message must leave on
// the port its destination selects, and messages from one input to one
// output must keep their order. It also counts contention (two or more
// inputs requesting one direction in a cycle), input back-pressure
// (in_ready low) and grants won by an input other than the lowest-index
// requester, and fails if any of them never happens.
module tb_hiaer_router;
  import noc_pkg::*;
  localparam int N = 9, DEPTH = 64, AF = 52, MSGS = 60;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready, out_valid, out_ready, out_busy, drop;
  flit_t in_data [N], out_data [N];
  int checks = 0, failures = 0;
  flit_t src_q [N][$];
  flit_t exp_q [N][N][$];     // [input][output]
  int    cur_src [N];         // input whose message is on an output, -1 none
  int    cur_k [N];
  int    recv = 0, contention = 0, backpressure = 0, nonlowest = 0;

  hiaer_router #(.LEVEL(1), .INDEX(2), .DEPTH(DEPTH), .AF_LEVEL(AF)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int route(int d);
    return (d >= 16 && d < 24) ? d % 8 : 8;
  endfunction

  function automatic void make_msg(int i, int d, int seq);
    header_t h = '{dest: node_t'(d), src: node_t'(i), seq: 16'(seq), stamp: '0, ctrl: CTRL_HEADER};
    int o = route(d);
    src_q[i].push_back(flit_t'(h));
    exp_q[i][o].push_back(flit_t'(h));
    for (int k = 1; k <= 9; k++) begin
      flit_t f = {8'(i), 16'(seq), 36'(k * 7919 + seq), ctrl_t'(k)};
      src_q[i].push_back(f);
      exp_q[i][o].push_back(f);
    end
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always_comb for (int i = 0; i < N; i++) begin
    in_valid[i] = src_q[i].size() > 0;
    in_data[i]  = in_valid[i] ? src_q[i][0] : '0;
  end

  // output checker and mechanism counters
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++) begin
      if ($countones(dut.req_oi[o]) > 1) contention++;
      if (|dut.grant_oi[o]) begin
        for (int i = 0; i < N; i++)
          if (dut.req_oi[o][i]) begin
            if (!dut.grant_oi[o][i]) nonlowest++;
            break;
          end
      end
      if (out_valid[o] && out_ready[o]) begin
        flit_t f;
        header_t h;
        int i;
        f = out_data[o];
        h = header_t'(f);
        if (cur_src[o] < 0) begin
          i = int'(h.src);
          check(flit_ctrl(f) == CTRL_HEADER, "message starts with a header");
          check(route(int'(flit_dest(f))) == o, "message on its routed port");
          cur_src[o] = (i < N) ? i : 0;
          cur_k[o] = 0;
        end else begin
          cur_k[o]++;
          check(int'(flit_ctrl(f)) == cur_k[o], "tails contiguous and in order");
        end
        check(exp_q[cur_src[o]][o].size() > 0 && f == exp_q[cur_src[o]][o][0], "flit matches the sender's next flit");
        if (exp_q[cur_src[o]][o].size() > 0) void'(exp_q[cur_src[o]][o].pop_front());
        if (flit_ctrl(f) == CTRL_LAST) begin cur_src[o] = -1; recv++; end
      end
    end
    for (int i = 0; i < N; i++) begin
      if (in_valid[i] && !in_ready[i]) backpressure++;
      if (in_valid[i] && in_ready[i]) #0 void'(src_q[i].pop_front());
    end
  end

  initial begin
    int t0, t1;
    for (int o = 0; o < N; o++) cur_src[o] = -1;
    out_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // idle latency: one message from input 4 to node 21 (port 5)
    @(negedge clk);
    make_msg(4, 21, 0);
    @(posedge clk); t0 = $time;
    while (!out_valid[5]) @(posedge clk);
    t1 = $time;
    check((t1 - t0) / 10 == 3, $sformatf("idle latency %0d cycles, expected 3", (t1 - t0) / 10));
    for (int k = 0; k < 10; k++) begin
      check(out_valid[5], "tails back to back");
      @(posedge clk);
    end
    wait (recv == 1);
    // load phase
    @(negedge clk);
    for (int m = 1; m <= MSGS; m++)
      for (int i = 0; i < N; i++) begin
        // mostly toward ports 0..2 and up, to create contention
        int d;
        d = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 127) : 16 + $urandom_range(0, 2);
        make_msg(i, d, m);
      end
    fork
      forever @(negedge clk) out_ready = N'($urandom) | N'($urandom);
    join_none
    wait (recv == 1 + MSGS * N);
    repeat (5) @(posedge clk);
    for (int i = 0; i < N; i++)
      for (int o = 0; o < N; o++) check(exp_q[i][o].size() == 0, "all flits delivered");
    check(drop == '0, "no drops");
    check(contention > 0, "contention happened");
    check(backpressure > 0, "input back-pressure happened");
    check(nonlowest > 0, "grants beyond the lowest-index requester");
    $display("contention=%0d backpressure=%0d nonlowest=%0d", contention, backpressure, nonlowest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
