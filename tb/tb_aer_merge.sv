// tb_aer_merge: four sources offer events at random; checks against a
// round-robin model that each accepted event is presented next on the
// output with its engine number, that no event is lost or duplicated, that
// the output holds while out_ready is low, and that a source that keeps
// offering is served within four accepted events.
module tb_aer_merge;
  import noc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready;
  logic [14:0] in_neuron [N];
  logic [11:0] in_tstep [N];
  logic out_valid, out_ready;
  aer_event_t out_event;
  int checks = 0, failures = 0;
  aer_event_t exp_q [$];
  int waits [N];
  int cnt [N];
  int max_wait = 0;
  logic [N-1:0] taken;

  aer_merge #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    check($onehot0(in_ready), "one source taken per cycle");
    if (out_valid && out_ready) begin
      check(exp_q.size() > 0 && out_event == exp_q[0], "event order and content");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    for (int i = 0; i < N; i++) begin
      taken[i] = in_valid[i] && in_ready[i];
      if (!in_valid[i]) waits[i] = 0;
      if (in_valid[i] && in_ready[i]) begin
        exp_q.push_back('{valid: 1'b1, engine: 4'(i), neuron: in_neuron[i], tstep: in_tstep[i]});
        waits[i] = 0;
        cnt[i]++;
      end else if (in_valid[i] && (in_ready != '0)) begin
        waits[i]++;
        if (waits[i] > max_wait) max_wait = waits[i];
      end
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; taken = 0;
    for (int i = 0; i < N; i++) begin in_neuron[i] = 0; in_tstep[i] = 0; waits[i] = 0; cnt[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        // a source keeps its event until taken
        if (!in_valid[i] || taken[i]) begin
          in_valid[i]  = ($urandom_range(0, 1) == 1) || (c > 2500);
          in_neuron[i] = 15'($urandom);
          in_tstep[i]  = 12'($urandom);
        end
      end
      out_ready = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "all events delivered");
    check(max_wait < N, $sformatf("round-robin service, longest wait %0d", max_wait));
    for (int i = 0; i < N; i++) check(cnt[i] > 500, "every source served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
