// tb_stochastic_arbiter: checks that the grant goes to a requester whose FIFO
// is fullest, that equal usage is broken at random (every one of nine equal
// requesters must win a fair share), that no grant is given while the
// direction is held or the output has no space, and that done from the
// owner releases the direction.
module tb_stochastic_arbiter;
  localparam int N = 9, CW = 11;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, done, grant;
  logic [CW-1:0] usage [N];
  logic space, busy;
  logic [3:0] owner;
  int checks = 0, failures = 0;
  int wins [N];

  stochastic_arbiter #(.N(N), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int idx_of(logic [N-1:0] g);
    for (int i = 0; i < N; i++) if (g[i]) return i;
    return -1;
  endfunction

  initial begin
    int g, maxu;
    bit equal;
    req = 0; done = 0; space = 1;
    for (int i = 0; i < N; i++) usage[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      equal = (t % 2 == 0);
      @(negedge clk);
      done = 0;
      req  = equal ? '1 : N'($urandom_range(1, (1 << N) - 1));
      for (int i = 0; i < N; i++) usage[i] = equal ? CW'(100) : CW'($urandom_range(0, 20));
      space = 1;
      #1;
      check(!busy && $onehot(grant), "one grant when free");
      g = idx_of(grant);
      maxu = 0;
      for (int i = 0; i < N; i++) if (req[i] && usage[i] > maxu) maxu = usage[i];
      check(g >= 0 && req[g] && int'(usage[g]) == maxu, "fullest requester wins");
      if (equal && g >= 0) wins[g]++;
      @(negedge clk);
      check(busy && int'(owner) == g, "direction held by winner");
      check(grant == '0, "no grant while held");
      // hold for a few cycles, then release
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk); check(grant == '0 && busy, "still held");
      end
      done = N'(1) << g;
      #1 check(grant == '0, "no grant in release cycle");
      @(negedge clk);
      done = 0;
      check(!busy, "released");
      // no space: no grant
      space = 0; #1 check(grant == '0, "no grant without space");
    end
    for (int i = 0; i < N; i++) begin
      // 1500 equal-usage trials over 9 inputs: 166 expected each
      check(wins[i] > 80, $sformatf("input %0d wins %0d of equal-usage draws", i, wins[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
