// tb_xcvr_link: a link with 4 cycles of flight time and an 8-word receive
// FIFO, driven with random traffic and a receiver that is often not ready.
// Checks that every flit arrives once and in order, that none arrives
// sooner than 4 cycles after it was sent (and, on an idle link, exactly
// then), that the sender is paused when the receive side fills, and that
// no flit is lost when it is.
module tb_xcvr_link;
  import noc_pkg::*;
  localparam int LAT = 4, RXD = 8;
  logic clk = 0, rst_n = 0;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  flit_t tx_data, rx_data;
  int checks = 0, failures = 0, cyc = 0, paused = 0, sent = 0, got = 0;
  flit_t exp_q [$];
  int    sent_at [$];

  xcvr_link #(.LATENCY(LAT), .RX_DEPTH(RXD)) dut (.*);

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
    cyc++;
    if (tx_valid && !tx_ready) paused++;
    if (rx_valid && rx_ready) begin
      check(exp_q.size() > 0 && rx_data == exp_q[0], "order and content");
      check(sent_at.size() > 0 && cyc - sent_at[0] >= LAT, "not sooner than the flight time");
      if (exp_q.size() > 0) begin void'(exp_q.pop_front()); void'(sent_at.pop_front()); end
      got++;
    end
    if (tx_valid && tx_ready) begin exp_q.push_back(tx_data); sent_at.push_back(cyc); sent++; end
  end

  initial begin
    int t0;
    tx_valid = 0; tx_data = '0; rx_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // idle link: exact flight time
    @(negedge clk); tx_valid = 1; tx_data = 64'h1111;
    @(posedge clk); t0 = cyc;
    @(negedge clk); tx_valid = 0;
    while (!rx_valid) @(negedge clk);
    check(cyc - t0 == LAT, $sformatf("idle flight time %0d", cyc - t0));
    @(negedge clk);
    for (int c = 0; c < 5000; c++) begin
      if (!tx_valid || tx_ready) begin
        tx_valid = ($urandom_range(0, 3) != 0);
        tx_data  = {$urandom, $urandom};
      end
      rx_ready = (c % 1000 < 300) ? 1'b0 : ($urandom_range(0, 1) == 1);
      @(negedge clk);
    end
    tx_valid = 0; rx_ready = 1;
    repeat (50) @(negedge clk);
    check(got == sent && exp_q.size() == 0, $sformatf("no loss: %0d of %0d", got, sent));
    check(paused > 0, "sender paused when the far end filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
