// tb_packet_interface: feeds random AER events and decodes the flits that
// come out. Checks the header (destination, source, sequence number that
// counts up, send time equal to now in the sending cycle, control 0000),
// tails numbered 0001..1001, that the event slots rebuilt from the tails
// are exactly the events fed in, in order, with empty slots zero, and that
// with plenty of events and tx_ready high the flit rate matches the
// injection ratio (100 %, 50 %, 30 %).
module tb_packet_interface;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  node_t node_id, dest;
  logic [6:0] inj_ratio;
  logic [STAMP_W-1:0] now;
  logic ev_valid, ev_ready, tx_valid, tx_ready;
  aer_event_t ev_event;
  flit_t tx_data;
  logic [31:0] tx_msgs;
  int checks = 0, failures = 0;
  aer_event_t fed [$];
  logic [9*60-1:0] block;
  int fi = 0, seq_exp = 0, msgs = 0, flits = 0, cycles = 0, ev_rate = 8;

  packet_interface dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1'b1;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (ev_valid && ev_ready) fed.push_back(ev_event);
    if (tx_valid && tx_ready) begin
      header_t h;
      h = header_t'(tx_data);
      flits++;
      if (fi == 0) begin
        check(h.ctrl == CTRL_HEADER, "header control");
        check(h.dest == dest && h.src == node_id, "header addresses");
        check(int'(h.seq) == seq_exp, "sequence number");
        check(h.stamp == now, "send time");
        seq_exp++;
      end else begin
        check(int'(flit_ctrl(tx_data)) == fi, "tail number");
        block[60*(fi-1) +: 60] = tx_data[63:4];
      end
      if (fi == 9) begin
        bit seen_empty;
        seen_empty = 0;
        check(block[539:512] == '0, "padding zero");
        for (int s = 0; s < 16; s++) begin
          aer_event_t e;
          e = aer_event_t'(block[32*s +: 32]);
          if (e.valid) begin
            check(!seen_empty && fed.size() > 0 && e == fed[0], "event slot matches fed event");
            if (fed.size() > 0) void'(fed.pop_front());
          end else begin
            seen_empty = 1;
            check(e == '0, "empty slot is zero");
          end
        end
        msgs++;
        fi = 0;
      end else fi++;
    end
  end

  always @(negedge clk) begin
    if (!ev_valid || ev_ready) begin
      ev_valid = ($urandom_range(0, 9) < ev_rate);
      ev_event = '{valid: 1'b1, engine: 4'($urandom), neuron: 15'($urandom), tstep: 12'($urandom)};
    end
  end

  task automatic measure(int ratio);
    int f0, c0;
    inj_ratio = 7'(ratio);
    repeat (50) @(posedge clk);
    f0 = flits; c0 = cycles;
    repeat (3000) @(posedge clk);
    check((flits - f0) * 100 >= (cycles - c0) * (ratio - 2) && (flits - f0) * 100 <= (cycles - c0) * (ratio + 2),
          $sformatf("rate %0d%%: %0d flits in %0d cycles", ratio, flits - f0, cycles - c0));
  endtask

  initial begin
    node_id = 7'd9; dest = 7'd2; inj_ratio = 100; tx_ready = 1; ev_valid = 0;
    ev_event = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(100);
    measure(50);
    measure(30);
    // sparse events and random back-pressure
    ev_rate = 1; inj_ratio = 100;
    fork
      repeat (3000) @(negedge clk) tx_ready = ($urandom_range(0, 3) != 0);
    join
    tx_ready = 1; ev_rate = 0;
    repeat (200) @(posedge clk);
    check(fed.size() == 0, "every event sent");
    check(int'(tx_msgs) == msgs, "message counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
