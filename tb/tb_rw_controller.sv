// tb_rw_controller: feeds one RW state machine from a queue that behaves as
// a fall-through FIFO, plays the arbiters (random grants for the requested
// direction) and the output FIFOs (random full), and checks that
//   * a header is requested on its routed direction, and nothing is read or
//     written before the grant;
//   * once granted, the message's ten flits are written in order to that
//     direction, each read from the FIFO in the cycle it is written;
//   * tails wait while the output is full; done comes with the last tail;
//   * a request appears one cycle after a message reaches an empty FIFO;
//   * a stray tail flit is dropped.
module tb_rw_controller;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fifo_empty, fifo_rd, wr, done, drop;
  flit_t fifo_data;
  port_t dir, wr_dir;
  logic [NUM_PORTS-1:0] req, grant, out_full;
  int checks = 0, failures = 0;
  flit_t q [$];
  flit_t expect_q [$];
  int granted_dir;
  bit   in_msg;
  int   msgs_done = 0, drops = 0, stall_cycles = 0;

  rw_controller dut (.*);

  always #5 clk = ~clk;

  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? flit_t'(0) : q[0];
  assign dir        = port_t'(int'(flit_dest(fifo_data)) % 9);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic void push_msg(int d, int tag);
    header_t h = '{dest: node_t'(d), src: 7'd1, seq: 16'(tag), stamp: '0, ctrl: CTRL_HEADER};
    q.push_back(flit_t'(h));
    for (int k = 1; k <= 9; k++) q.push_back({28'(tag), 32'(k * 1000 + tag), ctrl_t'(k)});
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // arbiter and output FIFO stand-ins, driven at the negative edge
  always @(negedge clk) begin
    out_full = NUM_PORTS'($urandom) & NUM_PORTS'($urandom);
    grant    = ($urandom_range(0, 2) == 0) ? req : '0;
  end

  // scoreboard on the rising edge
  always @(posedge clk) if (rst_n) begin
    check(!(fifo_rd && fifo_empty), "no read of empty FIFO");
    check($onehot0(req), "at most one request");
    if (wr) begin
      check(fifo_rd, "write comes with read");
      if (!in_msg) begin
        check(grant[wr_dir] && req[wr_dir] && flit_ctrl(fifo_data) == CTRL_HEADER, "header only on grant");
        check(int'(wr_dir) == int'(flit_dest(fifo_data)) % 9, "header routed direction");
        granted_dir = wr_dir;
        in_msg = 1;
      end else begin
        check(int'(wr_dir) == granted_dir, "tail follows header direction");
        check(!out_full[wr_dir], "no write into full output");
      end
      check(expect_q.size() > 0 && fifo_data == expect_q[0], "flit order");
      if (expect_q.size() > 0 && fifo_data != expect_q[0]) $display("  got %h exp %h", fifo_data, expect_q[0]);
      if (expect_q.size() > 0) void'(expect_q.pop_front());
      if (flit_ctrl(fifo_data) == CTRL_LAST) begin
        check(done, "done with last tail");
        in_msg = 0;
        msgs_done++;
      end else check(!done, "no early done");
    end else begin
      check(!done, "done only with a write");
      if (in_msg && !fifo_empty && out_full[granted_dir]) stall_cycles++;
    end
    if (fifo_rd && !wr) begin
      check(drop && flit_ctrl(fifo_data) != CTRL_HEADER, "only stray tails dropped");
      drops++;
    end
    if (!in_msg && !wr && !fifo_empty && req == '0 && dut.state == dut.S_RW)
      check(flit_ctrl(fifo_data) != CTRL_HEADER, "header at head is requested");
  end

  always @(posedge clk) if (fifo_rd && !fifo_empty) #1 void'(q.pop_front());

  initial begin
    int wait_cycles;
    in_msg = 0; grant = 0; out_full = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // request timing: a message put into an empty FIFO is requested one cycle later
    @(negedge clk);
    push_msg(5, 0); foreach (q[i]) expect_q.push_back(q[i]);
    #1 check(req == '0, "no request in the IDLE cycle");
    @(negedge clk);
    #1 check(req == NUM_PORTS'(1) << 5, "request on direction 5 one cycle after IDLE");
    // a stray tail between messages
    wait (msgs_done == 1);
    @(negedge clk);
    q.push_back({60'h0BAD, 4'd3});
    for (int m = 1; m < 200; m++) begin
      int first;
      first = q.size();
      push_msg($urandom_range(0, 127), m);
      for (int i = first; i < q.size(); i++) expect_q.push_back(q[i]);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 30)) @(negedge clk);
    end
    wait_cycles = 0;
    while (msgs_done < 200 && wait_cycles < 20000) begin @(posedge clk); wait_cycles++; end
    check(msgs_done == 200, "all messages moved");
    check(drops == 1, "one stray tail dropped");
    check(stall_cycles > 0, "output-full stalls happened");
    check(expect_q.size() == 0, "nothing left over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
