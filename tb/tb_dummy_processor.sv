// tb_dummy_processor: a node of 16 engines (8 neurons each here) whose
// transmit stream is looped back to its own receive side through a 5-cycle
// delay line, so it addresses messages to itself. Checks that messages
// flow at a high firing rate, that every sent message is received intact,
// that each header's measured latency is exactly the 5-cycle loop, that
// disabling the engines stops new messages, and that a message for another
// node and a broken tail sequence are counted as errors.
module tb_dummy_processor;
  import noc_pkg::*;
  localparam int DLY = 5;
  logic clk = 0, rst_n = 0;
  node_t node_id, dest;
  logic [6:0] inj_ratio;
  logic [15:0] fire_rate;
  logic en, tx_valid, tx_ready, rx_valid, rx_ready;
  logic [STAMP_W-1:0] now, rx_lat_max;
  flit_t tx_data, rx_data;
  logic [31:0] tx_msgs, rx_msgs;
  logic [47:0] rx_lat_sum;
  logic [15:0] rx_errors;
  int checks = 0, failures = 0;
  logic  d_v [DLY];
  flit_t d_d [DLY];
  logic  inj_v;
  flit_t inj_d;

  dummy_processor #(.ENGINES(16), .NEURONS(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1'b1;

  // loop-back delay line: a flit sent at the edge of cycle t is received in
  // cycle t+DLY, so its header reads latency DLY
  always @(posedge clk) begin
    if (!rst_n) for (int s = 0; s < DLY; s++) d_v[s] <= 1'b0;
    else d_v[0] <= tx_valid && tx_ready;
    d_d[0] <= tx_data;
    for (int s = 1; s < DLY; s++) begin if (rst_n) d_v[s] <= d_v[s-1]; d_d[s] <= d_d[s-1]; end
  end
  assign rx_valid = inj_v ? 1'b1 : (d_v[DLY-1] === 1'b1);
  assign rx_data  = inj_v ? inj_d : d_d[DLY-1];
  assign tx_ready = !inj_v;

  initial begin
    node_id = 7'd37; dest = 7'd37; inj_ratio = 100; fire_rate = 16'h4000; en = 0;
    inj_v = 0; inj_d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); en = 1;
    repeat (3000) @(negedge clk);
    en = 0;
    repeat (200) @(negedge clk);
    check(rx_ready, "receive side always ready");
    check(tx_msgs > 100, $sformatf("messages flow: %0d", tx_msgs));
    check(rx_msgs == tx_msgs, $sformatf("all received: %0d of %0d", rx_msgs, tx_msgs));
    check(rx_errors == 0, "no errors");
    check(rx_lat_max == STAMP_W'(DLY), $sformatf("max latency %0d", rx_lat_max));
    check(rx_lat_sum == 48'(rx_msgs) * DLY, "latency sum");
    begin
      logic [31:0] t;
      t = tx_msgs;
      repeat (100) @(negedge clk);
      check(tx_msgs == t, "disabled engines send nothing new");
    end
    // a message addressed elsewhere, then a tail out of sequence
    inj_v = 1;
    inj_d = flit_t'(header_t'{dest: 7'd5, src: 7'd1, seq: '0, stamp: now, ctrl: CTRL_HEADER});
    @(negedge clk);
    for (int k = 1; k <= 9; k++) begin inj_d = {60'(k), ctrl_t'(k)}; @(negedge clk); end
    inj_d = flit_t'(header_t'{dest: 7'd37, src: 7'd1, seq: '0, stamp: now, ctrl: CTRL_HEADER});
    @(negedge clk);
    inj_d = {60'h0, 4'd4};
    @(negedge clk);
    inj_v = 0;
    @(negedge clk);
    check(rx_errors == 2, $sformatf("errors counted: %0d", rx_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
