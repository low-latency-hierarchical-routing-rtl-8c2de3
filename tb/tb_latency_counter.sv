// tb_latency_counter: sends tagged values and returns them after random
// delays, with other traffic in between. Checks that each measured latency
// equals the delay, that values sent while a probe is outstanding are not
// measured, and that a wrong tag does not stop the counter.
module tb_latency_counter;
  localparam int TW = 23, CW = 16;
  logic clk = 0, rst_n = 0;
  logic send_valid, recv_valid, lat_valid, active;
  logic [TW-1:0] send_tag, recv_tag, probe_tag;
  logic [CW-1:0] latency;
  logic [31:0] samples;
  int checks = 0, failures = 0;

  latency_counter #(.TAG_W(TW), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    send_valid = 0; recv_valid = 0; send_tag = 0; recv_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int d;
      logic [TW-1:0] tag;
      d = $urandom_range(1, 60);
      tag = TW'($urandom);
      @(negedge clk);
      send_valid = 1; send_tag = tag;
      @(negedge clk);
      send_valid = 0;
      check(active && probe_tag == tag, "probe latched");
      // d cycles after sending: noise in between
      for (int c = 1; c < d; c++) begin
        send_valid = ($urandom_range(0, 1) == 1); send_tag = ~tag;
        recv_valid = ($urandom_range(0, 1) == 1); recv_tag = tag ^ 1;
        @(negedge clk);
      end
      send_valid = 0;
      recv_valid = 1; recv_tag = tag;
      @(negedge clk);
      recv_valid = 0;
      check(lat_valid && int'(latency) == d, $sformatf("latency %0d expected %0d", latency, d));
      check(int'(samples) == n + 1, "sample count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
