// tb_flit_fifo: random pushes and pops against a queue model. Checks the
// fall-through head word, count, empty, full and almost_full every cycle,
// and that a word written in one cycle is at the head in the next.
module tb_flit_fifo;
  localparam int DEPTH = 16, AF = 12, W = 64;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full, almost_full;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  flit_fifo #(.WIDTH(W), .DEPTH(DEPTH), .AF_LEVEL(AF)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fall-through: one write, visible next cycle without a read
    @(negedge clk); wr_en = 1; wr_data = 64'hDEAD_BEEF_0123_4567;
    @(negedge clk); wr_en = 0;
    check(!empty && rd_data == 64'hDEAD_BEEF_0123_4567 && count == 1, "fall through");
    rd_en = 1; @(negedge clk); rd_en = 0;
    check(empty && count == 0, "pop to empty");
    // random phases: fill-biased, drain-biased, balanced
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int bias;
      bias = (cyc / 500) % 3;
      @(negedge clk);
      // check state against model before driving
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(almost_full == (model.size() >= AF), "almost_full");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      wr_en   = !full && ($urandom_range(0, 9) < (bias == 0 ? 8 : bias == 1 ? 2 : 5));
      rd_en   = !empty && ($urandom_range(0, 9) < (bias == 0 ? 2 : bias == 1 ? 8 : 5));
      wr_data = {$urandom, $urandom};
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
