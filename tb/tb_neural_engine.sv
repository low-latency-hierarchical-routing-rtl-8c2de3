// tb_neural_engine: runs an engine of 8 neurons next to an independent
// model of its LFSR and checks every visited neuron: with ev_ready random,
// an event must be offered exactly when the model's draw is below the
// firing rate, carry the right neuron and time step, and be held until
// taken. Firing rate 0 must give no events, and a rate of 1/2 must fire
// roughly half the visits.
module tb_neural_engine;
  localparam int NEUR = 8;
  logic clk = 0, rst_n = 0;
  logic en, ev_valid, ev_ready;
  logic [15:0] fire_rate, salt;
  logic [14:0] ev_neuron;
  logic [11:0] ev_tstep;
  int checks = 0, failures = 0;

  neural_engine #(.NEURONS(NEUR), .SEED(16'h1234)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference model state
  logic [15:0] m_lfsr;
  int m_slot, m_tstep, fired, visits;
  logic m_pend;
  logic [14:0] m_neuron;
  logic [11:0] m_ts;

  initial begin
    en = 0; ev_ready = 0; fire_rate = 0; salt = 16'h00F0;
    m_lfsr = 16'h1234; m_slot = 0; m_tstep = 0; m_pend = 0; fired = 0; visits = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 3; phase++) begin
      fire_rate = (phase == 0) ? 16'd0 : (phase == 1) ? 16'h8000 : 16'hFFFF;
      fired = 0; visits = 0;
      for (int c = 0; c < 4000; c++) begin
        @(negedge clk);
        en = ($urandom_range(0, 7) != 0);
        ev_ready = ($urandom_range(0, 2) != 0);
        #1;
        check(ev_valid == m_pend, "event offered as modelled");
        if (m_pend) check(ev_neuron == m_neuron && ev_tstep == m_ts, "event neuron and time step");
        @(posedge clk);
        // model the same edge
        if (m_pend && ev_ready) m_pend = 0;
        if (en && (!ev_valid || ev_ready)) begin
          visits++;
          if ((m_lfsr ^ salt) < fire_rate) begin
            m_pend = 1; m_neuron = 15'(m_slot); m_ts = 12'(m_tstep); fired++;
          end
          m_lfsr = {1'b0, m_lfsr[15:1]} ^ (m_lfsr[0] ? 16'hB400 : 16'h0);
          if (m_slot == NEUR - 1) begin m_slot = 0; m_tstep++; end else m_slot++;
        end
      end
      if (phase == 0) check(fired == 0, "no events at rate 0");
      if (phase == 1) check(fired * 10 > visits * 4 && fired * 10 < visits * 6, $sformatf("about half fire: %0d of %0d", fired, visits));
      if (phase == 2) check(fired * 100 > visits * 99, "nearly all fire at full rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
