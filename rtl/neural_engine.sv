// neural_engine: event source of one engine of a traffic-injecting node.
//
// The engine serves NEURONS neurons by time multiplexing: a slot counter
// visits one neuron per cycle and wraps, and each wrap ends one time step
// (tstep counts them). When a neuron is visited, a 16-bit LFSR value is
// XORed with a per-node salt (so that nodes built
// from the same engines do not fire in lockstep) and compared with fire_rate; if it is below, the neuron spikes and the engine
// offers the event {neuron, time step} on ev_valid/ev_neuron/ev_tstep.
// fire_rate is therefore the spike probability per neuron and time step in
// units of 1/65536. An offered event is held, and the sweep pauses, until
// ev_ready takes it (valid/ready handshake, no event is lost). en = 0 stops
// the sweep.
// The LFSR-against-firing-rate spike generation and the time-multiplexed
// neuron sweep follow the published node; the membrane dynamics of a
// leaky integrate-and-fire neuron are not modelled (the generator is a
// random spike source), and the LFSR polynomial and widths are this
// design's choice.
module neural_engine #(
  parameter int unsigned NEURONS = 32000,
  parameter logic [15:0] SEED    = 16'hB5AD,
  localparam int unsigned NW     = $clog2(NEURONS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [15:0]   fire_rate,
  input  logic [15:0]   salt,
  output logic          ev_valid,
  output logic [14:0]   ev_neuron,
  output logic [11:0]   ev_tstep,
  input  logic          ev_ready
);

  logic [15:0]   lfsr;
  logic [NW-1:0] slot;
  logic [11:0]   tstep;
  logic          step;

  // advance when enabled and no event is waiting
  assign step = en && (!ev_valid || ev_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= (SEED == '0) ? 16'h1 : SEED;
      slot      <= '0;
      tstep     <= '0;
      ev_valid  <= 1'b0;
      ev_neuron <= '0;
      ev_tstep  <= '0;
    end else begin
      if (ev_valid && ev_ready) ev_valid <= 1'b0;
      if (step) begin
        // Galois LFSR x^16 + x^14 + x^13 + x^11 + 1
        lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0);
        if ((lfsr ^ salt) < fire_rate) begin
          ev_valid  <= 1'b1;
          ev_neuron <= 15'(slot);
          ev_tstep  <= tstep;
        end
        if (slot == NW'(NEURONS - 1)) begin
          slot  <= '0;
          tstep <= tstep + 1'b1;
        end else begin
          slot <= slot + 1'b1;
        end
      end
    end
  end

endmodule
