// aer_merge: the synchronous address-event bus that joins the neural
// engines of a node to its packet interface.
//
// N engines offer events with a valid/ready handshake. Each cycle the merge
// takes at most one event, from the first valid engine at or after a
// rotating pointer (round-robin, so every engine is served within N
// cycles), tags it with the engine number and presents it as an AER event
// word on out_valid/out_event, registered. out_ready pops it; a new event is
// taken in the cycle the output register is empty or being popped.
// The published node places a synchronous AER system between its sixteen
// engines and the interface but does not describe it; the round-robin
// one-event-per-cycle merge is this design's choice.
module aer_merge
  import noc_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in_valid,
  input  logic [14:0]  in_neuron [N],
  input  logic [11:0]  in_tstep  [N],
  output logic [N-1:0] in_ready,
  output logic         out_valid,
  output aer_event_t   out_event,
  input  logic         out_ready
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr;
  logic [IW-1:0] pick;
  logic          found;
  logic          load;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 0; k < N; k++) begin
      automatic logic [IW-1:0] idx = IW'((32'(ptr) + k) % N);
      if (!found && in_valid[idx]) begin
        found = 1'b1;
        pick  = idx;
      end
    end
    load     = found && (!out_valid || out_ready);
    in_ready = '0;
    if (load) in_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      out_valid <= 1'b0;
      out_event <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (load) begin
        out_valid <= 1'b1;
        out_event <= '{valid: 1'b1, engine: 4'(pick), neuron: in_neuron[pick], tstep: in_tstep[pick]};
        ptr       <= (pick == IW'(N - 1)) ? '0 : pick + 1'b1;
      end
    end
  end

endmodule
