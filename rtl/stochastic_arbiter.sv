// stochastic_arbiter: the arbiter of one router output direction.
//
// Every cycle it looks at which inputs request this direction (req, one bit
// per input FIFO) and at how many words each input FIFO holds (usage). Among
// the requesters it picks the one whose FIFO is fullest, the "priority
// channel", so that crowded queues drain first. Requesters with equal usage
// are separated at random: each input gets a 3-bit random tie-break taken
// from a 32-bit LFSR that steps every cycle, and the comparison key is
// {usage, random bits}; if those tie too the lower input index wins.
//
// A grant is a one-hot pulse on grant, given only when the direction is free
// (not busy) and the output FIFO has room for a whole message (space). The
// granted input writes its header in that same cycle, and the arbiter then
// holds the direction for it (busy, owner) until that input reports the last
// tail flit on done. The next grant can come one cycle after the release.
// Choosing the fullest requester, random tie-break, the nine-way request and
// usage inputs and the busy indicator follow the published router; the LFSR
// polynomial, the 3-bit tie-break and the packet-long lock are this design's
// choice.
module stochastic_arbiter #(
  parameter int unsigned N      = 9,
  parameter int unsigned CNT_W  = 11,
  parameter logic [31:0] SEED   = 32'hACE1_2468
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [CNT_W-1:0]     usage [N],
  input  logic                 space,
  input  logic [N-1:0]         done,
  output logic [N-1:0]         grant,
  output logic                 busy,
  output logic [$clog2(N)-1:0] owner
);

  localparam int unsigned IW = $clog2(N);
  localparam int unsigned KW = CNT_W + 3;

  logic [31:0] lfsr;
  logic [KW-1:0] key [N];
  logic [KW-1:0] best_key;
  logic [IW-1:0] best_idx;
  logic          any_req;

  // Galois LFSR, x^32 + x^22 + x^2 + x + 1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= (SEED == '0) ? 32'h1 : SEED;
    else        lfsr <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
  end

  always_comb begin
    any_req  = 1'b0;
    best_key = '0;
    best_idx = '0;
    for (int i = 0; i < N; i++) begin
      key[i] = {usage[i], lfsr[(3*i) % 30 +: 3]};
      if (req[i] && (!any_req || key[i] > best_key)) begin
        any_req  = 1'b1;
        best_key = key[i];
        best_idx = IW'(i);
      end
    end
    grant = '0;
    if (any_req && !busy && space) grant[best_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
    end else if (|grant) begin
      busy  <= 1'b1;
      owner <= best_idx;
    end else if (busy && done[owner]) begin
      busy  <= 1'b0;
    end
  end

  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_done_by_owner: assert property (@(posedge clk) disable iff (!rst_n)
                                    (done == '0) || (busy && done == (N'(1) << owner)));

endmodule
