// hiaer_router: nine-port router of the hierarchical (tree) network.
//
// Ports 0..7 connect to the level below (nodes, or routers of the next lower
// level) and port 8 to the level above. The same module serves every level:
// LEVEL and INDEX place it in the tree and only change the routing decode.
//
// Datapath, per cycle:
//   * Each input port writes into its own 64-bit input FIFO (1024 words) when
//     in_valid is high and the FIFO is not nearly full; in_ready is that
//     "not nearly full" signal (threshold 1012, leaving room for a message)
//     and tells the link's receive buffer to stop.
//   * routing_logic decodes the destination of the header at the head of
//     each input FIFO; the input's rw_controller requests that direction.
//   * Nine stochastic_arbiters, one per output direction, each grant the
//     requesting input with the fullest FIFO (random tie-break), provided the
//     direction is free and its output FIFO is not nearly full. A granted
//     input then owns the direction until its last tail flit has passed.
//   * The crossbar carries each moving flit to its output FIFO. All nine
//     inputs can move a flit in the same cycle if they target different
//     directions.
//   * Output FIFO o presents its head on out_data[o]/out_valid[o] and pops on
//     out_ready[o].
// Latency through an idle router: a flit written at cycle t is visible at
// the input FIFO head at t+1, the state machine leaves IDLE at t+1, the
// header is granted and written at t+2 and is on out_data at t+3. Tail
// flits then follow one per cycle.
// Structure (nine FIFOs each side, per-input routing logic and RW state
// machines, nine arbiters fed by the input FIFO word counts and the output
// FIFO availability, store-and-forward FIFOs with a nearly-full stop) follows
// the published router; the handshake names and the cycle timing are this
// design's choice.
module hiaer_router
  import noc_pkg::*;
#(
  parameter int unsigned LEVEL      = 1,
  parameter int unsigned INDEX      = 0,
  parameter int unsigned DEPTH      = FIFO_DEPTH,
  parameter int unsigned AF_LEVEL   = FIFO_AF_LEVEL,
  parameter logic [31:0] SEED       = 32'h1357_9BDF,
  localparam int unsigned N         = NUM_PORTS,
  localparam int unsigned CNT_W     = $clog2(DEPTH + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in_valid,
  input  flit_t        in_data  [N],
  output logic [N-1:0] in_ready,
  output logic [N-1:0] out_valid,
  output flit_t        out_data [N],
  input  logic [N-1:0] out_ready,
  // observation
  output logic [N-1:0] out_busy,     // direction held by an input
  output logic [N-1:0] drop          // stray non-header flit discarded at input i
);

  // input side
  flit_t        if_data  [N];
  logic [N-1:0] if_empty, if_af, if_rd;
  logic [CNT_W-1:0] if_count [N];

  // output side
  logic [N-1:0] of_full, of_af, of_empty;
  flit_t        xb_data [N];
  logic [N-1:0] xb_wr;

  // per input control
  port_t        dir    [N];
  port_t        wr_dir [N];
  logic [N-1:0] wr, done_i;
  logic [N-1:0] req_io   [N];   // req_io[i][o]
  logic [N-1:0] req_oi   [N];   // req_oi[o][i]
  logic [N-1:0] grant_oi [N];   // grant_oi[o][i]
  logic [N-1:0] grant_io [N];   // grant_io[i][o]
  logic [N-1:0] done_oi  [N];   // done_oi[o][i]
  logic [$clog2(N)-1:0] owner [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH), .AF_LEVEL(AF_LEVEL)) u_in_fifo (
      .clk, .rst_n,
      .wr_en(in_valid[i] && !if_af[i]), .wr_data(in_data[i]),
      .rd_en(if_rd[i]), .rd_data(if_data[i]),
      .empty(if_empty[i]), .full(), .almost_full(if_af[i]), .count(if_count[i])
    );
    assign in_ready[i] = !if_af[i];

    routing_logic #(.LEVEL(LEVEL), .INDEX(INDEX)) u_route (
      .dest(flit_dest(if_data[i])), .dir(dir[i])
    );

    rw_controller u_rw (
      .clk, .rst_n,
      .fifo_empty(if_empty[i]), .fifo_data(if_data[i]), .fifo_rd(if_rd[i]),
      .dir(dir[i]), .req(req_io[i]), .grant(grant_io[i]), .out_full(of_full),
      .wr(wr[i]), .wr_dir(wr_dir[i]), .done(done_i[i]), .drop(drop[i])
    );
  end

  // transpose the request / grant / done matrices between inputs and outputs
  always_comb begin
    for (int o = 0; o < N; o++)
      for (int i = 0; i < N; i++) begin
        req_oi[o][i]   = req_io[i][o];
        grant_io[i][o] = grant_oi[o][i];
        done_oi[o][i]  = done_i[i] && (wr_dir[i] == port_t'(o));
      end
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    stochastic_arbiter #(.N(N), .CNT_W(CNT_W), .SEED(SEED ^ (32'h9E37_79B9 * (o + 1)))) u_arb (
      .clk, .rst_n,
      .req(req_oi[o]), .usage(if_count), .space(!of_af[o]), .done(done_oi[o]),
      .grant(grant_oi[o]), .busy(out_busy[o]), .owner(owner[o])
    );

    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH), .AF_LEVEL(AF_LEVEL)) u_out_fifo (
      .clk, .rst_n,
      .wr_en(xb_wr[o]), .wr_data(xb_data[o]),
      .rd_en(out_ready[o] && !of_empty[o]), .rd_data(out_data[o]),
      .empty(of_empty[o]), .full(of_full[o]), .almost_full(of_af[o]), .count()
    );
    assign out_valid[o] = !of_empty[o];

    // only the owner of a held direction may write to it
    a_owner_writes: assert property (@(posedge clk) disable iff (!rst_n)
      out_busy[o] && xb_wr[o] |-> wr[owner[o]] && wr_dir[owner[o]] == port_t'(o));
  end

  crossbar #(.N(N)) u_xbar (
    .in_data(if_data), .in_wr(wr), .in_dir(wr_dir),
    .out_data(xb_data), .out_wr(xb_wr)
  );

endmodule
