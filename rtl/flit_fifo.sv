// flit_fifo: single-clock first-word-fall-through FIFO used for the router's
// nine input FIFOs and nine output FIFOs, and for the receive buffer of a link.
//
// The oldest word is always visible on rd_data while empty is low, so the
// consumer looks at the data before it asserts rd_en (the read pops it). The
// FIFO reports its fill level on count every cycle; the router's arbiters
// use the input FIFOs' counts to pick which input is served first.
// almost_full rises when count reaches AF_LEVEL; with the default 1024 words
// and threshold 1012 there is still room for a whole message, which is what
// the router relies on when it accepts a message header. The depth, the
// threshold and the fall-through read follow the published router; the
// count width and the behaviour on writes to a full FIFO (ignored, flagged by
// an assertion) are this design's choice. Storage is a plain array, read
// combinationally.
module flit_fifo #(
  parameter int unsigned WIDTH    = 64,
  parameter int unsigned DEPTH    = 1024,
  parameter int unsigned AF_LEVEL = 1012,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned CW      = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             almost_full,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  assign empty       = (count == '0);
  assign full        = (count == CW'(DEPTH));
  assign almost_full = (count >= CW'(AF_LEVEL));
  assign rd_data     = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  // A producer must watch full (or almost_full); a consumer must watch empty.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
