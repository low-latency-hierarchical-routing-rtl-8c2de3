// noc_pkg: constants and flit types shared by the hierarchical router, the
// traffic-injecting nodes and the system top.
//
// A message travels as one header flit followed by nine tail flits, 64 bits
// each. The four least significant bits of every flit are its control field:
// 0000 marks the header, 0001 to 1001 number the tail flits in order. The
// seven most significant bits of the header, [63:57], hold the destination
// node out of 128: [59:57] select the port of a level-1 router, [62:60] the
// port of a level-2 router and [63] the level-3 half. Flit width, port count,
// destination field, control encoding, FIFO depth 1024 and nearly-full
// threshold 1012 follow the published router. The remaining header fields
// (source, sequence number, injection time stamp) and the tail payload layout
// are this design's own choice.
package noc_pkg;

  localparam int unsigned FLIT_W        = 64;
  localparam int unsigned NUM_PORTS     = 9;   // 8 down ports + 1 up port
  localparam int unsigned NUM_DOWN      = 8;
  localparam int unsigned UP_PORT       = 8;   // port index of the up link
  localparam int unsigned PORT_W        = 4;   // enough to code 0..8
  localparam int unsigned NODE_W        = 7;   // 128 nodes
  localparam int unsigned CTRL_W        = 4;
  localparam int unsigned TAILS_PER_PKT = 9;
  localparam int unsigned FLITS_PER_PKT = TAILS_PER_PKT + 1;
  localparam int unsigned FIFO_DEPTH    = 1024;
  localparam int unsigned FIFO_AF_LEVEL = 1012;
  localparam int unsigned PAYLOAD_W     = FLIT_W - CTRL_W;           // 60 bits per tail
  localparam int unsigned EVENTS_PER_PKT = 16;
  localparam int unsigned EVENT_W       = 32;
  localparam int unsigned EVENT_BITS    = EVENTS_PER_PKT * EVENT_W;  // 512
  localparam int unsigned STAMP_W       = 30;
  localparam int unsigned SEQ_W         = 16;

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [CTRL_W-1:0] ctrl_t;
  typedef logic [NODE_W-1:0] node_t;
  typedef logic [PORT_W-1:0] port_t;

  localparam ctrl_t CTRL_HEADER = 4'b0000;
  localparam ctrl_t CTRL_LAST   = ctrl_t'(TAILS_PER_PKT);  // 1001

  // Header flit layout: 7 + 7 + 16 + 30 + 4 = 64 bits.
  typedef struct packed {
    node_t                    dest;   // [63:57]
    node_t                    src;    // [56:50]
    logic [SEQ_W-1:0]         seq;    // [49:34]
    logic [STAMP_W-1:0]       stamp;  // [33:4] injection cycle
    ctrl_t                    ctrl;   // [3:0]
  } header_t;

  // One AER event word carried in the payload (16 per message).
  typedef struct packed {
    logic        valid;   // slot holds an event
    logic [3:0]  engine;  // neural engine that fired
    logic [14:0] neuron;  // neuron within the engine
    logic [11:0] tstep;   // low bits of the engine's time step
  } aer_event_t;

  function automatic ctrl_t flit_ctrl(flit_t f);
    return f[CTRL_W-1:0];
  endfunction

  function automatic node_t flit_dest(flit_t f);
    return f[FLIT_W-1 -: NODE_W];
  endfunction

endpackage
