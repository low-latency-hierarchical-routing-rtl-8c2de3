// rw_controller: the read/write state machine (RW_SM) of one router input.
//
// It moves messages from its input FIFO through the crossbar into an output
// FIFO, one flit per cycle, without any intermediate buffer. Three states:
//   IDLE   the input FIFO is empty.
//   RW     a header is at the head of the FIFO. The routed direction (dir,
//          from routing_logic) is requested from that direction's arbiter
//          (req, one-hot). When the arbiter names this input the priority
//          channel (grant[dir]), the header is read from the input FIFO and
//          written to the output FIFO in the same cycle, and the state
//          machine moves to DET. Until then read and write wait.
//   DET    ("deterministic") the direction is held for this input. Each
//          cycle a tail flit is present and the output FIFO is not full, it
//          is moved across. Writing the last tail (control 1001) raises done,
//          which releases the direction, and the machine returns to RW.
// A flit that reaches RW without a header code is dropped (read and
// discarded) and counted on drop so that a stray tail cannot block the
// port. The three states and their conditions (empty, !empty, released) are
// those of the published RW_SM; holding the direction for a whole message
// and the drop rule are this design's choice.
module rw_controller
  import noc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // head of the input FIFO (first word fall through)
  input  logic                 fifo_empty,
  input  flit_t                fifo_data,
  output logic                 fifo_rd,
  // routing decision for the header at the head of the FIFO
  input  port_t                dir,
  // arbitration
  output logic [NUM_PORTS-1:0] req,
  input  logic [NUM_PORTS-1:0] grant,      // grant from each direction's arbiter, this input's bit
  input  logic [NUM_PORTS-1:0] out_full,   // output FIFO full, per direction
  // to the crossbar
  output logic                 wr,
  output port_t                wr_dir,
  output logic                 done,       // last flit written: release wr_dir
  output logic                 drop
);

  typedef enum logic [1:0] {S_IDLE, S_RW, S_DET} state_t;
  state_t state, state_n;
  port_t  dir_q;
  logic   is_header, is_last;

  assign is_header = (flit_ctrl(fifo_data) == CTRL_HEADER);
  assign is_last   = (flit_ctrl(fifo_data) == CTRL_LAST);

  always_comb begin
    state_n = state;
    req     = '0;
    fifo_rd = 1'b0;
    wr      = 1'b0;
    wr_dir  = dir_q;
    done    = 1'b0;
    drop    = 1'b0;
    unique case (state)
      S_IDLE: if (!fifo_empty) state_n = S_RW;
      S_RW: begin
        wr_dir = dir;
        if (fifo_empty) begin
          state_n = S_IDLE;
        end else if (!is_header) begin
          fifo_rd = 1'b1;
          drop    = 1'b1;
        end else begin
          req[dir] = 1'b1;
          if (grant[dir]) begin
            fifo_rd = 1'b1;
            wr      = 1'b1;
            state_n = S_DET;
          end
        end
      end
      S_DET: begin
        if (!fifo_empty && !out_full[dir_q]) begin
          fifo_rd = 1'b1;
          wr      = 1'b1;
          if (is_last) begin
            done    = 1'b1;
            state_n = S_RW;
          end
        end
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      dir_q <= '0;
    end else begin
      state <= state_n;
      if (state == S_RW && wr) dir_q <= dir;
    end
  end

  a_grant_only_if_req: assert property (@(posedge clk) disable iff (!rst_n)
                                        (grant & ~req) == '0);

endmodule
