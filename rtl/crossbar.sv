// crossbar: the 9x9 switch between the router's input side and its output
// FIFOs.
//
// Each input i presents a flit (in_data[i]), a write strobe (in_wr[i]) and
// the direction it writes to (in_dir[i]). For every output o the crossbar
// raises out_wr[o] when some input writes to o and forwards that input's
// flit. The arbiters guarantee that at most one input writes to a direction
// in a cycle; the router checks that with an assertion. Purely combinational. The published
// router names this block; the one-writer-per-output select is this
// design's construction.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned N = NUM_PORTS
) (
  input  flit_t        in_data [N],
  input  logic [N-1:0] in_wr,
  input  port_t        in_dir  [N],
  output flit_t        out_data[N],
  output logic [N-1:0] out_wr
);

  logic [N-1:0] hit [N];   // hit[o][i]: input i writes output o

  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_data[o] = '0;
      for (int i = 0; i < N; i++) begin
        hit[o][i] = in_wr[i] && (in_dir[i] == port_t'(o));
        if (hit[o][i]) out_data[o] = out_data[o] | in_data[i];
      end
      out_wr[o] = |hit[o];
    end
  end

endmodule
