// tb_crossbar: random sets of inputs writing to distinct outputs; every
// output must carry exactly the flit of the input that targets it.
module tb_crossbar;
  import noc_pkg::*;
  localparam int N = 9;
  int checks = 0, failures = 0;
  flit_t in_data [N], out_data [N];
  logic [N-1:0] in_wr, out_wr;
  port_t in_dir [N];

  crossbar #(.N(N)) dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm [N];
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < N; i++) begin
        in_data[i] = {$urandom, $urandom};
        in_dir[i]  = port_t'(perm[i]);
        in_wr[i]   = ($urandom_range(0, 2) != 0);
      end
      #1;
      for (int o = 0; o < N; o++) begin
        int src;
        src = -1;
        for (int i = 0; i < N; i++) if (perm[i] == o) src = i;
        checks++;
        if (out_wr[o] != in_wr[src] || (in_wr[src] && out_data[o] != in_data[src])) begin
          failures++; $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
