// tb_routing_logic: sweeps all 128 destinations through routers at level 1
// (index 3), level 2 (index 1) and level 3 (index 0) and compares the chosen
// port with a reference computed from node ranges.
module tb_routing_logic;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  node_t dest;
  port_t dir1, dir2, dir3, dir1b;

  routing_logic #(.LEVEL(1), .INDEX(3)) u1 (.dest, .dir(dir1));
  routing_logic #(.LEVEL(1), .INDEX(15)) u1b (.dest, .dir(dir1b));
  routing_logic #(.LEVEL(2), .INDEX(1)) u2 (.dest, .dir(dir2));
  routing_logic #(.LEVEL(3), .INDEX(0)) u3 (.dest, .dir(dir3));

  function automatic int ref_dir(int level, int index, int d);
    int lo, hi;
    case (level)
      1: begin lo = index * 8;  hi = lo + 8;   return (d >= lo && d < hi) ? d % 8 : 8; end
      2: begin lo = index * 64; hi = lo + 64;  return (d >= lo && d < hi) ? (d / 8) % 8 : 8; end
      default: return d / 64;
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s dest=%0d", what, dest); end
  endtask

  initial begin
    for (int d = 0; d < 128; d++) begin
      dest = node_t'(d);
      #1;
      check(int'(dir1) == ref_dir(1, 3, d), "level 1 index 3");
      check(int'(dir1b) == ref_dir(1, 15, d), "level 1 index 15");
      check(int'(dir2) == ref_dir(2, 1, d), "level 2 index 1");
      check(int'(dir3) == ref_dir(3, 0, d), "level 3");
    end
    // spot values worked by hand
    dest = 7'd29; #1; check(dir1 == 4'd5 && dir2 == 4'd8 && dir3 == 4'd0, "dest 29");
    dest = 7'd100; #1; check(dir1 == 4'd8 && dir2 == 4'd4 && dir3 == 4'd1, "dest 100");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
