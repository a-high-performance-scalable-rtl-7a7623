// tb_workload_n16: the 16 x 16 switch at its default size under the three
// traffic patterns used to evaluate it: uniform random traffic and bursty
// traffic with mean burst lengths of 4 and 8 cells, all at an arrival rate
// of 0.9. Uniform traffic must lose under 0.1 % of the cells. A fourth run
// saturates every line (arrival rate 1.0): with the default 16-cell-per-port
// buffer some cells are lost at the input stage, and the switch must still
// carry at least 0.9 cells per line and slot.
module tb_workload_n16;
  logic d0, d1, d2, d3;
  int c0, c1, c2, c3, f0, f1, f2, f3;

  atm_workload_bench #(.NP(16), .LOAD_PM(900), .BURST(1), .SLOTS(40000), .MAX_LOSS_PPM(1000)) u_uni (.done(d0), .checks(c0), .failures(f0));
  atm_workload_bench #(.NP(16), .LOAD_PM(900), .BURST(4), .SLOTS(40000)) u_b4 (.done(d1), .checks(c1), .failures(f1));
  atm_workload_bench #(.NP(16), .LOAD_PM(900), .BURST(8), .SLOTS(40000)) u_b8 (.done(d2), .checks(c2), .failures(f2));
  atm_workload_bench #(.NP(16), .LOAD_PM(1000), .BURST(1), .SLOTS(20000), .MIN_THRU_PM(900)) u_sat (.done(d3), .checks(c3), .failures(f3));

  initial begin
    wait (d0 && d1 && d2 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end

  initial begin
    #200000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
