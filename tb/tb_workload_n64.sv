// tb_workload_n64: the switch built for 64 lines (eight 8 x 8 unit switches
// per stage, 16 cells per port) under uniform random traffic at arrival rate
// 0.9 and bursty traffic with mean burst length 8.
module tb_workload_n64;
  logic d0, d1;
  int c0, c1, f0, f1;

  atm_workload_bench #(.NP(64), .LOAD_PM(900), .BURST(1), .SLOTS(10000), .MAX_LOSS_PPM(1000)) u_uni (.done(d0), .checks(c0), .failures(f0));
  atm_workload_bench #(.NP(64), .LOAD_PM(900), .BURST(8), .SLOTS(10000)) u_b8 (.done(d1), .checks(c1), .failures(f1));

  initial begin
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end

  initial begin
    #200000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
