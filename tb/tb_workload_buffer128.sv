// tb_workload_buffer128: loss-rate estimate from buffer occupancy. The
// 16 x 16 switch is built with a very large buffer (128 cells per port) and
// run under uniform random traffic at arrival rates 0.8 and 0.9; how often an
// input switch holds at least k cells per port estimates the loss rate of a
// k-cell-per-port buffer. With this buffer no cell may be lost. A third run
// offers a cell on every line in every slot (arrival rate 1.0); the switch
// must then carry all of them, a throughput of 100 %.
module tb_workload_buffer128;
  logic d0, d1, d2;
  int c0, c1, c2, f0, f1, f2;

  atm_workload_bench #(.NP(16), .CPP(128), .LOAD_PM(900), .BURST(1), .SLOTS(40000), .MAX_LOSS_PPM(0), .HIST(1))
    u_p90 (.done(d0), .checks(c0), .failures(f0));
  atm_workload_bench #(.NP(16), .CPP(128), .LOAD_PM(800), .BURST(1), .SLOTS(40000), .MAX_LOSS_PPM(0), .HIST(1))
    u_p80 (.done(d1), .checks(c1), .failures(f1));
  atm_workload_bench #(.NP(16), .CPP(128), .LOAD_PM(1000), .BURST(1), .SLOTS(20000), .MAX_LOSS_PPM(0), .MIN_THRU_PM(1000))
    u_p100 (.done(d2), .checks(c2), .failures(f2));

  initial begin
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end

  initial begin
    #200000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
