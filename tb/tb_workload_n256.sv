// tb_workload_n256: the largest configuration evaluated, 256 lines built
// from sixteen 16 x 16 unit switches per stage (16 cells per port), under
// uniform random traffic at arrival rate 0.9.
module tb_workload_n256;
  logic d0;
  int c0, f0;

  atm_workload_bench #(.NP(256), .LOAD_PM(900), .BURST(1), .SLOTS(1000), .MAX_LOSS_PPM(1000)) u_uni (.done(d0), .checks(c0), .failures(f0));

  initial begin
    wait (d0);
    $display("TB_RESULT checks=%0d failures=%0d", c0, f0);
    $finish;
  end

  initial begin
    #200000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0, f0 + 1);
    $finish;
  end
endmodule
