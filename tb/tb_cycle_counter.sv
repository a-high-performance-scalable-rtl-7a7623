// tb_cycle_counter: checks the DEC-CNT/DMX-CNT counter against a modulo-n
// reference: load of every start value, counting up and down across the wrap,
// and the start-value functions of atm_pkg against the design's initial
// values for a 4 x 4 unit switch (DEC-CNT centre 3,0,1,2; DMX-CNT input
// 0,3,2,1 and centre 3,0,1,2; all others 0).
module tb_cycle_counter;
  import atm_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, load = 0, down = 0;
  logic [1:0] init = '0, value;
  int checks = 0, failures = 0;
  int model;

  cycle_counter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  localparam int DEC_CTR[4] = '{3, 0, 1, 2};
  localparam int DMX_IN[4]  = '{0, 3, 2, 1};

  initial begin
    @(posedge clk); #1 rst_n = 1;
    chk(value, 0, "reset");
    for (int st = 0; st < N; st++) begin
      for (int d = 0; d < 2; d++) begin
        init = 2'(st); down = d[0]; load = 1;
        @(posedge clk); #1 load = 0;
        model = st;
        chk(value, model, "load");
        for (int k = 0; k < 9; k++) begin
          @(posedge clk); #1;
          model = d ? (model + N - 1) % N : (model + 1) % N;
          chk(value, model, d ? "count down" : "count up");
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      chk(dec_cnt_init(STAGE_INPUT, i, N), 0, "DEC-CNT input");
      chk(dec_cnt_init(STAGE_CENTER, i, N), DEC_CTR[i], "DEC-CNT centre");
      chk(dec_cnt_init(STAGE_OUTPUT, i, N), 0, "DEC-CNT output");
      chk(dmx_cnt_init(STAGE_INPUT, i, N), DMX_IN[i], "DMX-CNT input");
      chk(dmx_cnt_init(STAGE_CENTER, i, N), DEC_CTR[i], "DMX-CNT centre");
      chk(dmx_cnt_init(STAGE_OUTPUT, i, N), 0, "DMX-CNT output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
