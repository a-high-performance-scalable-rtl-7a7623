// tb_flow_enable: exhaustive check of the inter-stage flow control for a
// 4-link switch: a cell is sent only when the queue holds one and the
// buffer-full line of the link selected by the demultiplexer count is low.
module tb_flow_enable;
  localparam int N = 4;
  logic [N-1:0] next_full;
  logic [1:0] sel;
  logic have_cell, enable, send, blocked;
  int checks = 0, failures = 0;

  flow_enable #(.N(N)) dut (.*);

  initial begin
    for (int f = 0; f < 16; f++)
      for (int s = 0; s < N; s++)
        for (int h = 0; h < 2; h++) begin
          bit full;
          next_full = 4'(f); sel = 2'(s); have_cell = h[0];
          #1;
          full = (f >> s) & 1;
          checks++;
          if (enable != !full || send != (h[0] && !full) || blocked != (h[0] && full)) begin
            failures++;
            $display("FAIL full=%b sel=%0d have=%0d", next_full, s, h);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
