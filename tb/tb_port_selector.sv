// tb_port_selector: after a load, line i must reach input i of the switch in
// cycle t = i of every slot and nowhere else; all other inputs stay zero;
// slot_start must be high exactly in cycle t0.
module tb_port_selector;
  localparam int N = 4, CW = 424, DW = 4;
  logic clk = 0, rst_n = 0, load = 0;
  logic [N-1:0] line_valid, sw_valid;
  logic [N-1:0][DW-1:0] line_dest, sw_dest;
  logic [N-1:0][CW-1:0] line_cell, sw_cell;
  logic slot_start;
  int checks = 0, failures = 0;

  port_selector #(.N(N), .CELL_W(CW), .DEST_W(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    line_valid = '0; line_dest = '0; line_cell = '0;
    @(posedge clk); #1 rst_n = 1;
    // run a couple of cycles so the counter is not at zero, then load
    repeat (2) @(posedge clk);
    #1 load = 1;
    @(posedge clk); #1 load = 0;
    for (int c = 0; c < 400; c++) begin
      int t;
      t = c % N;
      if (t == 0) begin
        for (int i = 0; i < N; i++) begin
          line_valid[i] = 1'($urandom);
          line_dest[i]  = DW'($urandom);
          for (int b = 0; b < CW; b += 16) line_cell[i][b +: 16] = 16'($urandom);
        end
      end
      #1;
      checks++;
      if (slot_start != (t == 0)) begin failures++; $display("FAIL slot_start in t%0d", t); end
      for (int i = 0; i < N; i++) begin
        bit on;
        on = (i == t) && line_valid[i];
        checks++;
        if (sw_valid[i] != on || sw_dest[i] != (on ? line_dest[i] : '0) || sw_cell[i] != (on ? line_cell[i] : '0)) begin
          failures++;
          $display("FAIL input %0d in cycle t%0d", i, t);
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
