// tb_sp_converter: feeds random cells, as n words per slot with random gaps,
// into the serial-to-parallel converter and checks that every cell (tag and
// all CELL_W bits) is presented unchanged for the whole of the next slot, and
// that a slot without a cell is presented as no cell. Runs n = 4 (words fill
// the cell exactly) and n = 16 (the last word carries padding).
module tb_sp_converter;
  localparam int CW = 424, DW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  bit done [2];
  bit go = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int N  = g ? 16 : 4;
    localparam int LW = (CW + N - 1) / N;
    logic          line_start = 0, cell_valid;
    logic [LW-1:0] line_data = '0;
    logic [DW-1:0] line_dest = '0, cell_dest;
    logic [CW-1:0] cell_data;

    sp_converter #(.N(N), .CELL_W(CW), .DEST_W(DW), .LINE_W(LW)) dut (
      .clk, .rst_n, .load, .line_start, .line_data, .line_dest, .cell_valid, .cell_dest, .cell_data
    );

    initial begin
      bit            prev_on;
      logic [CW-1:0] prev_cell;
      logic [DW-1:0] prev_dest;
      prev_on = 0; prev_cell = '0; prev_dest = '0;
      wait (go);
      for (int sl = 0; sl < 300; sl++) begin
        bit on;
        logic [N*LW-1:0] full;
        logic [DW-1:0] d;
        on = ($urandom % 4 != 0);
        full = '0;
        for (int b = 0; b < CW; b++) full[b] = 1'($urandom);
        d = DW'($urandom);
        for (int w = 0; w < N; w++) begin
          line_start = on && (w == 0);
          line_dest  = (on && w == 0) ? d : '0;
          line_data  = on ? full[w*LW +: LW] : '0;
          if (sl > 0) begin
            #0;
            checks++;
            if (cell_valid != prev_on || (prev_on && (cell_dest != prev_dest || cell_data != prev_cell))) begin
              failures++;
              $display("FAIL n=%0d slot %0d word %0d", N, sl, w);
            end
          end
          @(posedge clk); #1;
        end
        prev_on = on; prev_cell = full[CW-1:0]; prev_dest = d;
      end
      done[g] = 1;
    end
  end

  initial begin
    done[0] = 0; done[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    load = 1;
    @(posedge clk); #1 load = 0;
    go = 1;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
