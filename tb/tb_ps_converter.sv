// tb_ps_converter: loads random cells into the parallel-to-serial converter
// at most once every n cycles (back to back or with gaps) and checks, cycle
// by cycle, that each cell comes out in the following n cycles as n words,
// lowest word first, with line_start and the tag beside the first word, and
// that the line is all zeros when idle. Runs n = 4 and n = 16.
module tb_ps_converter;
  localparam int CW = 424, DW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  bit done [2];

  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int N  = g ? 16 : 4;
    localparam int LW = (CW + N - 1) / N;
    logic          cell_valid = 0, line_start, line_busy;
    logic [DW-1:0] cell_dest = '0, line_dest;
    logic [CW-1:0] cell_data = '0;
    logic [LW-1:0] line_data;

    ps_converter #(.N(N), .CELL_W(CW), .DEST_W(DW), .LINE_W(LW)) dut (
      .clk, .rst_n, .cell_valid, .cell_dest, .cell_data, .line_start, .line_busy, .line_data, .line_dest
    );

    initial begin
      logic [N*LW-1:0] cur;
      logic [DW-1:0]   cur_d;
      int              word;      // word of cur on the line this cycle, -1 if idle
      int              gap;
      word = -1; cur = '0; cur_d = '0; gap = 0;
      wait (rst_n);
      @(posedge clk); #1;
      for (int c = 0; c < 3000; c++) begin
        bit ld;
        // a new cell may be loaded while the last word is on the line
        ld = (word == -1 || word == N - 1) && ($urandom % 3 != 0);
        cell_valid = ld;
        if (ld) begin
          for (int b = 0; b < CW; b++) cell_data[b] = 1'($urandom);
          cell_dest = DW'($urandom);
        end else begin
          cell_data = '0; cell_dest = '0;
        end
        #0;
        checks++;
        if (word >= 0) begin
          if (line_data != cur[word*LW +: LW] || line_start != (word == 0) ||
              line_dest != ((word == 0) ? cur_d : '0)) begin
            failures++;
            $display("FAIL n=%0d cycle %0d word %0d", N, c, word);
          end
        end else if (line_start || line_data != '0 || line_dest != '0) begin
          failures++;
          $display("FAIL n=%0d cycle %0d idle line not zero", N, c);
        end
        @(posedge clk); #1;
        if (ld) begin
          cur = (N*LW)'(cell_data); cur_d = cell_dest; word = 0;
        end else if (word >= 0) begin
          word = (word == N - 1) ? -1 : word + 1;
        end
      end
      cell_valid = 0;
      done[g] = 1;
    end
  end

  initial begin
    done[0] = 0; done[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
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
