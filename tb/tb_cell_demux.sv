// tb_cell_demux: random cells and selects; the selected link must carry the
// cell and its tag, every other link must be all zeros, and nothing may be
// driven when no cell is sent.
module tb_cell_demux;
  localparam int N = 4, CW = 424, DW = 4;
  logic valid;
  logic [1:0] sel;
  logic [DW-1:0] dest;
  logic [CW-1:0] data;
  logic [N-1:0] out_valid;
  logic [N-1:0][DW-1:0] out_dest;
  logic [N-1:0][CW-1:0] out_cell;
  int checks = 0, failures = 0;

  cell_demux #(.N(N), .CELL_W(CW), .DEST_W(DW)) dut (.*);

  initial begin
    for (int k = 0; k < 500; k++) begin
      valid = ($urandom % 4 != 0);
      sel = 2'($urandom);
      dest = DW'($urandom);
      for (int i = 0; i < CW; i++) data[i] = 1'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        bit on;
        on = valid && (i == int'(sel));
        checks++;
        if (out_valid[i] != on ||
            out_dest[i] != (on ? dest : '0) ||
            out_cell[i] != (on ? data : '0)) begin
          failures++;
          $display("FAIL link %0d sel %0d valid %0d", i, sel, valid);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
