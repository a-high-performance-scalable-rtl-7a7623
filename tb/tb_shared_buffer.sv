// tb_shared_buffer: writes random cells, tags and next addresses into random
// locations and reads them back through the combinational read port,
// comparing with a model array; also checks that a write and a read of
// different locations in the same clock do not disturb each other.
module tb_shared_buffer;
  localparam int LOCS = 16, CW = 424, DW = 4, AW = 4;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, wnext = '0, raddr = '0, rnext;
  logic [CW-1:0] wcell = '0, rcell;
  logic [DW-1:0] wdest = '0, rdest;
  int checks = 0, failures = 0;
  logic [CW-1:0] m_cell [LOCS];
  logic [DW-1:0] m_dest [LOCS];
  logic [AW-1:0] m_next [LOCS];
  bit written [LOCS];

  shared_buffer #(.LOCS(LOCS), .CELL_W(CW), .DEST_W(DW)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [CW-1:0] rnd_cell();
    logic [CW-1:0] c;
    for (int i = 0; i < CW; i += 32) c[i +: 8] = 8'($urandom);
    for (int i = 0; i < CW; i++) if (i % 32 >= 8) c[i] = 1'($urandom);
    return c;
  endfunction

  initial begin
    foreach (written[i]) written[i] = 0;
    for (int k = 0; k < 3000; k++) begin
      we    = ($urandom % 3 != 0);
      waddr = AW'($urandom);
      wcell = rnd_cell();
      wdest = DW'($urandom);
      wnext = AW'($urandom);
      raddr = AW'($urandom);
      #1;
      if (written[raddr]) begin
        checks++;
        if (rcell != m_cell[raddr] || rdest != m_dest[raddr] || rnext != m_next[raddr]) begin
          failures++;
          $display("FAIL read of location %0d", raddr);
        end
      end
      @(posedge clk);
      if (we) begin
        m_cell[waddr] = wcell; m_dest[waddr] = wdest; m_next[waddr] = wnext; written[waddr] = 1;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
