// sp_converter: serial-to-parallel converter of one input line.
//
// A line carries at most one cell per time slot, as N consecutive words of
// LINE_W bits, word w in cycle t = w of the slot; `line_start` marks word 0
// and carries the cell's routing tag on `line_dest`. The converter shifts
// the words into a cell register and, at the end of the slot, hands the
// complete cell to the port selector, where it stays for the whole next slot
// (`cell_valid` low if no cell started in the slot). The cycle counter is
// loaded with 0 together with the rest of the switch. Converting each
// incoming cell from serial to parallel form follows the design; the
// word-serial line format, its slot alignment and the one-slot hold are this
// implementation's choices. When N*LINE_W exceeds CELL_W the upper bits of
// the last word are padding and are dropped.
//
// Timing: the cell received in slot k is presented in slot k+1.
module sp_converter #(
  parameter int N      = 4,      // cycles per time slot (unit-switch size)
  parameter int CELL_W = 424,
  parameter int DEST_W = 4,
  parameter int LINE_W = (CELL_W + N - 1) / N,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              line_start,
  input  logic [LINE_W-1:0] line_data,
  input  logic [DEST_W-1:0] line_dest,
  output logic              cell_valid,
  output logic [DEST_W-1:0] cell_dest,
  output logic [CELL_W-1:0] cell_data
);

  localparam int FULL_W = N * LINE_W;

  logic [SW-1:0]       cyc;
  logic [FULL_W-1:0]   shreg;
  logic                got;
  logic [DEST_W-1:0]   got_dest;
  logic [FULL_W-1:0]   whole;

  cycle_counter #(.N(N)) u_cnt (
    .clk, .rst_n, .load, .init('0), .down(1'b0), .value(cyc)
  );

  // Word w of the slot lands at bits [w*LINE_W +: LINE_W]; shifting right
  // puts the last word on top.
  assign whole = {line_data, shreg[FULL_W-1:LINE_W]};

  always_ff @(posedge clk) begin
    if (!rst_n || load) begin
      shreg      <= '0;
      got        <= 1'b0;
      got_dest   <= '0;
      cell_valid <= 1'b0;
      cell_dest  <= '0;
      cell_data  <= '0;
    end else begin
      shreg <= whole;
      if (cyc == '0) begin
        got      <= line_start;
        got_dest <= line_dest;
      end
      if (cyc == SW'(N - 1)) begin
        cell_valid <= got;
        cell_dest  <= got ? got_dest : '0;
        cell_data  <= got ? whole[CELL_W-1:0] : '0;
      end
    end
  end

endmodule
