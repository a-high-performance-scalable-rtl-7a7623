// ps_converter: parallel-to-serial converter of one output line.
//
// The output switch delivers at most one cell per slot to a line, as a whole
// CELL_W-bit word in one cycle. The converter loads it and sends it on the
// line in the next N cycles as N words of LINE_W bits, lowest word first,
// with `line_start` and the routing tag on `line_dest` beside word 0. A new
// cell can be loaded in the cycle the last word of the previous one is sent,
// so a line carries one cell per slot without gaps. Converting each outgoing
// cell from parallel to serial form follows the design; the word-serial
// format is this implementation's choice (see sp_converter).
//
// Timing: a cell loaded in cycle t appears as words in cycles t+1 .. t+N.
module ps_converter #(
  parameter int N      = 4,
  parameter int CELL_W = 424,
  parameter int DEST_W = 4,
  parameter int LINE_W = (CELL_W + N - 1) / N,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cell_valid,
  input  logic [DEST_W-1:0] cell_dest,
  input  logic [CELL_W-1:0] cell_data,
  output logic              line_start,
  output logic              line_busy,
  output logic [LINE_W-1:0] line_data,
  output logic [DEST_W-1:0] line_dest
);

  localparam int FULL_W = N * LINE_W;

  logic [FULL_W-1:0] shreg;
  logic [SW-1:0]     left;      // words still to send after the current one
  logic              first;
  logic [DEST_W-1:0] dest_q;

  assign line_data  = line_busy ? shreg[LINE_W-1:0] : '0;
  assign line_start = line_busy && first;
  assign line_dest  = line_start ? dest_q : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg     <= '0;
      left      <= '0;
      first     <= 1'b0;
      line_busy <= 1'b0;
      dest_q    <= '0;
    end else if (cell_valid) begin
      shreg     <= FULL_W'(cell_data);
      left      <= SW'(N - 1);
      first     <= 1'b1;
      line_busy <= 1'b1;
      dest_q    <= cell_dest;
    end else if (line_busy) begin
      shreg     <= shreg >> LINE_W;
      first     <= 1'b0;
      if (left == '0) line_busy <= 1'b0;
      else            left <= left - 1'b1;
    end
  end

  // A new cell may only arrive when the previous one has gone out.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) cell_valid |-> (!line_busy || left == '0));

endmodule
