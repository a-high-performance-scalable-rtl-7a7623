// port_selector: time-division port selector in front of an input switch.
//
// The N input lines of one input switch each offer at most one cell per time
// slot and hold it for the whole slot. The selector has its own cycle counter
// (loaded to 0 with the rest of the fabric, counting up); in cycle t it passes
// line t through to input t of the input switch and drives every other input
// with zeros, so that only one input of the switch is active at a time.
// `slot_start` is high in cycle t0 and tells the sources where a time slot
// begins. Its function follows the design; holding the cell for the whole
// slot at the source and the `slot_start` output are this implementation's
// choices.
//
// Timing: the outputs are combinational from the line inputs and the counter.
module port_selector #(
  parameter int N      = 4,
  parameter int CELL_W = 424,
  parameter int DEST_W = 4,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [N-1:0]             line_valid,
  input  logic [N-1:0][DEST_W-1:0] line_dest,
  input  logic [N-1:0][CELL_W-1:0] line_cell,
  output logic [N-1:0]             sw_valid,
  output logic [N-1:0][DEST_W-1:0] sw_dest,
  output logic [N-1:0][CELL_W-1:0] sw_cell,
  output logic                     slot_start
);

  logic [SW-1:0] cyc;

  cycle_counter #(.N(N)) u_cnt (
    .clk, .rst_n, .load, .init('0), .down(1'b0), .value(cyc)
  );

  assign slot_start = (cyc == '0);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (cyc == SW'(i)) begin
        sw_valid[i] = line_valid[i];
        sw_dest[i]  = line_valid[i] ? line_dest[i] : '0;
        sw_cell[i]  = line_valid[i] ? line_cell[i] : '0;
      end else begin
        sw_valid[i] = 1'b0;
        sw_dest[i]  = '0;
        sw_cell[i]  = '0;
      end
    end
  end

endmodule
