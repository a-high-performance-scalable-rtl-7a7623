// cell_demux: the 1 x N output demultiplexer of a unit switch.
//
// The cell read from the shared buffer goes out on link `sel` (the DMX-CNT
// value); every other link carries all zeros, so that the receiving switch
// can merge its inputs with a plain OR. The demultiplexer follows the design;
// driving idle links to zero is this implementation's choice, made so that
// the OR merge at the receiver works.
//
// Timing: purely combinational.
module cell_demux #(
  parameter int N      = 4,
  parameter int CELL_W = 424,
  parameter int DEST_W = 4,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                        valid,
  input  logic [SW-1:0]               sel,
  input  logic [DEST_W-1:0]           dest,
  input  logic [CELL_W-1:0]           data,
  output logic [N-1:0]                out_valid,
  output logic [N-1:0][DEST_W-1:0]    out_dest,
  output logic [N-1:0][CELL_W-1:0]    out_cell
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (valid && sel == SW'(i)) begin
        out_valid[i] = 1'b1;
        out_dest[i]  = dest;
        out_cell[i]  = data;
      end else begin
        out_valid[i] = 1'b0;
        out_dest[i]  = '0;
        out_cell[i]  = '0;
      end
    end
  end

endmodule
