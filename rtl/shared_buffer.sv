// shared_buffer: the shared cell memory of a unit switch, with its
// next-address fields.
//
// Each of the LOCS locations holds one whole cell, its routing tag and the
// address of the next cell of the same queue, so the memory is a set of
// linked lists (one per output queue). One location is written and one read
// in every cycle: the write stores the arriving cell at the empty tail of its
// queue together with the address of the new empty tail; the read returns the
// head cell of the queue being served and its next address. The memory layout
// (cell plus next-address field) follows the design; a single combinational
// read port and a synchronous write port, i.e. a whole cell per access, are
// this implementation's choices. Nothing is reset: a location is only read
// after it has been written.
module shared_buffer #(
  parameter int LOCS   = 64,
  parameter int CELL_W = 424,
  parameter int DEST_W = 4,
  localparam int AW = (LOCS > 1) ? $clog2(LOCS) : 1
) (
  input  logic              clk,
  // write port
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [CELL_W-1:0] wcell,
  input  logic [DEST_W-1:0] wdest,
  input  logic [AW-1:0]     wnext,
  // read port (combinational)
  input  logic [AW-1:0]     raddr,
  output logic [CELL_W-1:0] rcell,
  output logic [DEST_W-1:0] rdest,
  output logic [AW-1:0]     rnext
);

  logic [CELL_W-1:0] cell_mem [LOCS];
  logic [DEST_W-1:0] dest_mem [LOCS];
  logic [AW-1:0]     next_mem [LOCS];

  always_ff @(posedge clk) begin
    if (we) begin
      cell_mem[waddr] <= wcell;
      dest_mem[waddr] <= wdest;
      next_mem[waddr] <= wnext;
    end
  end

  assign rcell = cell_mem[raddr];
  assign rdest = dest_mem[raddr];
  assign rnext = next_mem[raddr];

endmodule
