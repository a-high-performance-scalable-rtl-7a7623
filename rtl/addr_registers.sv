// addr_registers: the read- and write-address registers (RAR0..RAR(Q-1),
// WAR0..WAR(Q-1)) of a unit switch, with their decoders.
//
// Each pair RARq/WARq keeps one output queue of the shared buffer as a linked
// list: RARq points at the head cell, WARq at the empty location that ends
// the list, so the queue is empty exactly when RARq == WARq. The write
// decoder selects WAR[wr_q]: on a write, that register takes the fresh empty
// address popped from the EA-FIFO. The read decoder selects RAR[rd_q]: on a
// read, that register takes the next-address field of the cell leaving the
// buffer. After reset queue q owns location q as its empty tail. The
// register pairs, the empty test and the update rules follow the design; the
// reset assignment of locations is this implementation's choice.
//
// Timing: `war_sel`, `rar_sel` and `nonempty` are combinational from the
// registers; the registers change on the rising clock edge.
module addr_registers #(
  parameter int Q    = 4,    // number of queues (ports of the unit switch)
  parameter int LOCS = 64,   // buffer locations
  localparam int QW = (Q > 1) ? $clog2(Q) : 1,
  localparam int AW = (LOCS > 1) ? $clog2(LOCS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side (WAR decoder)
  input  logic          wr_en,
  input  logic [QW-1:0] wr_q,
  input  logic [AW-1:0] new_tail,
  output logic [AW-1:0] war_sel,
  // read side (RAR decoder)
  input  logic          rd_en,
  input  logic [QW-1:0] rd_q,
  input  logic [AW-1:0] new_head,
  output logic [AW-1:0] rar_sel,
  // status
  output logic [Q-1:0]  nonempty
);

  logic [AW-1:0] war [Q];
  logic [AW-1:0] rar [Q];

  assign war_sel = war[wr_q];
  assign rar_sel = rar[rd_q];

  always_comb begin
    for (int q = 0; q < Q; q++) nonempty[q] = (rar[q] != war[q]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q < Q; q++) begin
        war[q] <= AW'(q);
        rar[q] <= AW'(q);
      end
    end else begin
      if (wr_en) war[wr_q] <= new_tail;
      if (rd_en) rar[rd_q] <= new_head;
    end
  end

  // A queue is only read when it holds a cell.
  a_read_nonempty: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> nonempty[rd_q]);

endmodule
