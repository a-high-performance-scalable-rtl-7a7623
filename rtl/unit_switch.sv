// unit_switch: the N x N shared-buffer switch used in all three stages of the
// fabric (time-division building block).
//
// How it works, once per clock (one clock = one cycle t of a time slot):
//  * Input: only one input link carries a cell in any cycle, so the links are
//    merged with an OR instead of a multiplexer. The routing tag of the cell
//    picks a queue: the upper half of the tag (the output switch) when
//    `use_lh` is low (input and centre stages), the lower half (the port of
//    the output switch) when it is high (output stage). The cell is written
//    at the empty tail location named by that queue's WAR, together with a
//    fresh free address popped from the EA-FIFO, which also becomes the new
//    WAR. If the EA-FIFO is empty the buffer is full and the cell is lost
//    (`cell_dropped`); this can only happen at the input stage, because the
//    `buf_full` output stops the previous stage from sending.
//  * Output: DEC-CNT names the queue served in this cycle and DMX-CNT the
//    output link. If the queue holds a cell and the buffer-full line of the
//    receiver on that link is low, the head cell (at RAR) is read and driven
//    on the link, the RAR takes the cell's next-address field, and the freed
//    location returns to the EA-FIFO. A cell held back by a full receiver is
//    counted on `cell_blocked`.
//  * Both counters step every clock, up or down by `count_down`, and are set
//    to `dec_init` / `dmx_init` by `load`; which values each stage loads is
//    given in atm_pkg.
// All of this follows the design. This implementation's own choices: a cell
// is one CELL_W-bit word (no serial/parallel conversion inside the switch),
// the routing tag travels beside the cell instead of being produced by a
// header translator, and `buf_full` is the registered EA-FIFO empty flag, so
// a location freed in the current cycle is reusable from the next one.
//
// Timing: a cell written in cycle t can leave from cycle t+1 on. Outputs are
// combinational from the registers and `next_full`, so a cell leaving this
// switch is written into the next switch in the same clock.
module unit_switch #(
  parameter int N      = 4,    // ports of the unit switch (n)
  parameter int DEST_W = 4,    // routing tag bits, log2 of the fabric size N*N
  parameter int LOCS   = 64,   // shared buffer locations
  parameter int CELL_W = 424,  // bits per cell
  localparam int SW = (N > 1) ? $clog2(N) : 1,
  localparam int AW = (LOCS > 1) ? $clog2(LOCS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // counter control
  input  logic                     load,
  input  logic [SW-1:0]            dec_init,
  input  logic [SW-1:0]            dmx_init,
  input  logic                     count_down,
  input  logic                     use_lh,
  // input links
  input  logic [N-1:0]             in_valid,
  input  logic [N-1:0][DEST_W-1:0] in_dest,
  input  logic [N-1:0][CELL_W-1:0] in_cell,
  output logic                     buf_full,
  // output links
  output logic [N-1:0]             out_valid,
  output logic [N-1:0][DEST_W-1:0] out_dest,
  output logic [N-1:0][CELL_W-1:0] out_cell,
  input  logic [N-1:0]             next_full,
  // observation
  output logic                     cell_dropped,
  output logic                     cell_blocked,
  output logic [AW:0]              occupancy
);

  localparam int HALF = DEST_W / 2;

  // ---- input OR merge -------------------------------------------------------
  logic              m_valid;
  logic [DEST_W-1:0] m_dest;
  logic [CELL_W-1:0] m_cell;

  always_comb begin
    m_valid = 1'b0;
    m_dest  = '0;
    m_cell  = '0;
    for (int i = 0; i < N; i++) begin
      m_valid = m_valid | in_valid[i];
      m_dest  = m_dest  | in_dest[i];
      m_cell  = m_cell  | in_cell[i];
    end
  end

  // ---- counters -------------------------------------------------------------
  logic [SW-1:0] dec_cnt, dmx_cnt;

  cycle_counter #(.N(N)) u_dec_cnt (
    .clk, .rst_n, .load, .init(dec_init), .down(count_down), .value(dec_cnt)
  );
  cycle_counter #(.N(N)) u_dmx_cnt (
    .clk, .rst_n, .load, .init(dmx_init), .down(count_down), .value(dmx_cnt)
  );

  // ---- write side: UH/LH multiplexer, WAR decoder, EA-FIFO -----------------
  logic [SW-1:0] wr_q;
  logic [AW-1:0] fifo_head, war_sel;
  logic          fifo_empty, wr_en;
  logic [AW:0]   fifo_count;

  assign wr_q  = use_lh ? SW'(m_dest[HALF-1:0]) : SW'(m_dest[DEST_W-1:HALF]);
  assign wr_en = m_valid && !fifo_empty;

  // ---- read side: RAR decoder, flow control ---------------------------------
  logic [AW-1:0] rar_sel, rd_next;
  logic [N-1:0]  nonempty;
  logic          send, enable;
  logic [CELL_W-1:0] rd_cell;
  logic [DEST_W-1:0] rd_dest;

  addr_registers #(.Q(N), .LOCS(LOCS)) u_regs (
    .clk, .rst_n,
    .wr_en, .wr_q, .new_tail(fifo_head), .war_sel,
    .rd_en(send), .rd_q(dec_cnt), .new_head(rd_next), .rar_sel,
    .nonempty
  );

  ea_fifo #(.DEPTH(LOCS), .FIRST(N)) u_ea_fifo (
    .clk, .rst_n,
    .push(send), .push_addr(rar_sel),
    .pop(wr_en), .head(fifo_head),
    .empty(fifo_empty), .count(fifo_count)
  );

  shared_buffer #(.LOCS(LOCS), .CELL_W(CELL_W), .DEST_W(DEST_W)) u_buf (
    .clk,
    .we(wr_en), .waddr(war_sel), .wcell(m_cell), .wdest(m_dest), .wnext(fifo_head),
    .raddr(rar_sel), .rcell(rd_cell), .rdest(rd_dest), .rnext(rd_next)
  );

  flow_enable #(.N(N)) u_flow (
    .next_full, .sel(dmx_cnt), .have_cell(nonempty[dec_cnt]),
    .enable, .send, .blocked(cell_blocked)
  );

  cell_demux #(.N(N), .CELL_W(CELL_W), .DEST_W(DEST_W)) u_demux (
    .valid(send), .sel(dmx_cnt), .dest(rd_dest), .data(rd_cell),
    .out_valid, .out_dest, .out_cell
  );

  assign buf_full     = fifo_empty;
  assign cell_dropped = m_valid && fifo_empty;
  // Cells held = locations in use minus the N empty tail locations.
  assign occupancy    = (AW+1)'(LOCS - N) - fifo_count;

  // Only one input link may be active in a cycle (the OR merge relies on it).
  a_one_input: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_valid));

endmodule
