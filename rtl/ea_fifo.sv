// ea_fifo: empty-address FIFO (EA-FIFO) of a shared-buffer unit switch.
//
// It holds the addresses of the free buffer locations. Every write of a cell
// pops one address (the new empty tail of the destination queue); every cell
// that leaves the buffer pushes the address it occupied. `empty` means the
// shared buffer is full and drives the buffer-full line to the previous stage.
//
// After reset the FIFO holds addresses FIRST..DEPTH-1 in order: addresses
// 0..FIRST-1 are the empty tail locations the write-address registers start
// with. The FIFO is a circular register array with a combinational head
// output (`head` is valid whenever `empty` is low). Pushing and popping in the
// same clock are both allowed; a pop while empty or a push while full is
// ignored and flagged by assertion. The circular-array form and the reset
// contents are this implementation's choices; the design only gives the
// FIFO's function.
module ea_fifo #(
  parameter int DEPTH = 64,   // buffer locations, also the FIFO capacity
  parameter int FIRST = 4,    // first address placed in the FIFO at reset
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  logic [AW-1:0] push_addr,
  input  logic        pop,
  output logic [AW-1:0] head,
  output logic        empty,
  output logic [AW:0] count
);

  logic [AW-1:0] slots [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (count != (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign head    = slots[rd_ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) slots[i] <= AW'((i + FIRST) % DEPTH);
      rd_ptr <= '0;
      wr_ptr <= AW'((DEPTH - FIRST) % DEPTH);
      count  <= (AW+1)'(DEPTH - FIRST);
    end else begin
      if (do_push) begin
        slots[wr_ptr] <= push_addr;
        wr_ptr        <= incr(wr_ptr);
      end
      if (do_pop) rd_ptr <= incr(rd_ptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_pop_empty:  assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);
  a_no_push_full:  assert property (@(posedge clk) disable iff (!rst_n) push |-> count != (AW+1)'(DEPTH));

endmodule
