// cycle_counter: the DEC-CNT / DMX-CNT counter of a unit switch.
//
// A time slot (one cell time on a line) is divided into N cycles t0..t(N-1).
// The counter steps once per clock (one clock = one cycle) and wraps modulo N,
// counting up or down as the `down` pin says. A `load` pulse copies `init`
// into it; loading every switch of the fabric in the same clock is what
// synchronises the whole three-stage switch. Up/down counting, the external
// load and the modulo-N wrap follow the design; reset to 0 is this
// implementation's choice (the switch is expected to be loaded before use).
//
// Timing: `value` is a register; it changes on the rising clock edge.
module cycle_counter #(
  parameter int N = 4,
  localparam int W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] init,
  input  logic         down,
  output logic [W-1:0] value
);

  localparam logic [W-1:0] LAST = W'(N - 1);

  always_ff @(posedge clk) begin
    if (!rst_n)        value <= '0;
    else if (load)     value <= init;
    else if (down)     value <= (value == '0)  ? LAST : value - 1'b1;
    else               value <= (value == LAST) ? '0  : value + 1'b1;
  end

endmodule
