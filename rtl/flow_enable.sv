// flow_enable: inter-stage flow control of a unit switch.
//
// The buffer-full lines from the N switches of the next stage arrive one per
// output link. In each cycle the DMX-CNT value `sel` names the link in use;
// the cell at the head of the queue being served is sent only if that link's
// buffer-full line is low (`enable`). `send` is a cell actually leaving,
// `blocked` a cell held back by a full receiver. At the output stage the
// buffer-full inputs are tied low. Selecting the buffer-full line with the
// demultiplexer count and gating the transfer with it follows the design;
// the exact gates are this implementation's.
//
// Timing: purely combinational.
module flow_enable #(
  parameter int N = 4,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  next_full,
  input  logic [SW-1:0] sel,
  input  logic          have_cell,
  output logic          enable,
  output logic          send,
  output logic          blocked
);

  assign enable  = !next_full[sel];
  assign send    = have_cell && enable;
  assign blocked = have_cell && !enable;

endmodule
