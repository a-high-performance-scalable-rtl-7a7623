// atm_switch_top: N x N ATM switch built from 3*n identical n x n
// shared-buffer unit switches (n = sqrt(N)) in a three-stage Clos topology.
//
// Space division: input switch a, link b goes to centre switch b, input a;
// centre switch c, link d goes to output switch d, input c. There is exactly
// one path per source/destination pair (no rearrangement, no central
// controller), so cells of a connection stay in order.
// Time division: a time slot (one cell time on a line) is n clock cycles.
// All unit switches and port selectors are loaded in the same clock by `load`
// and then step together; in cycle t every switch accepts a cell on its input
// labelled t and sends one on its output labelled t:
//  * input switch a sends the head cell for output switch t to centre switch
//    (t - a) mod n,
//  * centre switch c sends the head cell for output switch (c - 1 - t) mod n,
//    the one it is linked to in that cycle (reverse order of its inputs),
//  * output switch d sends the head cell for its port t on line d*n + t.
// A switch sends only while the buffer-full line of its receiver is low, so
// cells are lost only at the input stage. The routing tag of a cell is its
// destination line number: upper half = output switch, lower half = port.
// Topology, counter start values, routing rule and flow control follow the
// design; the one-word cell and the routing tag beside the cell are this
// implementation's choices.
//
// Line side: every input line feeds an S/P converter and every output line is
// driven by a P/S converter. A line carries one cell per time slot as n
// words of LINE_W bits (word w in cycle w of the slot, `in_start` with word 0
// and the routing tag on `in_dest`). Inside the switch a cell moves as one
// CELL_W-bit word per cycle. Placing the converters once per line at the
// edge of the switch, instead of in every unit switch, is this
// implementation's choice. `cell_out_valid` shows, per output line, the
// cycle in which its cell leaves the output switch.
//
// Interface and timing: line j = a*n + i (input switch a, port i);
// `slot_start` marks cycle t0. A cell received in slot k is offered to its
// input switch in cycle i of slot k+1. A cell leaving output switch d on
// port k in cycle t is sent on output line d*n + k in cycles t+1 .. t+n,
// with `out_start` and `out_dest` beside the first word. `load` must be
// pulsed once after reset, before traffic; it also aligns the line
// converters to the slot.
module atm_switch_top
  import atm_pkg::*;
#(
  parameter int NPORTS         = 16,   // N, must be a perfect square
  parameter int CELLS_PER_PORT = 16,   // shared buffer locations per port
  parameter int CELL_W         = CELL_BITS,
  localparam int NU   = isqrt(NPORTS),             // n, unit-switch size
  localparam int DW   = sel_width(NPORTS),         // routing tag width
  localparam int SW   = sel_width(NU),
  localparam int LOCS = NU * CELLS_PER_PORT,
  localparam int AW   = sel_width(LOCS),
  localparam int LINE_W = (CELL_W + NU - 1) / NU   // bits per line word
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          load,
  // input lines
  input  logic [NPORTS-1:0]             in_start,
  input  logic [NPORTS-1:0][LINE_W-1:0] in_data,
  input  logic [NPORTS-1:0][DW-1:0]     in_dest,
  output logic                          slot_start,
  // output lines
  output logic [NPORTS-1:0]             out_start,
  output logic [NPORTS-1:0][LINE_W-1:0] out_data,
  output logic [NPORTS-1:0][DW-1:0]     out_dest,
  // cells as they leave the output switches (one cycle each)
  output logic [NPORTS-1:0]             cell_out_valid,
  // observation, one bit or count per unit switch of each stage
  output logic [NU-1:0]                 in_sw_drop,
  output logic [NU-1:0]                 in_sw_blocked,
  output logic [NU-1:0]                 in_sw_full,
  output logic [NU-1:0]                 ctr_sw_blocked,
  output logic [NU-1:0]                 ctr_sw_full,
  output logic [NU-1:0]                 out_sw_full,
  output logic [NU-1:0][AW:0]           in_sw_occ,
  output logic [NU-1:0][AW:0]           ctr_sw_occ,
  output logic [NU-1:0][AW:0]           out_sw_occ
);

  // Links, indexed [switch][port] on each side of a stage.
  logic [NU-1:0][NU-1:0]             sel_v,  s1_v,  s2_v,  s3_v;
  logic [NU-1:0][NU-1:0][DW-1:0]     sel_d,  s1_d,  s2_d,  s3_d;
  logic [NU-1:0][NU-1:0][CELL_W-1:0] sel_c,  s1_c,  s2_c,  s3_c;
  // Inputs of centre and output switches after the Clos wiring.
  logic [NU-1:0][NU-1:0]             c_in_v, o_in_v;
  logic [NU-1:0][NU-1:0][DW-1:0]     c_in_d, o_in_d;
  logic [NU-1:0][NU-1:0][CELL_W-1:0] c_in_c, o_in_c;
  logic [NU-1:0]                     in_full, ctr_full, out_full;
  logic [NU-1:0]                     ctr_drop, out_drop;
  // Port selectors 1..n-1 run in step with selector 0; the output stage never
  // sees a full receiver, so its blocked flags stay low; the P/S busy flags
  // are only used by its own assertion.
  logic [NU-1:0]                     slot_starts, out_blocked;

  for (genvar a = 0; a < NU; a++) begin : g_wire
    for (genvar b = 0; b < NU; b++) begin : g_link
      assign c_in_v[b][a] = s1_v[a][b];
      assign c_in_d[b][a] = s1_d[a][b];
      assign c_in_c[b][a] = s1_c[a][b];
      assign o_in_v[b][a] = s2_v[a][b];
      assign o_in_d[b][a] = s2_d[a][b];
      assign o_in_c[b][a] = s2_c[a][b];
    end
  end

  // Cells after the S/P converters, per line.
  logic [NPORTS-1:0]             sp_valid;
  logic [NPORTS-1:0][DW-1:0]     sp_dest;
  logic [NPORTS-1:0][CELL_W-1:0] sp_cell;
  logic [NPORTS-1:0]             ps_busy;

  for (genvar j = 0; j < NPORTS; j++) begin : g_line
    sp_converter #(.N(NU), .CELL_W(CELL_W), .DEST_W(DW), .LINE_W(LINE_W)) u_sp (
      .clk, .rst_n, .load,
      .line_start(in_start[j]), .line_data(in_data[j]), .line_dest(in_dest[j]),
      .cell_valid(sp_valid[j]), .cell_dest(sp_dest[j]), .cell_data(sp_cell[j])
    );
    ps_converter #(.N(NU), .CELL_W(CELL_W), .DEST_W(DW), .LINE_W(LINE_W)) u_ps (
      .clk, .rst_n,
      .cell_valid(s3_v[j / NU][j % NU]), .cell_dest(s3_d[j / NU][j % NU]), .cell_data(s3_c[j / NU][j % NU]),
      .line_start(out_start[j]), .line_busy(ps_busy[j]), .line_data(out_data[j]), .line_dest(out_dest[j])
    );
  end

  for (genvar s = 0; s < NU; s++) begin : g_sw
    // ---- port selector + input switch --------------------------------------
    port_selector #(.N(NU), .CELL_W(CELL_W), .DEST_W(DW)) u_psel (
      .clk, .rst_n, .load,
      .line_valid(sp_valid[s*NU +: NU]),
      .line_dest (sp_dest [s*NU +: NU]),
      .line_cell (sp_cell [s*NU +: NU]),
      .sw_valid(sel_v[s]), .sw_dest(sel_d[s]), .sw_cell(sel_c[s]),
      .slot_start(slot_starts[s])
    );

    unit_switch #(.N(NU), .DEST_W(DW), .LOCS(LOCS), .CELL_W(CELL_W)) u_in (
      .clk, .rst_n, .load,
      .dec_init(SW'(dec_cnt_init(STAGE_INPUT, s, NU))),
      .dmx_init(SW'(dmx_cnt_init(STAGE_INPUT, s, NU))),
      .count_down(cnt_down(STAGE_INPUT)), .use_lh(1'b0),
      .in_valid(sel_v[s]), .in_dest(sel_d[s]), .in_cell(sel_c[s]),
      .buf_full(in_full[s]),
      .out_valid(s1_v[s]), .out_dest(s1_d[s]), .out_cell(s1_c[s]),
      .next_full(ctr_full),
      .cell_dropped(in_sw_drop[s]), .cell_blocked(in_sw_blocked[s]),
      .occupancy(in_sw_occ[s])
    );

    // ---- centre switch -----------------------------------------------------
    unit_switch #(.N(NU), .DEST_W(DW), .LOCS(LOCS), .CELL_W(CELL_W)) u_ctr (
      .clk, .rst_n, .load,
      .dec_init(SW'(dec_cnt_init(STAGE_CENTER, s, NU))),
      .dmx_init(SW'(dmx_cnt_init(STAGE_CENTER, s, NU))),
      .count_down(cnt_down(STAGE_CENTER)), .use_lh(1'b0),
      .in_valid(c_in_v[s]), .in_dest(c_in_d[s]), .in_cell(c_in_c[s]),
      .buf_full(ctr_full[s]),
      .out_valid(s2_v[s]), .out_dest(s2_d[s]), .out_cell(s2_c[s]),
      .next_full(out_full),
      .cell_dropped(ctr_drop[s]), .cell_blocked(ctr_sw_blocked[s]),
      .occupancy(ctr_sw_occ[s])
    );

    // ---- output switch -----------------------------------------------------
    unit_switch #(.N(NU), .DEST_W(DW), .LOCS(LOCS), .CELL_W(CELL_W)) u_out (
      .clk, .rst_n, .load,
      .dec_init(SW'(dec_cnt_init(STAGE_OUTPUT, s, NU))),
      .dmx_init(SW'(dmx_cnt_init(STAGE_OUTPUT, s, NU))),
      .count_down(cnt_down(STAGE_OUTPUT)), .use_lh(1'b1),
      .in_valid(o_in_v[s]), .in_dest(o_in_d[s]), .in_cell(o_in_c[s]),
      .buf_full(out_full[s]),
      .out_valid(s3_v[s]), .out_dest(s3_d[s]), .out_cell(s3_c[s]),
      .next_full('0),
      .cell_dropped(out_drop[s]), .cell_blocked(out_blocked[s]),
      .occupancy(out_sw_occ[s])
    );

    assign cell_out_valid[s*NU +: NU] = s3_v[s];
  end

  assign slot_start     = slot_starts[0];
  assign ctr_sw_full    = ctr_full;
  assign out_sw_full    = out_full;
  assign in_sw_full     = in_full;   // not fed back: the input stage has no previous stage

  // Flow control keeps the centre and output buffers from overflowing.
  a_no_ctr_drop: assert property (@(posedge clk) disable iff (!rst_n) ctr_drop == '0);
  a_no_out_drop: assert property (@(posedge clk) disable iff (!rst_n) out_drop == '0);

endmodule
