// atm_pkg: constants, types and helper functions shared by the three-stage
// shared-buffer ATM switch.
//
// A cell is handled as one CELL_BITS-wide word (53 octets = 424 bits) on every
// link and in every buffer location, so a buffer access moves a whole cell.
// The routing tag that travels beside the cell is the destination port number
// of the whole N x N switch: its upper half selects the output switch and its
// lower half the port of that output switch.
//
// The counter start values below are the initial DEC-CNT and
// DMX-CNT values of the design for every stage: input switch i starts DEC-CNT at 0 and
// DMX-CNT at (n - i) mod n and counts up; centre switch i starts both at
// (n - 1 + i) mod n and counts down; output switches start both at 0 and count
// up. Which stage decodes which half of the routing tag also follows the
// design; the one-word cell format and the tag carried beside the cell are
// this implementation's own choices.
package atm_pkg;

  localparam int CELL_BITS = 424;  // 53-octet ATM cell: 5-octet header + 48-octet payload

  typedef enum logic [1:0] {
    STAGE_INPUT  = 2'd0,
    STAGE_CENTER = 2'd1,
    STAGE_OUTPUT = 2'd2
  } stage_e;

  // Integer square root, used to derive the unit-switch size n = sqrt(N).
  function automatic int isqrt(input int v);
    int r;
    r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // Width of a select or address field for k choices (at least one bit).
  function automatic int sel_width(input int k);
    return (k > 1) ? $clog2(k) : 1;
  endfunction

  // Initial value of DEC-CNT (the read-queue decoder counter).
  function automatic int dec_cnt_init(input stage_e st, input int idx, input int n);
    case (st)
      STAGE_CENTER: return (n - 1 + idx) % n;
      default:      return 0;
    endcase
  endfunction

  // Initial value of DMX-CNT (the output demultiplexer counter).
  function automatic int dmx_cnt_init(input stage_e st, input int idx, input int n);
    case (st)
      STAGE_INPUT:  return (n - idx) % n;
      STAGE_CENTER: return (n - 1 + idx) % n;
      default:      return 0;
    endcase
  endfunction

  // Centre-stage counters count down, the other stages count up.
  function automatic logic cnt_down(input stage_e st);
    return st == STAGE_CENTER;
  endfunction

endpackage
