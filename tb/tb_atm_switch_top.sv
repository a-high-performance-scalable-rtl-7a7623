// tb_atm_switch_top: end-to-end test of the three-stage switch at its default
// size (16 x 16, four 4 x 4 unit switches per stage).
//
// Cells are sent on the input lines as n words per slot and reassembled
// from the words on the output lines.
// Phases:
//  1. Latency: one cell at a time, for every input/output line pair, on an
//     idle switch. The exit cycle is compared with a model of the routing
//     rule written independently of the RTL: the input switch serves the
//     queue for output switch x in cycles t = x (mod n) and sends it to
//     centre switch (t - a) mod n; centre switch c serves output switch
//     (c - 1 - t) mod n; output switch serves port k in cycles t = k.
//  2. Transpose permutation (line a*n+i -> line i*n+a) at full load: every
//     unit switch is exactly loaded, so after a start-up every slot must
//     deliver n*n cells and nothing may be lost (100 % throughput).
//  3. Uniform random traffic at arrival rate 0.9 per line and slot.
//  4. Hot spot: every line sends to line 0, which fills the output switch,
//     then the centre switches, then the input switches: exercises the
//     buffer-full lines, blocked transfers and cell loss at the input stage.
//  5. Drain: after traffic stops every accepted cell must come out.
// Throughout, a scoreboard checks that each cell leaves on its destination
// line with its tag and contents intact, in order per source/destination
// pair, and that no cell appears that was not sent or was dropped.
module tb_atm_switch_top;
  import atm_pkg::*;

  localparam int NP = 16;
  localparam int n  = 4;
  localparam int DW = 4;
  localparam int CW = CELL_BITS;
  localparam int LW = (CW + n - 1) / n;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [NP-1:0]         in_start, out_start, cell_out_valid;
  logic [NP-1:0][LW-1:0] in_data, out_data;
  logic [NP-1:0][DW-1:0] in_dest, out_dest;
  logic                  slot_start;
  logic [n-1:0] in_sw_drop, in_sw_blocked, in_sw_full, ctr_sw_blocked, ctr_sw_full, out_sw_full;
  logic [n-1:0][6:0] in_sw_occ, ctr_sw_occ, out_sw_occ;

  atm_switch_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;                         // cycles since the counters were loaded
  int exp_q [NP][NP][$];               // sequence numbers in flight per (src,dst)
  int seq   [NP][NP];
  // per line: cell being serialised this slot (tx) and cell offered to the
  // input switch this slot (sw); nx collects the offers for the next slot
  bit nx_on [NP], tx_on [NP], sw_on [NP];
  int nx_dst [NP], tx_dst [NP], sw_dst [NP], nx_seq [NP], tx_seq [NP];
  // per output line: words of the cell being reassembled
  logic [n*LW-1:0] rx_buf [NP];
  int rx_cnt [NP], rx_dest [NP];
  int offered = 0, delivered = 0, dropped = 0;
  int last_exit [NP];                  // cycle of the last delivery per output line
  int n_drop = 0, n_in_blocked = 0, n_ctr_blocked = 0, n_ctr_full = 0, n_out_full = 0, n_in_full = 0;

  function automatic logic [CW-1:0] make_cell(int src, int dst, int s);
    logic [CW-1:0] c;
    logic [31:0] h;
    h = 32'(s) * 32'h9E3779B1 ^ 32'(src * 131 + dst * 7);
    for (int w = 0; w < CW / 32 + 1; w++) begin
      for (int b = 0; b < 32; b++)
        if (w * 32 + b < CW) c[w*32+b] = h[b];
      h = {h[30:0], h[31] ^ h[21] ^ h[1] ^ h[0]};
    end
    c[15:0]  = 16'(s);
    c[23:16] = 8'(src);
    c[31:24] = 8'(dst);
    return c;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // Present one cell on a line for the coming slot.
  task automatic offer(int src, int dst);
    nx_on[src]  = 1'b1;
    nx_dst[src] = dst;
    nx_seq[src] = seq[src][dst];
    seq[src][dst]++;
    offered++;
  endtask

  // Monitor: runs every cycle at the falling edge (outputs are settled).
  always @(negedge clk) if (rst_n && !load) begin
    for (int j = 0; j < NP; j++) begin
      if (out_start[j]) begin
        if (rx_cnt[j] != 0) fail($sformatf("line %0d: new cell before the last one ended", j));
        if ((cyc % n) != ((j % n) + 1) % n) fail($sformatf("line %0d started in cycle t%0d", j, cyc % n));
        rx_cnt[j] = 0;
        rx_dest[j] = int'(out_dest[j]);
        last_exit[j] = cyc;
        rx_buf[j][0 +: LW] = out_data[j];
        rx_cnt[j] = 1;
      end else if (rx_cnt[j] > 0) begin
        rx_buf[j][rx_cnt[j]*LW +: LW] = out_data[j];
        rx_cnt[j]++;
      end else if (out_data[j] != '0 || out_dest[j] != '0) fail("idle output line not zero");
      if (rx_cnt[j] == n) begin
        int src, dst, sq;
        logic [CW-1:0] c;
        c   = rx_buf[j][CW-1:0];
        src = int'(c[23:16]);
        dst = int'(c[31:24]);
        sq  = int'(c[15:0]);
        rx_cnt[j] = 0;
        checks++;
        if (dst != j || rx_dest[j] != j) fail($sformatf("cell for %0d left on line %0d", dst, j));
        else if (exp_q[src][dst].size() == 0) fail($sformatf("unexpected cell %0d->%0d seq %0d", src, dst, sq));
        else begin
          int e;
          e = exp_q[src][dst].pop_front();
          if (e != sq) fail($sformatf("order %0d->%0d: got seq %0d expected %0d", src, dst, sq, e));
          else if (c != make_cell(src, dst, sq)) fail("cell contents corrupted");
        end
        delivered++;
      end
    end
    for (int a = 0; a < n; a++) if (in_sw_drop[a]) begin
      int src;
      src = a * n + (cyc % n);
      if (!sw_on[src]) fail("drop reported with no cell on the line");
      else begin
        void'(exp_q[src][sw_dst[src]].pop_back());
        dropped++;
      end
    end
    n_drop        += $countones(in_sw_drop);
    n_in_blocked  += $countones(in_sw_blocked);
    n_ctr_blocked += $countones(ctr_sw_blocked);
    n_ctr_full    += $countones(ctr_sw_full);
    n_out_full    += $countones(out_sw_full);
    n_in_full     += $countones(in_sw_full);
  end

  always @(posedge clk) cyc <= load ? 0 : cyc + 1;

  // Send one slot: last slot's cells move on to the input switches (and
  // into the scoreboard), this slot's cells go out as n words each.
  task automatic next_slot();
    for (int src = 0; src < NP; src++) begin
      sw_on[src] = tx_on[src];
      sw_dst[src] = tx_dst[src];
      if (tx_on[src]) exp_q[src][tx_dst[src]].push_back(tx_seq[src]);
      tx_on[src] = nx_on[src];
      tx_dst[src] = nx_dst[src];
      tx_seq[src] = nx_seq[src];
      nx_on[src] = 1'b0;
    end
    for (int w = 0; w < n; w++) begin
      if (cyc % n != w) fail("line words out of step with the slot");
      if ((w == 0) != slot_start) fail("slot_start not aligned with cycle t0");
      for (int src = 0; src < NP; src++) begin
        logic [n*LW-1:0] full;
        full = (n*LW)'(make_cell(src, tx_dst[src], tx_seq[src]));
        in_start[src] = tx_on[src] && (w == 0);
        in_dest[src]  = (tx_on[src] && w == 0) ? DW'(tx_dst[src]) : '0;
        in_data[src]  = tx_on[src] ? full[w*LW +: LW] : '0;
      end
      @(posedge clk);
      #1;
    end
    in_start = '0; in_data = '0; in_dest = '0;
  endtask

  // Independent model of the exit cycle for a cell offered in slot s0.
  function automatic int model_exit(int src, int dst, int s0);
    int a, i, x, k, t, c;
    a = src / n; i = src % n; x = dst / n; k = dst % n;
    t = s0 + n + i;                               // written into input switch
    t++; while (t % n != x) t++;                  // input switch serves queue x
    c = ((t - a) % n + n) % n;                    // centre switch on that link
    t++; while ((((c - 1 - t) % n) + n) % n != x) t++;
    t++; while (t % n != k) t++;                  // output switch serves port k
    return t + 1;                                 // first word on the line
  endfunction

  task automatic idle_slots(int k);
    repeat (k) next_slot();
  endtask

  int s0, lat_min, lat_max, thr_slots_full;
  int unsigned r;

  initial begin
    in_start = '0; in_data = '0; in_dest = '0;
    foreach (seq[i, j]) seq[i][j] = 0;
    foreach (last_exit[i]) last_exit[i] = -1;
    foreach (tx_on[i]) begin
      nx_on[i] = 0; tx_on[i] = 0; sw_on[i] = 0; nx_dst[i] = 0; tx_dst[i] = 0; nx_seq[i] = 0; tx_seq[i] = 0; rx_cnt[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    // cyc == 0 is now cycle t0 of slot 0
    #0;
    if (!slot_start) fail("no slot_start after load");

    // ---- 1. latency of single cells -----------------------------------------
    lat_min = 1 << 30; lat_max = 0;
    for (int src = 0; src < NP; src++) begin
      for (int dst = 0; dst < NP; dst++) begin
        int e;
        s0 = cyc;
        offer(src, dst);
        e = model_exit(src, dst, s0);
        last_exit[dst] = -1;
        idle_slots(6);
        checks++;
        if (last_exit[dst] != e)
          fail($sformatf("latency %0d->%0d: left in cycle %0d, model %0d", src, dst, last_exit[dst], e));
        if (e - s0 < lat_min) lat_min = e - s0;
        if (e - s0 > lat_max) lat_max = e - s0;
      end
    end
    $display("latency phase: %0d..%0d cycles from slot start to exit", lat_min, lat_max);

    // Worked example: a cell from line (0,0) to line 12 = (3,0), offered in
    // slot 0, enters input switch 0 in cycle 4 (t0), goes to centre switch 3
    // in cycle 7 (t3), to output switch 3 in cycle 11 (t3: centre 3 links to
    // output 3 in t3), leaves port 0 in cycle 12 and starts on the line in 13.
    checks++;
    if (model_exit(0, 12, 0) != 13) fail("model disagrees with worked example");

    // ---- 2. transpose permutation at full load -------------------------------
    thr_slots_full = 0;
    for (int sl = 0; sl < 200; sl++) begin
      int got;
      got = delivered;
      for (int src = 0; src < NP; src++) offer(src, (src % n) * n + src / n);
      next_slot();
      if (sl >= 20 && delivered - got == NP) thr_slots_full++;
    end
    checks++;
    if (thr_slots_full != 180) fail($sformatf("transpose: only %0d of 180 slots at full throughput", thr_slots_full));
    checks++;
    if (dropped != 0) fail("transpose traffic lost cells");
    $display("transpose: %0d of 180 steady slots delivered %0d cells", thr_slots_full, NP);
    idle_slots(40);

    // ---- 3. uniform random traffic, p = 0.9 ----------------------------------
    begin
      int off0, del0, drop0;
      off0 = offered; del0 = delivered; drop0 = dropped;
      for (int sl = 0; sl < 3000; sl++) begin
        for (int src = 0; src < NP; src++) begin
          r = $urandom;
          if (r % 1000 < 900) offer(src, int'($urandom % NP));
        end
        next_slot();
      end
      $display("uniform p=0.9: offered %0d delivered %0d dropped %0d", offered - off0, delivered - del0, dropped - drop0);
      checks++;
      if ((dropped - drop0) * 100 > (offered - off0)) fail("uniform p=0.9 lost more than 1% of cells");
      checks++;
      if ((delivered - del0) * 100 < (offered - off0) * 97) fail("uniform p=0.9 throughput below 97% of offered load");
    end
    idle_slots(60);

    // ---- 4. hot spot: every line to line 0 ------------------------------------
    for (int sl = 0; sl < 400; sl++) begin
      for (int src = 0; src < NP; src++) offer(src, 0);
      next_slot();
    end

    // ---- 5. drain ---------------------------------------------------------------
    idle_slots(1200);
    checks++;
    if (offered != delivered + dropped)
      fail($sformatf("conservation: offered %0d delivered %0d dropped %0d", offered, delivered, dropped));
    checks++;
    if (in_sw_occ != '0 || ctr_sw_occ != '0 || out_sw_occ != '0) fail("buffers not empty after drain");

    $display("mechanisms: input drops %0d, input blocked %0d, centre blocked %0d, input full %0d, centre full %0d, output full %0d",
             n_drop, n_in_blocked, n_ctr_blocked, n_in_full, n_ctr_full, n_out_full);
    checks++; if (n_drop == 0)        fail("input-stage cell loss never happened");
    checks++; if (n_in_blocked == 0)  fail("input switch never blocked by a full centre switch");
    checks++; if (n_ctr_blocked == 0) fail("centre switch never blocked by a full output switch");
    checks++; if (n_ctr_full == 0)    fail("centre buffer-full never raised");
    checks++; if (n_out_full == 0)    fail("output buffer-full never raised");
    checks++; if (n_in_full == 0)     fail("input buffer never full");

    $display("offered %0d delivered %0d dropped %0d", offered, delivered, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
