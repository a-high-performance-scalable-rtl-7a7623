// atm_workload_bench: traffic generator and scoreboard around one
// atm_switch_top, shared by the workload testbenches.
//
// Every line is an on/off source. With BURST = 1 each line independently
// offers a cell in a slot with probability LOAD_PM/1000 to a uniformly drawn
// destination (uniform random traffic). With BURST > 1 a line sends bursts
// of consecutive cells to one destination; burst lengths are geometric with
// mean BURST and idle gaps geometric with mean BURST*(1000-LOAD_PM)/LOAD_PM
// slots, so the mean load is again LOAD_PM/1000. Cells go onto the input
// lines as n words per slot and are reassembled from the output lines.
// After SLOTS slots of traffic the switch is drained.
//
// With HIST set it also prints, for k cells per port, how often an input
// switch held at least k*n cells: with a buffer much larger than k this
// estimates the loss rate a k-cell-per-port buffer would have. The mean
// delay from first input word to first output word is reported too.
//
// Checked: each cell leaves on its destination line, intact and in order
// per source/destination pair; offered = delivered + lost after the drain;
// cells are lost only at the input stage (input-switch drop flags). Reported:
// throughput (cells delivered per line and slot of traffic), loss ratio and
// the mean number of cells held per port in each
// stage (below saturation the centre stage must hold far fewer than the
// input stage).
// `done` rises when the run is over; `checks`/`failures` are then final.
module atm_workload_bench #(
  parameter int NP       = 16,
  parameter int CPP      = 16,     // shared-buffer cells per port
  parameter int LOAD_PM  = 900,    // arrival rate per line and slot, per mille
  parameter int BURST    = 1,      // mean burst length in cells (1 = uniform random)
  parameter int SLOTS    = 2000,
  parameter int MAX_LOSS_PPM = 1000000,  // loss ratio above which a failure is counted
  parameter int MIN_THRU_PM  = 0,        // throughput below which a failure is counted, per mille
  parameter bit HIST     = 0       // report the input-buffer occupancy distribution
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import atm_pkg::*;

  localparam int n  = isqrt(NP);
  localparam int DW = sel_width(NP);
  localparam int AW = sel_width(n * CPP);
  localparam int CW = CELL_BITS;
  localparam int LW = (CW + n - 1) / n;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [NP-1:0]         in_start, out_start, cell_out_valid;
  logic [NP-1:0][LW-1:0] in_data, out_data;
  logic [NP-1:0][DW-1:0] in_dest, out_dest;
  logic                  slot_start;
  logic [n-1:0] in_sw_drop, in_sw_blocked, in_sw_full, ctr_sw_blocked, ctr_sw_full, out_sw_full;
  logic [n-1:0][AW:0] in_sw_occ, ctr_sw_occ, out_sw_occ;

  atm_switch_top #(.NPORTS(NP), .CELLS_PER_PORT(CPP)) dut (.*);

  always #5 clk = ~clk;

  int exp_q [NP][NP][$];
  longint exp_t [NP][NP][$];        // cycle in which each cell's first word was sent
  longint tcyc = 0;                 // cycles since load
  longint tx_t [NP];
  longint delay_sum = 0, delay_max = 0, hist [n * CPP + 1];
  int seq   [NP][NP];
  int burst_left [NP];
  int burst_dst  [NP];
  bit nx_on [NP], tx_on [NP], sw_on [NP];     // next slot, on the line, at the switch
  int nx_dst [NP], tx_dst [NP], sw_dst [NP], nx_seq [NP], tx_seq [NP];
  logic [n*LW-1:0] rx_buf [NP];
  int rx_cnt [NP], rx_dest [NP];
  longint offered = 0, delivered = 0, dropped = 0;
  longint occ_in = 0, occ_ctr = 0, occ_out = 0, samples = 0;
  bit running = 0;

  function automatic logic [CW-1:0] make_cell(int src, int dst, int s);
    logic [CW-1:0] c;
    for (int w = 0; w < CW; w += 32) c[w +: 32] = 32'(s * 40503 + w) ^ 32'(src << 16 | dst);
    c[15:0]  = 16'(s);
    c[23:16] = 8'(src);
    c[31:24] = 8'(dst);
    return c;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  always @(negedge clk) if (running) begin
    for (int j = 0; j < NP; j++) begin
      if (out_start[j]) begin
        if (rx_cnt[j] != 0) fail("new cell before the last one ended");
        rx_buf[j][0 +: LW] = out_data[j];
        rx_dest[j] = int'(out_dest[j]);
        rx_cnt[j] = 1;
      end else if (rx_cnt[j] > 0) begin
        rx_buf[j][rx_cnt[j]*LW +: LW] = out_data[j];
        rx_cnt[j]++;
      end
      if (rx_cnt[j] == n) begin
        int src, dst, sq;
        logic [CW-1:0] c;
        c = rx_buf[j][CW-1:0];
        src = int'(c[23:16]); dst = int'(c[31:24]); sq = int'(c[15:0]);
        rx_cnt[j] = 0;
        checks++;
        if (dst != j || rx_dest[j] != j) fail("cell on wrong line");
        else if (exp_q[src][dst].size() == 0) fail("unexpected cell");
        else if (exp_q[src][dst].pop_front() != sq) fail("cell out of order");
        else if (c != make_cell(src, dst, sq)) fail("cell corrupted");
        else begin
          longint d;
          // first input word to first output word
          d = tcyc - (n - 1) - exp_t[src][dst].pop_front();
          checks++;
          if (d < n + 4) fail($sformatf("cell faster than the pipeline allows: %0d cycles", d));
          delay_sum += d;
          if (d > delay_max) delay_max = d;
        end
        delivered++;
      end
    end
    for (int a = 0; a < n; a++) if (in_sw_drop[a]) begin
      int src;
      src = a * n + int'(dut.g_sw[0].u_psel.cyc);
      if (!sw_on[src]) fail("drop without a cell");
      else begin
        void'(exp_q[src][sw_dst[src]].pop_back());
        void'(exp_t[src][sw_dst[src]].pop_back());
        dropped++;
      end
    end
    if (slot_start) begin
      for (int a = 0; a < n; a++) begin
        occ_in += in_sw_occ[a]; occ_ctr += ctr_sw_occ[a]; occ_out += out_sw_occ[a];
        hist[in_sw_occ[a]]++;
      end
      samples++;
    end
  end

  // One slot on the lines: last slot's cells reach the input switches (and
  // the scoreboard) while this slot's cells are sent as n words each.
  always @(posedge clk) if (running) tcyc <= tcyc + 1;

  task automatic next_slot();
    for (int src = 0; src < NP; src++) begin
      sw_on[src] = tx_on[src];
      sw_dst[src] = tx_dst[src];
      if (tx_on[src]) begin
        exp_q[src][tx_dst[src]].push_back(tx_seq[src]);
        exp_t[src][tx_dst[src]].push_back(tx_t[src]);
      end
      tx_t[src] = tcyc;
      tx_on[src] = nx_on[src];
      tx_dst[src] = nx_dst[src];
      tx_seq[src] = nx_seq[src];
      nx_on[src] = 1'b0;
    end
    for (int w = 0; w < n; w++) begin
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

  function automatic bit chance(int pm);
    return int'($urandom % 1000) < pm;
  endfunction

  initial begin
    longint loss_ppm;
    done = 0; checks = 0; failures = 0;
    in_start = '0; in_data = '0; in_dest = '0;
    foreach (seq[i, j]) seq[i][j] = 0;
    foreach (hist[i]) hist[i] = 0;
    foreach (tx_t[i]) tx_t[i] = 0;
    foreach (tx_on[i]) begin
      nx_on[i] = 0; tx_on[i] = 0; sw_on[i] = 0; nx_dst[i] = 0; tx_dst[i] = 0; nx_seq[i] = 0; tx_seq[i] = 0; rx_cnt[i] = 0;
    end
    foreach (burst_left[i]) burst_left[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    running = 1;
    for (int sl = 0; sl < SLOTS; sl++) begin
      for (int src = 0; src < NP; src++) begin
        bit send;
        int dst;
        send = 0;
        if (BURST <= 1) begin
          send = chance(LOAD_PM);
          dst = int'($urandom % NP);
        end else begin
          if (burst_left[src] == 0) begin
            // idle: start a burst with probability 1 / mean gap
            if (int'($urandom % (BURST * (1000 - LOAD_PM) + LOAD_PM)) < LOAD_PM) begin
              burst_left[src] = 1;
              burst_dst[src] = int'($urandom % NP);
            end
          end
          if (burst_left[src] > 0) begin
            send = 1;
            dst = burst_dst[src];
            if (int'($urandom % BURST) == 0) burst_left[src] = 0;   // burst ends
          end
        end
        if (send) begin
          nx_on[src]  = 1'b1;
          nx_dst[src] = dst;
          nx_seq[src] = seq[src][dst];
          seq[src][dst] = (seq[src][dst] + 1) % 65536;
          offered++;
        end
      end
      next_slot();
    end
    repeat (n * CPP * 4) next_slot();
    checks++;
    if (offered != delivered + dropped) fail("offered != delivered + lost");
    loss_ppm = offered ? dropped * 1000000 / offered : 0;
    checks++;
    if (loss_ppm > MAX_LOSS_PPM) fail($sformatf("loss %0d ppm above %0d ppm", loss_ppm, MAX_LOSS_PPM));
    $display("N=%0d cells/port=%0d load=%0d/1000 burst=%0d slots=%0d: offered %0d delivered %0d lost %0d (%0d ppm)",
             NP, CPP, LOAD_PM, BURST, SLOTS, offered, delivered, dropped, loss_ppm);
    checks++;
    if (delivered * 1000 < longint'(MIN_THRU_PM) * NP * SLOTS)
      fail($sformatf("throughput below %0d/1000", MIN_THRU_PM));
    $display("  throughput %0d.%03d cells per line and slot",
             delivered / (NP * SLOTS), (delivered * 1000 / (NP * SLOTS)) % 1000);
    $display("  mean cells held per port: input %0d.%03d centre %0d.%03d output %0d.%03d",
             occ_in / (samples * NP), (occ_in * 1000 / (samples * NP)) % 1000,
             occ_ctr / (samples * NP), (occ_ctr * 1000 / (samples * NP)) % 1000,
             occ_out / (samples * NP), (occ_out * 1000 / (samples * NP)) % 1000);
    if (delivered > 0)
      $display("  mean delay %0d.%02d slots (max %0d cycles), first input word to first output word",
               delay_sum / (delivered * n), (delay_sum * 100 / (delivered * n)) % 100, delay_max);
    if (HIST) begin
      longint tail;
      $display("  input-switch occupancy: fraction of samples with at least k cells per port");
      for (int k = 1; k <= CPP && k <= 16; k++) begin
        tail = 0;
        for (int o = k * n; o <= n * CPP; o++) tail += hist[o];
        $display("    k=%0d  %0d ppm", k, tail * 1000000 / (samples * n));
      end
      // the tail must shrink as k grows
      for (int k = 2; k <= CPP; k++) begin
        longint t1, t2;
        t1 = 0; t2 = 0;
        for (int o = (k - 1) * n; o <= n * CPP; o++) t1 += hist[o];
        for (int o = k * n; o <= n * CPP; o++) t2 += hist[o];
        checks++;
        if (t2 > t1) fail("occupancy tail not decreasing");
      end
    end
    if (BURST <= 1 && LOAD_PM <= 900) begin
      checks++;
      if (occ_ctr * 2 > occ_in) fail("centre stage holds as many cells as the input stage");
    end
    done = 1;
  end

endmodule
