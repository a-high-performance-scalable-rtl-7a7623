// tb_unit_switch: one 4 x 4 unit switch with a small buffer (16 locations,
// 12 usable) against a behavioural model that keeps one FIFO of cells per
// queue. Each cycle the model applies the design's rules: the arriving cell
// joins the queue named by the upper (or, with use_lh, lower) half of its
// tag unless the buffer is full, in which case it is lost; the queue named
// by the DEC count sends its head cell on the link named by the DMX count
// unless that link's buffer-full line is high. Counters are loaded with
// random start values and run up (input/output stage) or down (centre).
// Outputs, drop/block flags, buffer-full and occupancy are compared every
// cycle; the run is repeated for each stage configuration.
module tb_unit_switch;
  localparam int N = 4, DW = 4, LOCS = 16, CW = 424, AW = 4;
  logic clk = 0, rst_n = 0, load = 0, count_down = 0, use_lh = 0;
  logic [1:0] dec_init = '0, dmx_init = '0;
  logic [N-1:0] in_valid, out_valid, next_full;
  logic [N-1:0][DW-1:0] in_dest, out_dest;
  logic [N-1:0][CW-1:0] in_cell, out_cell;
  logic buf_full, cell_dropped, cell_blocked;
  logic [AW:0] occupancy;
  int checks = 0, failures = 0;
  int n_drop = 0, n_block = 0, n_sent = 0;

  unit_switch #(.N(N), .DEST_W(DW), .LOCS(LOCS), .CELL_W(CW)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { logic [DW-1:0] d; logic [CW-1:0] c; } cell_s;
  cell_s qs [N][$];
  int held, dec_m, dmx_m;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(bit down, bit lh, int cycles, int load_pct, int full_pct);
    rst_n = 0; load = 0; in_valid = '0; in_dest = '0; in_cell = '0; next_full = '0;
    @(posedge clk); #1 rst_n = 1;
    count_down = down; use_lh = lh;
    dec_init = 2'($urandom); dmx_init = 2'($urandom);
    load = 1;
    @(posedge clk); #1 load = 0;
    for (int q = 0; q < N; q++) qs[q].delete();
    held = 0; dec_m = int'(dec_init); dmx_m = int'(dmx_init);
    for (int k = 0; k < cycles; k++) begin
      int p, wq;
      cell_s nc;
      bit exp_send, exp_drop, arrive;
      in_valid = '0; in_dest = '0; in_cell = '0;
      arrive = (int'($urandom % 100) < load_pct);
      p = int'($urandom % N);
      nc.d = DW'($urandom);
      for (int b = 0; b < CW; b += 32) nc.c[b +: 32] = $urandom;
      if (arrive) begin
        in_valid[p] = 1'b1; in_dest[p] = nc.d; in_cell[p] = nc.c;
      end
      for (int i = 0; i < N; i++) next_full[i] = (int'($urandom % 100) < full_pct);
      #1;
      // model, evaluated on the state at the start of the cycle
      exp_send = (qs[dec_m].size() > 0) && !next_full[dmx_m];
      exp_drop = arrive && (held == LOCS - N);
      chk(buf_full == (held == LOCS - N), "buffer-full");
      chk(int'(occupancy) == held, "occupancy");
      chk(cell_dropped == exp_drop, "drop flag");
      chk(cell_blocked == ((qs[dec_m].size() > 0) && next_full[dmx_m]), "blocked flag");
      for (int i = 0; i < N; i++) begin
        bit on;
        on = exp_send && (i == dmx_m);
        chk(out_valid[i] == on, $sformatf("out_valid[%0d]", i));
        if (on) chk(out_dest[i] == qs[dec_m][0].d && out_cell[i] == qs[dec_m][0].c, "cell on link");
        else    chk(out_dest[i] == '0 && out_cell[i] == '0, "idle link zero");
      end
      n_drop += exp_drop; n_block += cell_blocked; n_sent += exp_send;
      @(posedge clk); #1;
      if (exp_send) begin void'(qs[dec_m].pop_front()); held--; end
      if (arrive && !exp_drop) begin
        wq = lh ? int'(nc.d[1:0]) : int'(nc.d[3:2]);
        qs[wq].push_back(nc);
        held++;
      end
      dec_m = down ? (dec_m + N - 1) % N : (dec_m + 1) % N;
      dmx_m = down ? (dmx_m + N - 1) % N : (dmx_m + 1) % N;
    end
  endtask

  initial begin
    run(0, 0, 3000, 60, 10);   // input stage: moderate load
    run(1, 0, 3000, 95, 40);   // centre stage: heavy load, frequent full receivers
    run(0, 1, 3000, 90, 0);    // output stage: lower half of tag, no flow control
    run(0, 0, 3000, 100, 60);  // overload: buffer full, cells lost
    chk(n_drop > 0, "cell loss exercised");
    chk(n_block > 0, "blocking exercised");
    $display("sent %0d dropped %0d blocked %0d", n_sent, n_drop, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
