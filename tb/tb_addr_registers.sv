// tb_addr_registers: drives the WAR/RAR file as the unit switch does (new
// tails from a pool of free addresses, new heads from a model of the linked
// lists) and checks selected registers and the per-queue empty flags against
// a model that keeps each queue as a list of locations.
module tb_addr_registers;
  localparam int Q = 4, LOCS = 32, QW = 2, AW = 5;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [QW-1:0] wr_q = '0, rd_q = '0;
  logic [AW-1:0] new_tail = '0, new_head = '0, war_sel, rar_sel;
  logic [Q-1:0] nonempty;
  int checks = 0, failures = 0;
  int lists [Q][$];     // per queue: head .. tail locations (tail = empty location)
  int freel[$];
  int nxt [LOCS];

  addr_registers #(.Q(Q), .LOCS(LOCS)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int q = 0; q < Q; q++) lists[q].push_back(q);
    for (int a = Q; a < LOCS; a++) freel.push_back(a);
    @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int wq, rq;
      wq = int'($urandom % Q); rq = int'($urandom % Q);
      wr_q = QW'(wq); rd_q = QW'(rq);
      #1;
      chk(int'(war_sel) == lists[wq][$], "WAR select");
      chk(int'(rar_sel) == lists[rq][0], "RAR select");
      for (int q = 0; q < Q; q++) chk(nonempty[q] == (lists[q].size() > 1), "empty flag");
      wr_en = (freel.size() > 0) && ($urandom % 2 == 1);
      rd_en = nonempty[rq] && ($urandom % 2 == 1);
      if (wr_en) new_tail = AW'(freel[0]);
      if (rd_en) new_head = AW'(lists[rq][1]);
      @(posedge clk); #1;
      if (rd_en) freel.push_back(lists[rq].pop_front());
      if (wr_en) lists[wq].push_back(freel.pop_front());
      wr_en = 0; rd_en = 0;
    end
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
