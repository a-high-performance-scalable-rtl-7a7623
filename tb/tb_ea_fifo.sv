// tb_ea_fifo: checks the empty-address FIFO against a queue model: the reset
// contents (FIRST..DEPTH-1 in order), random push/pop traffic including
// simultaneous push and pop, the empty flag when all addresses are taken, and
// the count.
module tb_ea_fifo;
  localparam int DEPTH = 16, FIRST = 4, AW = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty;
  logic [AW-1:0] push_addr = '0, head;
  logic [AW:0] count;
  int checks = 0, failures = 0;
  int model[$];
  int taken[$];

  ea_fifo #(.DEPTH(DEPTH), .FIRST(FIRST)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (count %0d model %0d)", what, count, model.size());
    end
  endtask

  initial begin
    @(posedge clk); #1 rst_n = 1;
    for (int a = FIRST; a < DEPTH; a++) model.push_back(a);
    chk(count == (AW+1)'(DEPTH - FIRST), "reset count");
    // take everything: FIFO must go empty
    while (model.size() > 0) begin
      chk(!empty && int'(head) == model[0], "head after reset");
      pop = 1;
      taken.push_back(model.pop_front());
      @(posedge clk); #1 pop = 0;
    end
    chk(empty && count == 0, "empty when all addresses taken");
    // random traffic
    for (int k = 0; k < 2000; k++) begin
      push = (taken.size() > 0) && ($urandom % 2 == 1);
      pop  = !empty && ($urandom % 2 == 1);
      if (push) begin
        int idx;
        idx = int'($urandom % taken.size());
        push_addr = AW'(taken[idx]);
        taken.delete(idx);
      end
      if (pop) begin
        chk(int'(head) == model[0], "head order");
        taken.push_back(model.pop_front());
      end
      if (push) model.push_back(int'(push_addr));
      @(posedge clk); #1;
      push = 0; pop = 0;
      chk(int'(count) == model.size() && empty == (model.size() == 0), "count / empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
