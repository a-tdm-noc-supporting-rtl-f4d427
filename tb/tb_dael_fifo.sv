// Testbench of the channel queue: random pushes and pops against a queue model kept here,
// checking the head word, empty, full and count every cycle, including pushes into a full
// queue (refused) and simultaneous push and pop.
module tb_dael_fifo;
  localparam int W = 16, DEPTH = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic         push = 0, pop = 0, empty, full;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [2:0]   count;
  dael_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W-1:0] model [$];
  int n_full = 0, n_both = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rd_data == model[0], "head word");
      // bias toward filling in the first half, draining in the second
      push    = $urandom_range(0, 99) < ((i % 400) < 200 ? 75 : 30);
      pop     = $urandom_range(0, 99) < ((i % 400) < 200 ? 30 : 75);
      wr_data = W'($urandom);
      if (push && full) n_full++;
      if (push && pop && !empty && !full) n_both++;
      begin
        bit do_push, do_pop;
        do_push = push && model.size() < DEPTH;
        do_pop  = pop && model.size() > 0;
        @(posedge clk);
        if (do_pop) void'(model.pop_front());
        if (do_push) model.push_back(wr_data);
      end
    end
    check(n_full > 0, "push into a full queue tried");
    check(n_both > 0, "simultaneous push and pop tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
