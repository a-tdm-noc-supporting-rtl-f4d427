// Testbench of the TDM wheel counter (8 slots): over three turns, slot and word must follow
// the cycle number n as slot = (n/2) mod 8 and word = n mod 2, and next_slot/next_word
// must equal the values shown one cycle later.
module tb_dael_slot_counter;
  localparam int NS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [2:0] slot, next_slot;
  logic       word, next_word;
  dael_slot_counter #(.NSLOTS(NS)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] ps;
    logic       pw;
    repeat (2) @(negedge clk);
    rst_n = 1;        // cycle 0 runs until the next rising edge
    @(negedge clk);   // cycle 1
    for (int n = 1; n <= 3 * 2 * NS; n++) begin
      checks++;
      if (int'(slot) != (n / 2) % NS || int'(word) != n % 2) begin
        failures++;
        $display("FAIL: cycle %0d slot %0d word %0d", n, slot, word);
      end
      if (n > 1) begin
        checks++;
        if (slot != ps || word != pw) begin
          failures++;
          $display("FAIL: cycle %0d next values", n);
        end
      end
      ps = next_slot;
      pw = next_word;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
