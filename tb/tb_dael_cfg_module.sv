// Testbench of the host configuration module (COOLDOWN 9).
//
// 1. The three host words of the path set-up example must come out as the configuration
//    words 04 42 50 00 63 44 43 46 42 49 62 40, one per cycle, and a following header must
//    wait until 9 idle cycles have passed after the last path word (the cool-down).
// 2. A read request: the next header must wait until an answer arrives on the reverse
//    input; the answer is held for the host until acknowledged.
// 3. A read request nobody answers: the next header leaves after the time-out.
// busy must be low at the end.
module tb_dael_cfg_module;
  import dael_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic            wr_valid = 0, wr_ready, busy, rsp_valid, rsp_ack = 0;
  logic [31:0]     wr_data = '0;
  logic [PL_W-1:0] rsp_data;
  cword_t          cfg_out, rsp_in = '0;

  dael_cfg_module #(.COOLDOWN(9), .RSP_TIMEOUT(40)) dut (.*);

  int k = 0;
  always @(posedge clk) k <= k + 1;

  // log of non-idle output words and their cycles
  cword_t ow [$];
  int     oc [$];
  always @(negedge clk) if (rst_n && cfg_out != '0) begin
    ow.push_back(cfg_out);
    oc.push_back(k);
  end

  task automatic host(logic [31:0] w);
    @(negedge clk);
    while (!wr_ready) @(negedge clk);
    wr_valid = 1; wr_data = w;
    @(negedge clk);
    wr_valid = 0;
  endtask

  function automatic int find(cword_t w, int from);
    for (int i = from; i < ow.size(); i++) if (ow[i] == w) return i;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cword_t exp [11] = '{7'h04, 7'h42, 7'h50, 7'h63, 7'h44, 7'h43, 7'h46, 7'h42, 7'h49,
                         7'h62, 7'h40};
    int i0, ih, ir, t;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // 1. path set-up and cool-down
    host(32'h0142104);
    host(32'h8d0e263);
    host(32'h818a4c2);
    host(32'h0000001);            // a write header follows (rest is padding)
    repeat (40) @(posedge clk);
    check(ow.size() == 12, $sformatf("12 words out (%0d)", ow.size()));
    for (int i = 0; i < 11; i++)
      check(ow[i] == exp[i], $sformatf("word %0d = %h, expected %h", i, ow[i], exp[i]));
    check(oc[3] - oc[0] == 4 && oc[10] - oc[0] == 11, "one word per cycle, padding idle");
    check(ow[11] == 7'h01, "next header");
    check(oc[11] - oc[10] == 10, $sformatf("cool-down gap %0d cycles", oc[11] - oc[10] - 1));

    // 2. read request answered after 6 cycles
    i0 = ow.size();
    host({4'h0, 7'h00, 7'h40, 7'h60, 7'h02});   // READ, ID 32, select 0
    host(32'h0000001);
    t = 0;
    while (find(7'h40, i0) < 0 && t < 50) begin @(negedge clk); t++; end
    repeat (6) @(negedge clk);
    check(find(7'h01, i0) < 0, "header held while the answer is pending");
    rsp_in = 7'h45;
    @(negedge clk);
    rsp_in = '0;
    repeat (4) @(negedge clk);
    check(rsp_valid && rsp_data == 6'h05, "answer captured");
    ih = find(7'h01, i0);
    check(ih >= 0, "header sent after the answer");
    rsp_ack = 1;
    @(negedge clk);
    rsp_ack = 0;
    check(!rsp_valid, "answer acknowledged");

    // 3. unanswered read: time-out
    i0 = ow.size();
    host({4'h0, 7'h00, 7'h40, 7'h61, 7'h02});
    host(32'h0000001);
    repeat (80) @(negedge clk);
    ir = find(7'h40, i0);
    ih = find(7'h01, i0);
    check(ir >= 0 && ih >= 0, "header sent after the time-out");
    if (ir >= 0 && ih >= 0)
      check(oc[ih] - oc[ir] >= 40, $sformatf("time-out wait %0d", oc[ih] - oc[ir]));
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
