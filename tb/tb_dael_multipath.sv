// One connection routed over two paths at once, on the whole 2x2 mesh at its default size.
//
// NI00 sends channel 0 to NI11 in slot 2 over R00, R01 and R11, and in slot 10 over R00,
// R10 and R11: two paths of the same length, so the words still arrive in the order they
// were sent. The way back (NI11 slot 20 over R11, R10, R00), which carries the credits,
// is a single path. The routers need nothing special for this: each path is an ordinary
// path set-up packet, and both end in the same receive queue.
// Checked: every word reaches NI11 in order; each arrives in slot 6 or 14; both paths
// carry words; and with the receiver always ready, 10 turns of the 32-slot wheel deliver
// exactly 40 words (2 slots of 2 words per turn), twice what either path gives alone.
module tb_dael_multipath;
  import dael_pkg::*;
  localparam int NCH = 3, NS = 32, RXQ = 8, N_W = 120;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  logic              cfg_wr_valid = 0, cfg_wr_ready, cfg_busy, cfg_rsp_valid, cfg_rsp_ack = 0;
  logic [31:0]       cfg_wr_data = '0;
  logic [PL_W-1:0]   cfg_rsp_data;
  logic              tx_valid [4][NCH], tx_ready [4][NCH];
  logic [DATA_W-1:0] tx_data  [4][NCH];
  logic              rx_valid [4][NCH], rx_ready [4][NCH];
  logic [DATA_W-1:0] rx_data  [4][NCH];
  logic              bus_valid [4];
  logic [BUS_W-1:0]  bus_word  [4];

  dael_noc_top dut (.*);

  localparam int NI00 = 0, NI11 = 3;

  int k = 0;
  always @(posedge clk) if (rst_n) k <= k + 1;

  cword_t pkt [$];
  task automatic hdr(cfg_op_e op); pkt.push_back({1'b0, op}); endtask
  task automatic pl(logic [5:0] v); pkt.push_back({1'b1, v}); endtask
  task automatic mask(logic [31:0] m);
    for (int j = 5; j >= 0; j--) pl(6'(m >> (6 * j)));
  endtask
  task automatic wreg(logic [5:0] id, ni_reg_e r, int ch, logic [5:0] v);
    hdr(OP_WRITE); pl(id); pl({r, 4'(ch)}); pl(v);
  endtask
  // send pkt as host words, four configuration words each, first word in the low bits
  task automatic flush();
    while (pkt.size() > 0) begin
      logic [31:0] w;
      w = '0;
      for (int i = 0; i < 4 && pkt.size() > 0; i++) w |= 32'(pkt.pop_front()) << (7 * i);
      @(negedge clk);
      while (!cfg_wr_ready) @(negedge clk);
      cfg_wr_valid = 1;
      cfg_wr_data  = w;
      @(negedge clk);
      cfg_wr_valid = 0;
    end
  endtask

  bit go = 0;
  int sent = 0, rcv = 0, win_lo = -1, win_hi = -1, in_win = 0, via_a = 0, via_b = 0;

  always @(negedge clk) begin
    for (int n = 0; n < 4; n++)
      for (int c = 0; c < NCH; c++) begin
        tx_valid[n][c] <= 1'b0;
        tx_data[n][c]  <= '0;
        rx_ready[n][c] <= 1'b1;
      end
    if (go && sent < N_W) begin
      tx_valid[NI00][0] <= 1'b1;
      tx_data[NI00][0]  <= 32'hA000_0000 + 32'(sent);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (tx_valid[NI00][0] && tx_ready[NI00][0]) sent++;
    if (rx_valid[NI11][0] && rx_ready[NI11][0]) begin
      // a word taken in slot s is shown to the IP from the following cycle
      int s;
      s = ((k - 1) / 2) % NS;
      check(rx_data[NI11][0] == 32'hA000_0000 + 32'(rcv),
            $sformatf("word %0d = %h", rcv, rx_data[NI11][0]));
      check(s == 6 || s == 14, $sformatf("word %0d arrived in slot %0d", rcv, s));
      if (s == 6) via_a++;
      if (s == 14) via_b++;
      if (k >= win_lo && win_lo >= 0 && k < win_hi) in_win++;
      rcv++;
    end
    for (int c = 0; c < NCH; c++)
      if (c != 0) check(!rx_valid[NI11][c] && !rx_valid[NI00][c], "word on an unused channel");
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // path A: NI00 slot 2 -> R00 -> R01 -> R11 -> NI11 slot 6
    hdr(OP_PATH); mask(32'd1 << 6);
    pl(ni_id(1, 1));     pl(6'b000_100);     // NI11 receives into channel 0
    pl(router_id(1, 1)); pl(6'b00_00_10);    // R11: input 0 (South) to output 2 (NI)
    pl(router_id(0, 1)); pl(6'b00_01_00);    // R01: input 1 (West) to output 0 (North)
    pl(router_id(0, 0)); pl(6'b00_10_01);    // R00: input 2 (NI) to output 1 (East)
    pl(ni_id(0, 0));     pl(6'b000_000);     // NI00 sends channel 0
    // path B: NI00 slot 10 -> R00 -> R10 -> R11 -> NI11 slot 14
    hdr(OP_PATH); mask(32'd1 << 14);
    pl(ni_id(1, 1));     pl(6'b000_100);
    pl(router_id(1, 1)); pl(6'b00_01_10);    // R11: input 1 (West) to output 2
    pl(router_id(1, 0)); pl(6'b00_00_01);    // R10: input 0 (South) to output 1 (East)
    pl(router_id(0, 0)); pl(6'b00_10_00);    // R00: input 2 (NI) to output 0 (North)
    pl(ni_id(0, 0));     pl(6'b000_000);
    // way back: NI11 slot 20 -> R11 -> R10 -> R00 -> NI00 slot 24
    hdr(OP_PATH); mask(32'd1 << 24);
    pl(ni_id(0, 0));     pl(6'b000_100);
    pl(router_id(0, 0)); pl(6'b00_00_10);    // R00: input 0 (North) to output 2
    pl(router_id(1, 0)); pl(6'b00_01_00);    // R10: input 1 (East) to output 0 (South)
    pl(router_id(1, 1)); pl(6'b00_10_01);    // R11: input 2 (NI) to output 1 (West)
    pl(ni_id(1, 1));     pl(6'b000_000);
    wreg(ni_id(0, 0), REG_CREDITS, 0, 6'(RXQ));
    wreg(ni_id(1, 1), REG_CREDITS, 0, 6'(RXQ));
    wreg(ni_id(0, 0), REG_FLAGS, 0, 6'd1);
    wreg(ni_id(1, 1), REG_FLAGS, 0, 6'd1);
    flush();
    @(negedge clk);
    while (cfg_busy) @(negedge clk);
    repeat (12) @(negedge clk);

    go = 1;
    // let the stream settle, then count deliveries over 10 whole turns
    repeat (3 * 2 * NS) @(negedge clk);
    win_lo = k;
    win_hi = k + 10 * 2 * NS;
    t = 0;
    while (rcv < N_W && t < 20000) begin @(negedge clk); t++; end
    check(rcv == N_W, $sformatf("%0d of %0d words delivered", rcv, N_W));
    check(in_win == 40, $sformatf("%0d words in 10 turns, expected 40", in_win));
    check(via_a > 0 && via_b > 0, $sformatf("words per path %0d and %0d", via_a, via_b));
    $display("words in 10 turns: %0d; over path A %0d, over path B %0d", in_win, via_a, via_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
