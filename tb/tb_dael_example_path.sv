// The published path set-up example run on the whole 2x2 mesh with an 8-slot wheel.
//
// The host writes exactly the three example data words 0x0142104, 0x8d0e263 and 0x818a4c2
// (header, slots 7 and 4 at the destination, then NI11, R11, R10 and NI10), and two
// register writes that enable channel 0 of NI10 and NI11 and switch off NI10's credit
// check (the example sets up one direction only, so no credits can come back). NI10
// then streams words on channel 0 with its transmit queue kept full.
// Checked: every word reaches NI11 in order; each arrives in slot 4 or 7, the receive
// slots the example gives NI11, which shows that the mask rotated once per element; and
// over 10 turns of the wheel exactly 2 words per slot owned, 2 slots of 8, are delivered:
// 40 words in 160 cycles, the bandwidth the schedule reserves and no more.
module tb_dael_example_path;
  import dael_pkg::*;
  localparam int NCH = 3, NS = 8, N_W = 120;

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

  dael_noc_top #(.NSLOTS(NS)) dut (.*);

  localparam int NI10 = 2, NI11 = 3;

  int k = 0;
  always @(posedge clk) if (rst_n) k <= k + 1;

  task automatic host_write(logic [31:0] w);
    @(negedge clk);
    while (!cfg_wr_ready) @(negedge clk);
    cfg_wr_valid = 1;
    cfg_wr_data  = w;
    @(negedge clk);
    cfg_wr_valid = 0;
  endtask
  // one register write packed into one host word: header, ID, select, value
  task automatic host_reg(logic [5:0] id, ni_reg_e r, int ch, logic [5:0] v);
    cword_t w [4];
    w = '{{1'b0, OP_WRITE}, {1'b1, id}, {1'b1, r, 4'(ch)}, {1'b1, v}};
    host_write({4'd0, w[3], w[2], w[1], w[0]});
  endtask

  bit go = 0;
  int sent = 0, rcv = 0, win_lo = -1, win_hi = -1, in_win = 0;

  always @(negedge clk) begin
    for (int n = 0; n < 4; n++)
      for (int c = 0; c < NCH; c++) begin
        tx_valid[n][c] <= 1'b0;
        tx_data[n][c]  <= '0;
        rx_ready[n][c] <= 1'b1;
      end
    if (go && sent < N_W) begin
      tx_valid[NI10][0] <= 1'b1;
      tx_data[NI10][0]  <= 32'hA000_0000 + 32'(sent);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (tx_valid[NI10][0] && tx_ready[NI10][0]) sent++;
    if (rx_valid[NI11][0] && rx_ready[NI11][0]) begin
      // a word taken in slot s is shown to the IP from the following cycle
      int s;
      s = ((k - 1) / 2) % NS;
      check(rx_data[NI11][0] == 32'hA000_0000 + 32'(rcv),
            $sformatf("word %0d = %h", rcv, rx_data[NI11][0]));
      check(s == 4 || s == 7, $sformatf("word %0d arrived in slot %0d", rcv, s));
      if (k >= win_lo && win_lo >= 0 && k < win_hi) in_win++;
      rcv++;
    end
    for (int c = 0; c < NCH; c++)
      if (c != 0) check(!rx_valid[NI11][c] && !rx_valid[NI10][c], "word on an unused channel");
  end

  initial begin
    #400000;
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

    host_write(32'h0142104);
    host_write(32'h8d0e263);
    host_write(32'h818a4c2);
    host_reg(ni_id(1, 1), REG_FLAGS, 0, 6'd1);
    host_reg(ni_id(1, 0), REG_FLAGS, 0, 6'd3);
    @(negedge clk);
    while (cfg_busy) @(negedge clk);
    repeat (12) @(negedge clk);

    go = 1;
    // let the stream settle, then count deliveries over 10 whole turns
    repeat (8 * 2 * NS) @(negedge clk);
    win_lo = k;
    win_hi = k + 10 * 2 * NS;
    t = 0;
    while (rcv < N_W && t < 4000) begin @(negedge clk); t++; end
    check(rcv == N_W, $sformatf("%0d of %0d words delivered", rcv, N_W));
    check(in_win == 40, $sformatf("%0d words in 10 turns, expected 40", in_win));
    $display("words in 10 turns of the 8-slot wheel: %0d", in_win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
