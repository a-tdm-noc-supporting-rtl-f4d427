// Testbench of the network interface: two NIs, A (ID 32) and B (ID 33), wired link to
// link, so a word A sends in slot s is taken in by B in slot s+1.
//
// Both are configured over one shared configuration stream: channel 0 of A sends in
// slots 2 and 10 and B receives in 3 and 11; channel 0 of B sends (carrying the credits
// back) in slot 6 and A receives in 7; channel 1 of A sends in slot 20 with the credit
// check off and B receives in 21. Credits start at B's queue depth. A stream of words on
// each channel is pushed into A while B's IP side takes words slowly at random, so A runs
// out of credits and waits. Checked: every word arrives once and in order, receive-queue
// pushes happen only in the configured slots, A stalled on credits at least once, A's
// credit counter read back over the reverse link returns to the full queue depth once
// everything is consumed, and a bus configuration word is delivered.
module tb_dael_ni;
  import dael_pkg::*;
  localparam int NCH = 3, NS = 32, NWORDS = 120;

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

  logic              a_txv [NCH], a_txr [NCH], a_rxv [NCH], a_rxr [NCH];
  logic [DATA_W-1:0] a_txd [NCH], a_rxd [NCH];
  logic              b_txv [NCH], b_txr [NCH], b_rxv [NCH], b_rxr [NCH];
  logic [DATA_W-1:0] b_txd [NCH], b_rxd [NCH];
  link_t  a2b, b2a;
  cword_t cfg, a_rsp, b_rsp;
  logic   a_busv, b_busv;
  logic [BUS_W-1:0] a_busw, b_busw;

  dael_ni #(.MY_ID(6'd32)) dut_a (
    .clk, .rst_n, .tx_valid(a_txv), .tx_ready(a_txr), .tx_data(a_txd),
    .rx_valid(a_rxv), .rx_ready(a_rxr), .rx_data(a_rxd),
    .link_out(a2b), .link_in(b2a), .cfg_in(cfg), .rsp_out(a_rsp),
    .bus_valid(a_busv), .bus_word(a_busw)
  );
  dael_ni #(.MY_ID(6'd33)) dut_b (
    .clk, .rst_n, .tx_valid(b_txv), .tx_ready(b_txr), .tx_data(b_txd),
    .rx_valid(b_rxv), .rx_ready(b_rxr), .rx_data(b_rxd),
    .link_out(b2a), .link_in(a2b), .cfg_in(cfg), .rsp_out(b_rsp),
    .bus_valid(b_busv), .bus_word(b_busw)
  );

  int k = 0;
  always @(posedge clk) if (rst_n) k <= k + 1;

  // ---------------- configuration helpers ----------------
  task automatic cw(cword_t w);
    cfg <= w;
    @(posedge clk);
  endtask
  task automatic idle();
    cfg <= '0;
  endtask
  task automatic path1(logic [31:0] mask, logic [5:0] id, logic [5:0] ports);
    cw({1'b0, OP_PATH});
    for (int j = 5; j >= 0; j--) cw({1'b1, 6'(mask >> (6 * j))});
    cw({1'b1, id});
    cw({1'b1, ports});
    idle();
    repeat (3) @(posedge clk);
  endtask
  task automatic wr(logic [5:0] id, logic [5:0] sel, logic [5:0] val);
    cw({1'b0, OP_WRITE}); cw({1'b1, id}); cw({1'b1, sel}); cw({1'b1, val});
    idle();
    repeat (3) @(posedge clk);
  endtask

  // ---------------- traffic ----------------
  bit go = 0;
  int sent [2], rcvd [2];
  int n_stall = 0, n_push_bad = 0, n_push = 0, n_credit_ret = 0;

  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) begin
      b_txv[c] <= 1'b0; a_rxr[c] <= 1'b1;
      b_rxr[c] <= (c == 1) || (c == 0 && $urandom_range(0, 39) == 0);
    end
    for (int c = 0; c < 2; c++) begin
      a_txv[c] <= go && sent[c] < NWORDS;
      a_txd[c] <= 32'(c * 1000 + sent[c]);
    end
  end
  always @(posedge clk) if (rst_n) begin
    int s;
    s = (k / 2) % NS;
    for (int c = 0; c < 2; c++) begin
      if (a_txv[c] && a_txr[c]) sent[c]++;
      if (b_rxv[c] && b_rxr[c]) begin
        check(b_rxd[c] == 32'(c * 1000 + rcvd[c]),
              $sformatf("ch%0d word %0d got %0d", c, rcvd[c], b_rxd[c]));
        rcvd[c]++;
      end
      if (dut_b.rxq_push[c]) begin
        n_push++;
        if (!((c == 0 && (s == 3 || s == 11)) || (c == 1 && s == 21))) n_push_bad++;
      end
    end
    if (dut_a.tx_tab_q[dut_a.next_slot] == 0 && dut_a.flags_q[0][0] && !dut_a.txq_empty[0] &&
        dut_a.credits_q[0] == 0) n_stall++;
    if (dut_a.rx_own && dut_a.word && {dut_a.cr_hi_q, dut_a.in_q2.credit} != 0) n_credit_ret++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] rsp;
    int t;
    cfg = '0;
    for (int c = 0; c < NCH; c++) begin
      a_txv[c] = 0; a_txd[c] = '0; b_txv[c] = 0; b_txd[c] = '0; a_rxr[c] = 1; b_rxr[c] = 0;
    end
    sent = '{0, 0}; rcvd = '{0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // destination first, then source
    path1(32'h0000_0808, 6'd33, 6'b000_100);   // B receives ch0 in slots 3, 11
    path1(32'h0000_0404, 6'd32, 6'b000_000);   // A sends ch0 in slots 2, 10
    path1(32'h0000_0080, 6'd32, 6'b000_100);   // A receives ch0 in slot 7
    path1(32'h0000_0040, 6'd33, 6'b000_000);   // B sends ch0 in slot 6
    path1(32'h0020_0000, 6'd33, 6'b000_101);   // B receives ch1 in slot 21
    path1(32'h0010_0000, 6'd32, 6'b000_001);   // A sends ch1 in slot 20
    wr(6'd32, {REG_CREDITS, 4'd0}, 6'd8);
    wr(6'd33, {REG_CREDITS, 4'd0}, 6'd8);
    wr(6'd32, {REG_FLAGS, 4'd0}, 6'd1);
    wr(6'd33, {REG_FLAGS, 4'd0}, 6'd1);
    wr(6'd32, {REG_FLAGS, 4'd1}, 6'd3);        // enabled, no credit check
    go = 1;

    t = 0;
    while ((rcvd[0] < NWORDS || rcvd[1] < NWORDS) && t < 40000) begin
      @(posedge clk);
      t++;
    end
    check(rcvd[0] == NWORDS && rcvd[1] == NWORDS,
          $sformatf("all words delivered (%0d, %0d)", rcvd[0], rcvd[1]));
    check(n_push == 2 * NWORDS, $sformatf("one push per word (%0d)", n_push));
    check(n_push_bad == 0, "pushes only in the configured receive slots");
    check(n_stall > 0, "credit stall happened");
    check(n_credit_ret > 0, "credits were returned");
    repeat (4 * 2 * NS) @(posedge clk);   // let the last credits travel back

    // read back A's credit counter of channel 0
    cw({1'b0, OP_READ}); cw({1'b1, 6'd32}); cw({1'b1, {REG_CREDITS, 4'd0}});
    idle();
    t = 0;
    while (!a_rsp[CW_W-1] && t < 20) begin
      @(negedge clk);
      t++;
    end
    rsp = a_rsp[5:0];
    check(a_rsp[CW_W-1], "read-back answer arrived");
    check(t == 4, $sformatf("read-back answer four cycles after the request (%0d)", t));
    check(rsp == 6'd8, $sformatf("credits back to queue depth (%0d)", rsp));
    check(b_rsp == '0, "the other NI stays silent");

    // bus configuration word to B
    cw({1'b0, OP_BUS}); cw({1'b1, 6'd33});
    for (int j = 6; j >= 0; j--) cw({1'b1, 6'(6'h11 * (j + 1))});
    idle();
    t = 0;
    while (!b_busv && t < 20) begin
      @(negedge clk);
      t++;
    end
    check(b_busv && b_busw == 37'({6'h37, 6'h26, 6'h15, 6'h04, 6'h33, 6'h22, 6'h11}),
          $sformatf("bus word %0h", b_busw));

    $display("stall cycles %0d, credit returns %0d", n_stall, n_credit_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
