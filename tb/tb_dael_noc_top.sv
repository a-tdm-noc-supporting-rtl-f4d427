// End-to-end test of the 2x2 mesh at its default size (32 slots, 3 channels per NI).
//
// Everything is configured through the host port, as a host processor would:
//  - a bidirectional connection on channel 0 between NI10 and NI11 over R10 and R11 (the
//    path of the published set-up example): NI10 sends in slots 1 and 4, NI11 receives in
//    slots 4 and 7; the way back (which also carries the credits) leaves NI11 in slot 9
//    and reaches NI10 in slot 12;
//  - a multicast tree on channel 1 from NI00 to NI01 and NI11, built as in the original description's
//    multicast example from a full path NI00-R00-R01-NI01 and a partial path R01-R11-NI11
//    that both take input West of R01 in the same slot; its slots wrap around the wheel
//    (NI00 sends in slot 30, R01 forwards in slot 0);
//  - while those two carry traffic, a second bidirectional connection on channel 2 from
//    NI01 to NI10 over R01, R11 and R10, which must not disturb them;
//  - credit counters and channel flags, a read-back of a credit counter, a bus
//    configuration word, and finally a tear-down of the NI10 to NI11 path.
// Checked: in-order delivery of every word, identical streams at both multicast
// receivers, the exact arrival cycle of a word sent into the idle network (three hops,
// two cycles each, plus waiting for the slot), credits back to the queue depth after the
// traffic, the read-back value, the bus word, and that nothing passes after the
// tear-down. Counted, and required at least once: path set-ups, multicast deliveries,
// credit stalls, returned credits, cool-down waits, waits for a read answer, tear-down,
// and words delivered on running connections while another one is being set up.
module tb_dael_noc_top;
  import dael_pkg::*;
  localparam int NCH = 3, NS = 32, RXQ = 8;
  localparam int N_A = 100, N_B = 40, N_M = 60, N_C = 50;

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

  // NI numbers k = 2*row+col
  localparam int NI00 = 0, NI01 = 1, NI10 = 2, NI11 = 3;

  int k = 0;
  always @(posedge clk) if (rst_n) k <= k + 1;

  // ---------------- host-side packet building ----------------
  cword_t pkt [$];
  task automatic hdr(cfg_op_e op); pkt.push_back({1'b0, op}); endtask
  task automatic pl(logic [5:0] v); pkt.push_back({1'b1, v}); endtask
  task automatic mask(logic [31:0] m);
    for (int j = 5; j >= 0; j--) pl(6'(m >> (6 * j)));
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
  task automatic wait_idle();
    @(negedge clk);
    while (cfg_busy) @(negedge clk);
    repeat (12) @(negedge clk);   // last words still travel down the tree
  endtask
  task automatic wreg(logic [5:0] id, ni_reg_e r, int ch, logic [5:0] v);
    hdr(OP_WRITE); pl(id); pl({r, 4'(ch)}); pl(v);
  endtask

  // ---------------- traffic ----------------
  bit go_a = 0, go_b = 0, go_m = 0, go_c = 0, slow = 1, probe = 0;
  int sent_a = 0, sent_b = 0, sent_m = 0, sent_c = 0, sent_late = 0;
  int rcv_a = 0, rcv_b = 0, rcv_m1 = 0, rcv_m3 = 0, rcv_c = 0, rcv_late = 0;
  int n_mcast = 0, n_stall = 0, n_cred = 0, n_cool = 0, n_pend = 0, n_paths = 0;
  int probe_push = -1, probe_arrive = -1;

  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < 4; n++)
      for (int c = 0; c < NCH; c++) begin
        tx_valid[n][c] <= 1'b0;
        tx_data[n][c]  <= '0;
        rx_ready[n][c] <= 1'b1;
      end
    if (probe) begin
      tx_valid[NI10][0] <= 1'b1;
      tx_data[NI10][0]  <= 32'hCAFE;
    end else if (go_a && sent_a < N_A) begin
      tx_valid[NI10][0] <= 1'b1;
      tx_data[NI10][0]  <= 32'h1000_0000 + 32'(sent_a);
    end else if (sent_late > 0 && sent_late < 20) begin
      tx_valid[NI10][0] <= 1'b1;
      tx_data[NI10][0]  <= 32'h5000_0000 + 32'(sent_late);
    end
    if (go_b && sent_b < N_B) begin
      tx_valid[NI11][0] <= 1'b1;
      tx_data[NI11][0]  <= 32'h2000_0000 + 32'(sent_b);
    end
    if (go_m && sent_m < N_M) begin
      tx_valid[NI00][1] <= 1'b1;
      tx_data[NI00][1]  <= 32'h3000_0000 + 32'(sent_m);
    end
    if (go_c && sent_c < N_C) begin
      tx_valid[NI01][2] <= 1'b1;
      tx_data[NI01][2]  <= 32'h6000_0000 + 32'(sent_c);
    end
    rx_ready[NI11][0] <= !slow || ($urandom_range(0, 29) == 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (tx_valid[NI10][0] && tx_ready[NI10][0]) begin
      if (probe) probe_push = k;
      else if (sent_a < N_A && go_a) sent_a++;
      else if (sent_late > 0) sent_late++;
    end
    if (tx_valid[NI11][0] && tx_ready[NI11][0]) sent_b++;
    if (tx_valid[NI00][1] && tx_ready[NI00][1]) sent_m++;
    if (tx_valid[NI01][2] && tx_ready[NI01][2]) sent_c++;
    if (rx_valid[NI10][2] && rx_ready[NI10][2]) begin
      check(rx_data[NI10][2] == 32'h6000_0000 + 32'(rcv_c),
            $sformatf("NI10 ch2 word %0d = %h", rcv_c, rx_data[NI10][2]));
      rcv_c++;
    end
    if (rx_valid[NI11][0] && rx_ready[NI11][0]) begin
      if (rx_data[NI11][0] == 32'hCAFE) begin
        if (probe_arrive < 0) probe_arrive = k;
      end else if (rx_data[NI11][0][31:28] == 4'h5) begin
        rcv_late++;
      end else begin
        check(rx_data[NI11][0] == 32'h1000_0000 + 32'(rcv_a),
              $sformatf("NI11 ch0 word %0d = %h", rcv_a, rx_data[NI11][0]));
        rcv_a++;
      end
    end
    if (rx_valid[NI10][0] && rx_ready[NI10][0]) begin
      check(rx_data[NI10][0] == 32'h2000_0000 + 32'(rcv_b),
            $sformatf("NI10 ch0 word %0d = %h", rcv_b, rx_data[NI10][0]));
      rcv_b++;
    end
    if (rx_valid[NI01][1] && rx_ready[NI01][1]) begin
      check(rx_data[NI01][1] == 32'h3000_0000 + 32'(rcv_m1), "NI01 multicast word");
      rcv_m1++;
    end
    if (rx_valid[NI11][1] && rx_ready[NI11][1]) begin
      check(rx_data[NI11][1] == 32'h3000_0000 + 32'(rcv_m3), "NI11 multicast word");
      rcv_m3++;
      if (rcv_m3 <= rcv_m1) n_mcast++;
    end
    // mechanisms observed inside
    if (dut.g_row[1].g_col[0].u_ni.tx_own && dut.g_row[1].g_col[0].u_ni.tx_ch == 0 &&
        !dut.g_row[1].g_col[0].u_ni.txq_empty[0] && dut.g_row[1].g_col[0].u_ni.credits_q[0] == 0)
      n_stall++;
    if (dut.g_row[1].g_col[0].u_ni.rx_own && dut.g_row[1].g_col[0].u_ni.word &&
        dut.g_row[1].g_col[0].u_ni.in_q2.credit != 0)
      n_cred++;
    if (dut.u_cfg.stall && dut.u_cfg.cool_q != 0) n_cool++;
    if (dut.u_cfg.stall && dut.u_cfg.pend_q) n_pend++;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t_setup, s, exp_arr, t, busy0, n_live;
    for (int n = 0; n < 4; n++)
      for (int c = 0; c < NCH; c++) begin
        tx_valid[n][c] = 0; tx_data[n][c] = '0; rx_ready[n][c] = 1;
      end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- connection on channel 0: NI10 -> NI11, destination first ----
    t0 = k;
    hdr(OP_PATH); mask((32'd1 << 7) | (32'd1 << 4));
    pl(ni_id(1, 1));     pl(6'b000_100);     // NI11 receives into channel 0
    pl(router_id(1, 1)); pl(6'b00_01_10);    // R11: input 1 (West) to output 2 (NI)
    pl(router_id(1, 0)); pl(6'b00_10_01);    // R10: input 2 (NI) to output 1 (East)
    pl(ni_id(1, 0));     pl(6'b000_000);     // NI10 sends channel 0
    flush();
    wait_idle();
    t_setup = k - t0;
    n_paths++;
    // way back NI11 -> NI10
    hdr(OP_PATH); mask(32'd1 << 12);
    pl(ni_id(1, 0));     pl(6'b000_100);
    pl(router_id(1, 0)); pl(6'b00_01_10);
    pl(router_id(1, 1)); pl(6'b00_10_01);
    pl(ni_id(1, 1));     pl(6'b000_000);
    flush();
    n_paths++;
    // ---- multicast on channel 1: partial path first, then the full path ----
    hdr(OP_PATH); mask(32'd1 << 2);
    pl(ni_id(1, 1));     pl(6'b000_101);     // NI11 receives into channel 1
    pl(router_id(1, 1)); pl(6'b00_00_10);    // R11: input 0 (South) to output 2
    pl(router_id(0, 1)); pl(6'b00_01_00);    // R01: input 1 (West) to output 0 (North)
    flush();
    n_paths++;
    hdr(OP_PATH); mask(32'd1 << 1);
    pl(ni_id(0, 1));     pl(6'b000_101);     // NI01 receives into channel 1
    pl(router_id(0, 1)); pl(6'b00_01_10);    // R01: input 1 (West) to output 2 (East NI)
    pl(router_id(0, 0)); pl(6'b00_10_01);    // R00: input 2 (NI) to output 1
    pl(ni_id(0, 0));     pl(6'b000_001);     // NI00 sends channel 1
    flush();
    n_paths++;
    // ---- counters and flags ----
    wreg(ni_id(1, 0), REG_CREDITS, 0, 6'(RXQ));
    wreg(ni_id(1, 1), REG_CREDITS, 0, 6'(RXQ));
    wreg(ni_id(1, 0), REG_FLAGS, 0, 6'd1);
    wreg(ni_id(1, 1), REG_FLAGS, 0, 6'd1);
    wreg(ni_id(0, 0), REG_FLAGS, 1, 6'd3);   // multicast: no credit check
    flush();
    wait_idle();

    // ---- one word into the idle network: exact arrival cycle ----
    slow = 0;
    probe = 1;
    @(negedge clk);
    while (probe_push < 0) @(negedge clk);
    probe = 0;
    // it is in the queue from cycle probe_push+1; it leaves in the first send slot s
    // (1 or 4) with 2s >= probe_push+2, three hops later NI11 takes it in slot s+3, and
    // it is visible to the IP one cycle after that
    s = ((probe_push + 2 + 1) / 2);
    while ((s % NS) != 1 && (s % NS) != 4) s++;
    exp_arr = 2 * (s + 3) + 1;
    t = 0;
    while (probe_arrive < 0 && t < 200) begin @(negedge clk); t++; end
    check(probe_arrive == exp_arr,
          $sformatf("probe word arrived in cycle %0d, expected %0d", probe_arrive, exp_arr));

    // ---- traffic ----
    slow = 1;
    go_a = 1; go_b = 1; go_m = 1;
    repeat (40) @(negedge clk);
    // ---- a new connection on channel 2, NI01 -> NI10 over R01, R11, R10, set up while
    // the other connections carry traffic (their words keep being checked) ----
    busy0 = rcv_a + rcv_b + rcv_m1;
    hdr(OP_PATH); mask(32'd1 << 24);        // NI01 sends in slot 20, NI10 takes slot 24
    pl(ni_id(1, 0));     pl(6'b000_110);     // NI10 receives into channel 2
    pl(router_id(1, 0)); pl(6'b00_01_10);    // R10: input 1 (East) to output 2 (NI)
    pl(router_id(1, 1)); pl(6'b00_00_01);    // R11: input 0 (South) to output 1 (West)
    pl(router_id(0, 1)); pl(6'b00_10_00);    // R01: input 2 (NI) to output 0 (North)
    pl(ni_id(0, 1));     pl(6'b000_010);     // NI01 sends channel 2
    hdr(OP_PATH); mask(32'd1 << 20);        // way back: NI10 sends in slot 16
    pl(ni_id(0, 1));     pl(6'b000_110);
    pl(router_id(0, 1)); pl(6'b00_00_10);
    pl(router_id(1, 1)); pl(6'b00_01_00);
    pl(router_id(1, 0)); pl(6'b00_10_01);
    pl(ni_id(1, 0));     pl(6'b000_010);
    wreg(ni_id(0, 1), REG_CREDITS, 2, 6'(RXQ));
    wreg(ni_id(1, 0), REG_CREDITS, 2, 6'(RXQ));
    wreg(ni_id(0, 1), REG_FLAGS, 2, 6'd1);
    wreg(ni_id(1, 0), REG_FLAGS, 2, 6'd1);
    flush();
    wait_idle();
    n_paths += 2;
    n_live = rcv_a + rcv_b + rcv_m1 - busy0;
    check(n_live > 0, "traffic continued while a connection was set up");
    go_c = 1;
    t = 0;
    while ((rcv_a < N_A || rcv_b < N_B || rcv_m1 < N_M || rcv_m3 < N_M || rcv_c < N_C) &&
           t < 100000) begin
      @(negedge clk);
      t++;
      if (rcv_a > N_A / 2) slow = 0;
    end
    check(rcv_a == N_A, $sformatf("NI10 -> NI11 words %0d", rcv_a));
    check(rcv_b == N_B, $sformatf("NI11 -> NI10 words %0d", rcv_b));
    check(rcv_m1 == N_M && rcv_m3 == N_M, $sformatf("multicast words %0d %0d", rcv_m1, rcv_m3));
    check(rcv_c == N_C, $sformatf("NI01 -> NI10 words %0d", rcv_c));
    repeat (4 * 2 * NS) @(negedge clk);

    // ---- read back NI10's credit counter of channel 0 ----
    hdr(OP_READ); pl(ni_id(1, 0)); pl({REG_CREDITS, 4'd0});
    wreg(ni_id(1, 0), REG_FLAGS, 0, 6'd1);   // a following command waits for the answer
    flush();
    wait_idle();
    check(cfg_rsp_valid && cfg_rsp_data == 6'(RXQ),
          $sformatf("read-back credits %0d (valid %0d)", cfg_rsp_data, cfg_rsp_valid));
    cfg_rsp_ack = 1;
    @(negedge clk);
    cfg_rsp_ack = 0;

    // ---- bus configuration word for NI01 ----
    hdr(OP_BUS); pl(ni_id(0, 1));
    for (int j = 0; j < BUS_WORDS; j++) pl(6'(j + 10));
    flush();
    t = 0;
    while (!bus_valid[NI01] && t < 100) begin @(negedge clk); t++; end
    check(bus_valid[NI01] &&
          bus_word[NI01] == 37'({6'd10, 6'd11, 6'd12, 6'd13, 6'd14, 6'd15, 6'd16}),
          "bus configuration word");
    wait_idle();

    // ---- tear down NI10 -> NI11, then try to send ----
    hdr(OP_PATH); mask((32'd1 << 7) | (32'd1 << 4));
    pl(ni_id(1, 1));     pl(6'b000_111);
    pl(router_id(1, 1)); pl(6'b00_11_10);
    pl(router_id(1, 0)); pl(6'b00_11_01);
    pl(ni_id(1, 0));     pl(6'b000_011);
    flush();
    wait_idle();
    n_paths++;
    sent_late = 1;
    repeat (6 * 2 * NS) @(negedge clk);
    check(rcv_late == 0, $sformatf("%0d words passed after the tear-down", rcv_late));

    $display("first path set-up: %0d cycles from the first host write to idle", t_setup);
    $display("words delivered on running connections during the later set-up: %0d", n_live);
    $display("paths %0d, multicast %0d, credit stalls %0d, credit returns %0d, cool-down waits %0d, answer waits %0d",
             n_paths, n_mcast, n_stall, n_cred, n_cool, n_pend);
    check(n_paths > 0, "path set-up happened");
    check(n_mcast > 0, "multicast delivery happened");
    check(n_stall > 0, "credit stall happened");
    check(n_cred > 0, "credit return happened");
    check(n_cool > 0, "cool-down wait happened");
    check(n_pend > 0, "wait for a read answer happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
