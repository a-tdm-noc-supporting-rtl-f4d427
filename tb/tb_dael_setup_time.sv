// Connection set-up time on the 2x2 mesh at its default size (32 slots, cool-down 9).
//
// For paths of 3, 4 and 5 hops (NI00 to NI01, NI11 and NI10, the longest path this mesh
// has) the host sets up one connection: the forward path and the way back, written as one
// stream of host words. The time from the first configuration word leaving the
// configuration module to the first cycle in which a following header could be on the
// link (the end of the second cool-down) must equal the number of
// configuration words plus both cool-downs: per path one header, 6 slot-mask words and two
// words per element (hops+1 elements), so 4*hops + 18 words, plus 2*9 cycles, i.e.
// 4*hops + 36. Each extra hop costs 4 cycles. One word is then sent each way to show the
// connection works.
module tb_dael_setup_time;
  import dael_pkg::*;
  localparam int NCH = 3, NS = 32, COOL = 9;

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

  int k = 0;
  always @(posedge clk) if (rst_n) k <= k + 1;

  cword_t pkt [$];
  int     nwords;
  task automatic hdr(cfg_op_e op); pkt.push_back({1'b0, op}); endtask
  task automatic pl(logic [5:0] v); pkt.push_back({1'b1, v}); endtask
  task automatic mask(logic [31:0] m);
    for (int j = 5; j >= 0; j--) pl(6'(m >> (6 * j)));
  endtask
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

  // routers as (row, col); port 0 vertical neighbour, 1 horizontal, 2 local NI
  function automatic int toward(int ra, int ca, int rb, int cb);
    return (ca == cb) ? 0 : 1;
  endfunction

  // one path from the NI at routers[0] to the NI at routers[n-1], listed destination first
  task automatic path(int rr [], int rc [], int dslot, int ch);
    int n;
    n = rr.size();
    hdr(OP_PATH);
    mask(32'd1 << dslot);
    pl(ni_id(rr[n-1], rc[n-1])); pl(6'(4 + ch));
    for (int i = n - 1; i >= 0; i--) begin
      int ip, op;
      ip = (i == 0) ? 2 : toward(rr[i], rc[i], rr[i-1], rc[i-1]);
      op = (i == n - 1) ? 2 : toward(rr[i], rc[i], rr[i+1], rc[i+1]);
      pl(router_id(rr[i], rc[i])); pl({2'b00, 2'(ip), 2'(op)});
    end
    pl(ni_id(rr[0], rc[0])); pl(6'(ch));
  endtask

  int t_first, t_end;
  bit watch;
  always @(negedge clk) if (rst_n && watch) begin
    if (t_first < 0 && dut.root_cfg != '0) t_first = k;
    if (t_first >= 0 && t_end < 0 && !cfg_busy) t_end = k + 1;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rr [], rc [], rev_r [], rev_c [], n, d, ch, dst, meas [6];
    for (int a = 0; a < 4; a++)
      for (int c = 0; c < NCH; c++) begin
        tx_valid[a][c] = 0; tx_data[a][c] = '0; rx_ready[a][c] = 1;
      end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    for (int h = 3; h <= 5; h++) begin
      // router chains: R00-R01, R00-R01-R11, R00-R01-R11-R10
      n = h - 1;
      rr = new[n]; rc = new[n];
      rr[0] = 0; rc[0] = 0;
      if (n > 1) begin rr[1] = 0; rc[1] = 1; end
      if (n > 2) begin rr[2] = 1; rc[2] = 1; end
      if (n > 3) begin rr[3] = 1; rc[3] = 0; end
      rev_r = new[n]; rev_c = new[n];
      for (int i = 0; i < n; i++) begin rev_r[i] = rr[n-1-i]; rev_c[i] = rc[n-1-i]; end
      dst = 2 * rr[n-1] + rc[n-1];
      ch = h - 3;            // a channel of its own for each test
      d = 8 * (h - 3) + 6;   // forward destination slot; way back 3 slots later
      path(rr, rc, d, ch);
      path(rev_r, rev_c, d + 3, ch);
      nwords = pkt.size();
      t_first = -1; t_end = -1; watch = 1;
      flush();
      while (t_end < 0) @(negedge clk);
      watch = 0;
      meas[h] = t_end - t_first;
      $display("%0d hops: %0d configuration words, set-up %0d cycles", h, nwords, meas[h]);
      check(nwords == 4 * h + 18, $sformatf("%0d hops: word count %0d", h, nwords));
      check(meas[h] == nwords + 2 * COOL,
            $sformatf("%0d hops: set-up %0d cycles, expected %0d", h, meas[h], nwords + 2 * COOL));
      repeat (16) @(negedge clk);

      // enable both ends without flow control and send one word each way
      hdr(OP_WRITE); pl(ni_id(0, 0)); pl({REG_FLAGS, 4'(ch)}); pl(6'd3);
      hdr(OP_WRITE); pl(ni_id(rr[n-1], rc[n-1])); pl({REG_FLAGS, 4'(ch)}); pl(6'd3);
      flush();
      repeat (20) @(negedge clk);
      tx_valid[0][ch] = 1; tx_data[0][ch] = 32'(h * 16 + 1);
      tx_valid[dst][ch] = 1; tx_data[dst][ch] = 32'(h * 16 + 2);
      @(negedge clk);
      tx_valid[0][ch] = 0; tx_valid[dst][ch] = 0;
      rx_ready[0][ch] = 0; rx_ready[dst][ch] = 0;
      repeat (3 * 2 * NS) @(negedge clk);
      check(rx_valid[dst][ch] && rx_data[dst][ch] == 32'(h * 16 + 1), $sformatf("%0d hops: forward word", h));
      check(rx_valid[0][ch] && rx_data[0][ch] == 32'(h * 16 + 2), $sformatf("%0d hops: word back", h));
      rx_ready[0][ch] = 1; rx_ready[dst][ch] = 1;
      @(negedge clk);
      // disable again so the next test's paths are the only traffic
      hdr(OP_WRITE); pl(ni_id(0, 0)); pl({REG_FLAGS, 4'(ch)}); pl(6'd0);
      hdr(OP_WRITE); pl(ni_id(rr[n-1], rc[n-1])); pl({REG_FLAGS, 4'(ch)}); pl(6'd0);
      flush();
      repeat (20) @(negedge clk);
    end
    check(meas[4] - meas[3] == 4 && meas[5] - meas[4] == 4, "four cycles per extra hop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
