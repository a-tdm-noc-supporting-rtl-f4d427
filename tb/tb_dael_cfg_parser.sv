// Testbench of the configuration submodule.
//
// Part 1 feeds the three 28-bit host words of the path set-up example (slot table of 8,
// path NI10-R10-R11-NI11, slots 7 and 4 at the destination) to parsers with the IDs of the
// four elements on the path and one that is not on it, and checks which slots and port
// words each one takes: NI11 slots {7,4} port 0x04, R11 {6,3} 0x06, R10 {5,2} 0x09,
// NI10 {4,1} 0x00, R00 nothing.
// Part 2 sends random path packets to a 32-slot parser and compares with a reference
// rotation computed here, and part 3 exercises write, read and bus-word commands.
module tb_dael_cfg_parser;
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

  cword_t cw;

  // ---------------- part 1: the example, 8 slots ----------------
  localparam int NE = 5;
  localparam logic [5:0] IDS [NE] = '{6'd35, 6'd3, 6'd2, 6'd34, 6'd0};
  logic       upd8   [NE];
  logic [7:0] mask8  [NE];
  logic [5:0] ports8 [NE];
  for (genvar e = 0; e < NE; e++) begin : g_e
    dael_cfg_parser #(.NSLOTS(8), .MY_ID(IDS[e])) u (
      .clk, .rst_n, .cw_in(cw), .path_upd(upd8[e]), .path_mask(mask8[e]),
      .path_ports(ports8[e]), .wr_valid(), .rd_valid(), .reg_sel(), .wr_value(),
      .bus_valid(), .bus_word()
    );
  end

  // ---------------- part 2/3: 32 slots ----------------
  logic        upd32, wr_v, rd_v, bus_v;
  logic [31:0] mask32;
  logic [5:0]  ports32, sel, val;
  logic [BUS_W-1:0] bw;
  logic [5:0]  id32 = 6'd17;
  dael_cfg_parser #(.NSLOTS(32), .MY_ID(6'd17)) u32 (
    .clk, .rst_n, .cw_in(cw), .path_upd(upd32), .path_mask(mask32), .path_ports(ports32),
    .wr_valid(wr_v), .rd_valid(rd_v), .reg_sel(sel), .wr_value(val),
    .bus_valid(bus_v), .bus_word(bw)
  );

  // observed path updates
  int         n_upd [NE];
  logic [7:0] got_mask [NE];
  logic [5:0] got_ports [NE];
  int         n32, n_wr, n_rd, n_bus;
  logic [31:0] got_m32;
  logic [5:0]  got_p32;
  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < NE; e++)
      if (upd8[e]) begin
        n_upd[e]++;
        got_mask[e]  = mask8[e];
        got_ports[e] = ports8[e];
      end
    if (upd32) begin n32++; got_m32 = mask32; got_p32 = ports32; end
    if (wr_v) n_wr++;
    if (rd_v) n_rd++;
    if (bus_v) n_bus++;
  end

  task automatic send(cword_t w);
    cw <= w;
    @(posedge clk);
  endtask

  task automatic send_host(logic [27:0] hw);
    for (int i = 0; i < 4; i++) send(cword_t'(hw >> (7 * i)));
  endtask

  logic [7:0] exp_mask [NE];
  logic [5:0] exp_ports [NE];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] m, r;
    int pos;
    cw = '0;
    for (int e = 0; e < NE; e++) n_upd[e] = 0;
    n32 = 0; n_wr = 0; n_rd = 0; n_bus = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(posedge clk);

    // part 1
    send_host(28'h0142104);
    send_host(28'h8d0e263);
    send_host(28'h818a4c2);
    cw <= '0;
    repeat (3) @(posedge clk);
    exp_mask  = '{8'h90, 8'h48, 8'h24, 8'h12, 8'h00};
    exp_ports = '{6'h04, 6'h06, 6'h09, 6'h00, 6'h00};
    for (int e = 0; e < 4; e++) begin
      check(n_upd[e] == 1, $sformatf("element %0d updates once (%0d)", e, n_upd[e]));
      check(got_mask[e] == exp_mask[e],
            $sformatf("element %0d slots %h expected %h", e, got_mask[e], exp_mask[e]));
      check(got_ports[e] == exp_ports[e],
            $sformatf("element %0d ports %h expected %h", e, got_ports[e], exp_ports[e]));
    end
    check(n_upd[4] == 0, "element off the path does not update");

    // part 2: random paths, the 32-slot parser sits at a random position
    for (int t = 0; t < 40; t++) begin
      m   = $urandom;
      pos = $urandom_range(0, 5);
      n32 = 0;
      send({1'b0, OP_PATH});
      for (int k = 5; k >= 0; k--) send({1'b1, 6'(m >> (6 * k))});
      if (t % 3 == 0) send('0);   // padding inside a packet
      for (int k = 0; k < 6; k++) begin
        send({1'b1, (k == pos) ? id32 : 6'(40 + k)});
        send({1'b1, 6'(k + 8)});
      end
      cw <= '0;
      repeat (2) @(posedge clk);
      r = m;
      for (int k = 0; k < pos; k++) r = {r[0], r[31:1]};
      check(n32 == 1, "32-slot parser updates once");
      check(got_m32 == r, $sformatf("rotated mask %h expected %h", got_m32, r));
      check(got_p32 == 6'(pos + 8), "port word of the matching pair");
    end

    // part 3: write / read / bus
    send({1'b0, OP_WRITE}); send({1'b1, 6'd16}); send({1'b1, 6'h21}); send({1'b1, 6'd9});
    send({1'b0, OP_WRITE}); send({1'b1, id32});  send({1'b1, 6'h12}); send({1'b1, 6'd33});
    cw <= '0;
    repeat (2) @(posedge clk);
    check(n_wr == 1, "only the addressed element writes");
    check(sel == 6'h12 && val == 6'd33, "write select and value");
    send({1'b0, OP_READ}); send({1'b1, id32}); send({1'b1, 6'h03});
    cw <= '0;
    repeat (2) @(posedge clk);
    check(n_rd == 1 && sel == 6'h03, "read request decoded");
    send({1'b0, OP_BUS}); send({1'b1, id32});
    for (int k = 6; k >= 0; k--) send({1'b1, 6'(k + 1)});
    cw <= '0;
    repeat (2) @(posedge clk);
    check(n_bus == 1, "bus word delivered");
    check(bw == 37'({6'd7, 6'd6, 6'd5, 6'd4, 6'd3, 6'd2, 6'd1}), $sformatf("bus word %h", bw));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
