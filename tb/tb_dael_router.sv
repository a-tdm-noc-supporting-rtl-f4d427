// Testbench of the router, at its default size (3 ports, 32 slots).
//
// The router is configured through its configuration input with path packets, including
// one where it is the second element of the list (so it must take the rotated slot mask),
// a multicast entry (two outputs fed from one input) and a tear-down. Random words are
// driven on all inputs every cycle; each output is compared with a reference model kept
// here: output o in cycle k carries the input chosen for slot (k/2) mod 32 two cycles
// earlier, or nothing. The configuration tree path is checked for its two-cycle delay
// forward and for the two-cycle OR-merge on the reverse path.
module tb_dael_router;
  import dael_pkg::*;
  localparam int NP = 3, NS = 32;
  localparam logic [5:0] ID = 6'd3;

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

  link_t  in_link [NP], out_link [NP];
  cword_t cfg_in, cfg_out [2], rsp_in [2], rsp_out;

  dael_router #(.MY_ID(ID)) dut (.*);

  // reference slot table: input feeding each output, NP = none
  int ref_tab [NS][NP];
  link_t hist [int];
  cword_t cfg_hist [int], rsp_hist [int];
  int k = 0;
  bit data_on = 0, quiet = 0;
  int n_mcast = 0, n_fwd = 0;

  always @(posedge clk) if (rst_n) k <= k + 1;

  task automatic cw(cword_t w);
    cfg_in <= w;
    @(posedge clk);
  endtask

  // path packet: mask for this router's position after `nbefore` other pairs
  task automatic path(logic [31:0] mask, int nbefore, int in_p, int out_p);
    quiet = 1;
    cw({1'b0, OP_PATH});
    for (int j = 5; j >= 0; j--) cw({1'b1, 6'(mask >> (6 * j))});
    for (int j = 0; j < nbefore; j++) begin
      cw({1'b1, 6'd50 + 6'(j)});
      cw({1'b1, 6'h3f});
    end
    cw({1'b1, ID});
    cw({1'b1, 2'b00, 2'(in_p), 2'(out_p)});
    cfg_in <= '0;
    repeat (4) @(posedge clk);
    quiet = 0;
  endtask

  // drive random inputs and check outputs, on the falling edge
  always @(negedge clk) if (rst_n) begin
    link_t l [NP];
    cword_t r0, r1;
    for (int p = 0; p < NP; p++) begin
      l[p].valid  = data_on ? 1'($urandom) : 1'b0;
      l[p].data   = $urandom;
      l[p].credit = 3'($urandom);
      in_link[p] <= l[p];
      hist[k * NP + p] = l[p];
    end
    r0 = cword_t'($urandom) & 7'h41;
    r1 = cword_t'($urandom) & 7'h41;
    rsp_in[0] <= r0;
    rsp_in[1] <= r1;
    cfg_hist[k] = cfg_in;
    rsp_hist[k] = r0 | r1;
    if (k >= 3) begin
      int s, src, users [NP];
      s = (k / 2) % NS;
      for (int p = 0; p < NP; p++) users[p] = 0;
      for (int o = 0; o < NP; o++) begin
        src = ref_tab[s][o];
        if (quiet) begin
          // the table is being rewritten
        end else if (src < NP) begin
          users[src]++;
          check(out_link[o] == hist[(k - 2) * NP + src],
                $sformatf("k=%0d slot %0d output %0d from input %0d", k, s, o, src));
          if (data_on && out_link[o].valid) n_fwd++;
        end else begin
          check(out_link[o] == '0, $sformatf("k=%0d output %0d idle", k, o));
        end
      end
      for (int p = 0; p < NP; p++) if (data_on && users[p] > 1) n_mcast++;
      check(cfg_out[0] == cfg_hist[k - 2] && cfg_out[1] == cfg_hist[k - 2],
            "configuration forward delay");
      check(rsp_out == rsp_hist[k - 2], "configuration reverse merge");
    end
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_in = '0;
    for (int p = 0; p < NP; p++) in_link[p] = '0;
    rsp_in[0] = '0; rsp_in[1] = '0;
    for (int s = 0; s < NS; s++) for (int o = 0; o < NP; o++) ref_tab[s][o] = NP;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // output 2 from input 0 in slots 3 and 9 (router first in the list)
    path(32'h0000_0208, 0, 0, 2);
    ref_tab[3][2] = 0; ref_tab[9][2] = 0;
    // multicast: outputs 0 and 1 from input 2 in slot 5, router second in the list
    path(32'h0000_0040, 1, 2, 0);
    path(32'h0000_0040, 1, 2, 1);
    ref_tab[5][0] = 2; ref_tab[5][1] = 2;
    // output 1 from input 0 in slots 31 and 0, router third in the list
    path(32'h0000_0006, 2, 0, 1);
    ref_tab[31][1] = 0; ref_tab[0][1] = 0;
    repeat (4) @(posedge clk);
    data_on = 1;
    repeat (4 * 2 * NS) @(posedge clk);
    // tear down output 2 in slot 9
    path(32'h0000_0200, 0, 3, 2);
    ref_tab[9][2] = NP;
    repeat (4) @(posedge clk);
    repeat (2 * 2 * NS) @(posedge clk);
    data_on = 0;
    check(n_mcast > 0, "multicast happened");
    check(n_fwd > 0, "words forwarded");
    $display("forwarded %0d words, %0d multicast cycles", n_fwd, n_mcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
