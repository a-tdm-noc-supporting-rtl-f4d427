// TDM router with a distributed slot table.
//
// The router forwards data "blindly": for every output port, the slot table says which
// input port feeds it in each TDM slot, or that it stays idle. Several outputs may name
// the same input, which is how multicast trees are built. There is no header, no
// arbitration and no link-level flow control, since the global schedule is free of
// contention.
//
// Timing, as the original description gives it: two cycles per hop, one for the link (input register)
// and one for the crossbar (output register). A word presented on an input during slot s
// leaves on the chosen output during slot s+1, in the same word position; the table entry
// used is the one of slot s+1.
//
// The router is also a node of the configuration tree: the configuration word from the
// parent passes two registers and is copied to all CFG_FANOUT children; responses from the
// children are merged by OR (only one request is active at a time, so at most one child
// answers) and also pass two registers on the way up. The configuration submodule updates
// the slot table from path set-up packets: a port word holds {input, output} with
// port_w(NPORTS) bits each, the all-ones input code meaning "no input" (tear-down).
// Slot table entries reset to "no input". The whole set of marked entries is written in
// one cycle.
module dael_router
  import dael_pkg::*;
#(
  parameter int              NPORTS     = 3,
  parameter int              NSLOTS     = 32,
  parameter int              CFG_FANOUT = 2,
  parameter logic [PL_W-1:0] MY_ID      = '0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  link_t  in_link  [NPORTS],
  output link_t  out_link [NPORTS],
  input  cword_t cfg_in,
  output cword_t cfg_out  [CFG_FANOUT],
  input  cword_t rsp_in   [CFG_FANOUT],
  output cword_t rsp_out
);
  localparam int PW = port_w(NPORTS);
  localparam int SW = $clog2(NSLOTS);
  localparam logic [PW-1:0] NOPORT = '1;

  // ---------------- TDM wheel ----------------
  logic [SW-1:0] slot, next_slot;
  logic          word, next_word;
  dael_slot_counter #(.NSLOTS(NSLOTS)) u_cnt (
    .clk, .rst_n, .slot, .word, .next_slot, .next_word
  );

  // ---------------- slot table ----------------
  logic [PW-1:0] tab_q [NSLOTS][NPORTS];

  logic              path_upd;
  logic [NSLOTS-1:0] path_mask;
  logic [PL_W-1:0]   path_ports;
  logic [PW-1:0]     upd_in, upd_out;
  assign upd_in  = path_ports[2*PW-1:PW];
  assign upd_out = path_ports[PW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSLOTS; s++)
        for (int o = 0; o < NPORTS; o++)
          tab_q[s][o] <= NOPORT;
    end else if (path_upd && int'(upd_out) < NPORTS) begin
      for (int s = 0; s < NSLOTS; s++)
        if (path_mask[s]) tab_q[s][upd_out] <= upd_in;
    end
  end

  // ---------------- datapath: input register, crossbar, output register ----------------
  link_t in_q  [NPORTS];
  link_t out_q [NPORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        in_q[p]  <= '0;
        out_q[p] <= '0;
      end
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        in_q[p] <= in_link[p];
        if (int'(tab_q[next_slot][p]) < NPORTS) out_q[p] <= in_q[tab_q[next_slot][p]];
        else                                     out_q[p] <= '0;
      end
    end
  end
  assign out_link = out_q;

  // ---------------- configuration tree node ----------------
  cword_t cfg_q1, cfg_q2, rsp_q1, rsp_q2, rsp_or;

  always_comb begin
    rsp_or = '0;
    for (int c = 0; c < CFG_FANOUT; c++) rsp_or |= rsp_in[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q1 <= '0;
      cfg_q2 <= '0;
      rsp_q1 <= '0;
      rsp_q2 <= '0;
    end else begin
      cfg_q1 <= cfg_in;
      cfg_q2 <= cfg_q1;
      rsp_q1 <= rsp_or;
      rsp_q2 <= rsp_q1;
    end
  end
  always_comb for (int c = 0; c < CFG_FANOUT; c++) cfg_out[c] = cfg_q2;
  assign rsp_out = rsp_q2;

  dael_cfg_parser #(.NSLOTS(NSLOTS), .MY_ID(MY_ID)) u_cfg (
    .clk, .rst_n, .cw_in(cfg_q1),
    .path_upd, .path_mask, .path_ports,
    .wr_valid(), .rd_valid(), .reg_sel(), .wr_value(),
    .bus_valid(), .bus_word()
  );

  initial assert (2 * PW <= PL_W) else $fatal(1, "port pair does not fit a configuration word");
endmodule
