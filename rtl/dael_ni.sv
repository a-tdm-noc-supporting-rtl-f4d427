// Network interface: connects NCH channel streams of the IP side to one network link.
//
// Each channel has a transmit queue (words from the IP toward the network) and a receive
// queue (words from the network toward the IP). One slot table governs both directions:
// per slot it names the channel that may send (or none) and the channel whose receive
// queue takes the arriving words (or none).
//
// End-to-end flow control, as originally described, uses two counters per channel.
// "credits" is the free space in the remote receive queue: it drops by one for every word
// sent and grows by the credit values that come back. "cback" counts words the local IP
// has taken from the receive queue and that have not yet been reported to the remote end.
// Connections are bidirectional and channel c of one NI talks to the same channel of its
// peer, so the credits for the words sent on channel c arrive on the credit wires of the
// words received for channel c. In every slot owned by a channel for sending, the NI sends
// the channel's cback value (up to 63) on the 3 credit wires, most significant half in the
// first word of the slot, and subtracts it. A channel sends a word when it is enabled, its
// transmit queue is not empty and credits are left; flag bit 1 disables the credit check
// (for multicast, where a single counter cannot track several receivers).
//
// Timing: a word leaves on link_out in the slot the table names for sending. Arriving
// words pass two registers (link and NI stage, the same two cycles as a router hop), so a
// word that a router puts on the link in slot s is taken into the receive queue in slot
// s+1, and the receive entry of slot s+1 selects the queue.
//
// Configuration: the configuration word from the parent passes one register into the
// configuration submodule (the NI is a leaf of the tree). A path word is {dir, channel}:
// bit port_w(NPORTS) set selects the receive entry, clear the send entry; the all-ones
// channel code clears the entry (tear-down). OP_WRITE / OP_READ reach the counters and
// flags (read-back answers {1, value} on the reverse link two cycles after the command);
// OP_BUS words leave as bus_word with a one-cycle bus_valid. Flags reset to 0 (disabled)
// and counters to 0; the host sets them. These encodings are this design's own.
module dael_ni
  import dael_pkg::*;
#(
  parameter int              NCH       = 3,
  parameter int              NSLOTS    = 32,
  parameter int              NPORTS    = 3,   // router arity: sets the port field width
  parameter int              TXQ_DEPTH = 8,
  parameter int              RXQ_DEPTH = 8,
  parameter logic [PL_W-1:0] MY_ID     = 6'd32
) (
  input  logic              clk,
  input  logic              rst_n,
  // IP side, one stream per channel
  input  logic              tx_valid [NCH],
  output logic              tx_ready [NCH],
  input  logic [DATA_W-1:0] tx_data  [NCH],
  output logic              rx_valid [NCH],
  input  logic              rx_ready [NCH],
  output logic [DATA_W-1:0] rx_data  [NCH],
  // network side
  output link_t             link_out,
  input  link_t             link_in,
  // configuration tree
  input  cword_t            cfg_in,
  output cword_t            rsp_out,
  // toward the shell of the adjacent bus
  output logic              bus_valid,
  output logic [BUS_W-1:0]  bus_word
);
  localparam int PW = port_w(NPORTS);
  localparam int SW = $clog2(NSLOTS);
  localparam logic [PW-1:0] NOCH = '1;

  // ---------------- TDM wheel ----------------
  logic [SW-1:0] slot, next_slot;
  logic          word, next_word;
  dael_slot_counter #(.NSLOTS(NSLOTS)) u_cnt (
    .clk, .rst_n, .slot, .word, .next_slot, .next_word
  );

  // ---------------- configuration submodule ----------------
  cword_t            cfg_q;
  logic              path_upd, wr_valid, rd_valid;
  logic [NSLOTS-1:0] path_mask;
  logic [PL_W-1:0]   path_ports, reg_sel, wr_value;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cfg_q <= '0;
    else        cfg_q <= cfg_in;

  dael_cfg_parser #(.NSLOTS(NSLOTS), .MY_ID(MY_ID)) u_cfg (
    .clk, .rst_n, .cw_in(cfg_q),
    .path_upd, .path_mask, .path_ports,
    .wr_valid, .rd_valid, .reg_sel, .wr_value,
    .bus_valid, .bus_word
  );

  wire [1:0]    sel_reg = reg_sel[5:4];
  wire [3:0]    sel_ch  = reg_sel[3:0];
  localparam int CI_W = (NCH > 1) ? $clog2(NCH) : 1;
  wire [CI_W-1:0] rd_ch = sel_ch[CI_W-1:0];   // valid when sel_ch < NCH
  wire          upd_rx  = path_ports[PW];
  wire [PW-1:0] upd_ch  = path_ports[PW-1:0];

  // ---------------- slot table ----------------
  logic [PW-1:0] tx_tab_q [NSLOTS];
  logic [PW-1:0] rx_tab_q [NSLOTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSLOTS; s++) begin
        tx_tab_q[s] <= NOCH;
        rx_tab_q[s] <= NOCH;
      end
    end else if (path_upd) begin
      for (int s = 0; s < NSLOTS; s++)
        if (path_mask[s]) begin
          if (upd_rx) rx_tab_q[s] <= upd_ch;
          else        tx_tab_q[s] <= upd_ch;
        end
    end
  end

  // ---------------- queues ----------------
  logic              txq_empty [NCH];
  logic              txq_full  [NCH];
  logic [DATA_W-1:0] txq_head  [NCH];
  logic              txq_pop   [NCH];
  logic              rxq_empty [NCH];
  logic              rxq_full  [NCH];
  logic              rxq_push  [NCH];
  logic              rxq_pop   [NCH];

  link_t in_q1, in_q2;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    dael_fifo #(.W(DATA_W), .DEPTH(TXQ_DEPTH)) u_txq (
      .clk, .rst_n, .push(tx_valid[c] && !txq_full[c]), .wr_data(tx_data[c]),
      .pop(txq_pop[c]), .rd_data(txq_head[c]), .empty(txq_empty[c]), .full(txq_full[c]),
      .count()
    );
    dael_fifo #(.W(DATA_W), .DEPTH(RXQ_DEPTH)) u_rxq (
      .clk, .rst_n, .push(rxq_push[c]), .wr_data(in_q2.data),
      .pop(rxq_pop[c]), .rd_data(rx_data[c]), .empty(rxq_empty[c]), .full(rxq_full[c]),
      .count()
    );
    assign tx_ready[c] = !txq_full[c];
    assign rx_valid[c] = !rxq_empty[c];
    assign rxq_pop[c]  = rx_ready[c] && !rxq_empty[c];
  end

  // ---------------- counters and flags ----------------
  logic [CNT_W-1:0] credits_q [NCH];
  logic [CNT_W-1:0] cback_q   [NCH];
  logic [1:0]       flags_q   [NCH];   // [0] channel enabled, [1] credit check off
  logic [CNT_W-1:0] cb_snap_q;         // credit value being sent in the current slot
  logic [CRED_W-1:0] cr_hi_q;          // first half of a credit value being received

  // send side: the entry of the slot in which the registered word will be on the link
  logic [PW-1:0] tx_ch;
  logic          tx_own, tx_go;
  assign tx_ch  = tx_tab_q[next_slot];
  assign tx_own = int'(tx_ch) < NCH;
  always_comb begin
    tx_go = 1'b0;
    if (tx_own)
      tx_go = flags_q[tx_ch][0] && !txq_empty[tx_ch] &&
              (flags_q[tx_ch][1] || credits_q[tx_ch] != '0);
    for (int c = 0; c < NCH; c++) txq_pop[c] = tx_go && (int'(tx_ch) == c);
  end

  // receive side: the entry of the slot the word in the second register belongs to
  logic [PW-1:0] rx_ch;
  logic          rx_own;
  assign rx_ch  = rx_tab_q[slot];
  assign rx_own = int'(rx_ch) < NCH;
  always_comb
    for (int c = 0; c < NCH; c++) rxq_push[c] = rx_own && in_q2.valid && (int'(rx_ch) == c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        credits_q[c] <= '0;
        cback_q[c]   <= '0;
        flags_q[c]   <= '0;
      end
      cb_snap_q <= '0;
      cr_hi_q   <= '0;
      link_out  <= '0;
      in_q1     <= '0;
      in_q2     <= '0;
    end else begin
      in_q1 <= link_in;
      in_q2 <= in_q1;

      // outgoing word and credit slice
      link_out <= '0;
      if (tx_own) begin
        link_out.valid <= tx_go;
        link_out.data  <= tx_go ? txq_head[tx_ch] : '0;
        if (!next_word) begin
          cb_snap_q       <= cback_q[tx_ch];
          link_out.credit <= cback_q[tx_ch][CNT_W-1 -: CRED_W];
        end else begin
          link_out.credit <= cb_snap_q[CRED_W-1:0];
        end
      end
      if (!word) cr_hi_q <= in_q2.credit;

      for (int c = 0; c < NCH; c++) begin
        logic [CNT_W-1:0] cr, cb;
        cr = credits_q[c];
        cb = cback_q[c];
        if (txq_pop[c]) cr = cr - 1'b1;
        if (rx_own && int'(rx_ch) == c && word) cr = cr + {cr_hi_q, in_q2.credit};
        if (tx_own && int'(tx_ch) == c && !next_word) cb = cb - cback_q[c];
        if (rxq_pop[c]) cb = cb + 1'b1;
        if (wr_valid && int'(sel_ch) == c) begin
          if (sel_reg == REG_CREDITS) cr = wr_value[CNT_W-1:0];
          if (sel_reg == REG_CBACK)   cb = wr_value[CNT_W-1:0];
          if (sel_reg == REG_FLAGS)   flags_q[c] <= wr_value[1:0];
        end
        credits_q[c] <= cr;
        cback_q[c]   <= cb;
      end
    end
  end

  // ---------------- read-back over the reverse configuration tree ----------------
  cword_t rsp_q1, rsp_q2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_q1 <= '0;
      rsp_q2 <= '0;
    end else begin
      rsp_q1 <= '0;
      if (rd_valid && int'(sel_ch) < NCH) begin
        unique case (sel_reg)
          REG_CREDITS: rsp_q1 <= {1'b1, PL_W'(credits_q[rd_ch])};
          REG_CBACK:   rsp_q1 <= {1'b1, PL_W'(cback_q[rd_ch])};
          REG_FLAGS:   rsp_q1 <= {1'b1, PL_W'(flags_q[rd_ch])};
          default:     rsp_q1 <= {1'b1, PL_W'(0)};
        endcase
      end
      rsp_q2 <= rsp_q1;
    end
  end
  assign rsp_out = rsp_q2;

  // receive queues must never overflow while credits are in use
  for (genvar c = 0; c < NCH; c++) begin : g_chk
    always_ff @(posedge clk)
      if (rst_n && rxq_push[c] && !flags_q[c][1])
        assert (!rxq_full[c]) else $error("receive queue %0d overflow", c);
  end

  initial assert (NCH < (1 << PW) && PW + 1 <= PL_W && NCH <= 16)
    else $fatal(1, "channel field does not fit a configuration word");
  initial assert (RXQ_DEPTH < (1 << CNT_W)) else $fatal(1, "queue deeper than credit range");
endmodule
