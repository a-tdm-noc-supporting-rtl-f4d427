// Configuration module: the host's single access point to the configuration tree.
//
// The host writes 32-bit data words; the low 4*CW_W = 28 bits of each hold four
// configuration words, which are sent one per cycle on cfg_out, the least significant
// first (this order reproduces the example words of the published path set-up example).
// All-zero words are padding and go out as idle cycles. A small queue of HOSTQ words lets
// the host write ahead.
//
// Two rules of the original description are enforced here. After a path set-up packet a cool-down of
// COOLDOWN cycles, counted from its last non-padding word, must pass before the next
// header is sent, so the routers and NIs can finish updating their slot tables. And only
// one request is active at a time, since responses share the reverse tree without
// arbitration: after a read request the next header waits until the answer has come back
// (or RSP_TIMEOUT cycles have passed, this design's own safeguard against a request to a
// non-existent element). An answer is a reverse-tree word with its flag bit set; its
// payload is held in rsp_data with rsp_valid high until the host pulses rsp_ack.
// busy is high while words are queued, being sent, or a cool-down or answer is pending.
module dael_cfg_module
  import dael_pkg::*;
#(
  parameter int COOLDOWN    = 9,
  parameter int HOSTQ       = 4,
  parameter int RSP_TIMEOUT = 63
) (
  input  logic            clk,
  input  logic            rst_n,
  // host side
  input  logic            wr_valid,
  output logic            wr_ready,
  input  logic [31:0]     wr_data,
  output logic            busy,
  output logic            rsp_valid,
  output logic [PL_W-1:0] rsp_data,
  input  logic            rsp_ack,
  // configuration tree root
  output cword_t          cfg_out,
  input  cword_t          rsp_in
);
  localparam int HW = 4 * CW_W;     // configuration bits per host word
  localparam int CD_W = $clog2(COOLDOWN + 2);
  localparam int TO_W = $clog2(RSP_TIMEOUT + 2);

  logic          q_empty, q_full;
  logic [HW-1:0] q_head;
  logic          q_pop;

  dael_fifo #(.W(HW), .DEPTH(HOSTQ)) u_q (
    .clk, .rst_n, .push(wr_valid && !q_full), .wr_data(wr_data[HW-1:0]),
    .pop(q_pop), .rd_data(q_head), .empty(q_empty), .full(q_full), .count()
  );
  assign wr_ready = !q_full;

  logic [HW-1:0]   sh_q;       // host word being serialized
  logic [2:0]      left_q;     // configuration words left in sh_q
  cfg_op_e         op_q;       // operation of the packet being sent
  logic [CD_W-1:0] cool_q;
  logic            pend_q;     // a read answer is awaited
  logic [TO_W-1:0] to_q;

  cword_t cand;
  logic   cand_hdr, stall, send;
  assign cand     = sh_q[CW_W-1:0];
  assign cand_hdr = !cand[CW_W-1] && (cand[PL_W-1:0] != '0);
  assign stall    = cand_hdr && (cool_q != '0 || pend_q);
  assign send     = (left_q != '0) && !stall;
  assign q_pop    = !q_empty && (left_q == '0 || (left_q == 3'd1 && send));

  wire rsp_here = rsp_in[CW_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q      <= '0;
      left_q    <= '0;
      op_q      <= OP_NONE;
      cool_q    <= '0;
      pend_q    <= 1'b0;
      to_q      <= '0;
      cfg_out   <= '0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      cfg_out <= '0;
      if (cool_q != '0) cool_q <= cool_q - 1'b1;

      if (send) begin
        cfg_out <= cand;
        sh_q    <= sh_q >> CW_W;
        left_q  <= left_q - 1'b1;
        if (cand_hdr) begin
          op_q <= cfg_op_e'(cand[PL_W-1:0]);
          if (cfg_op_e'(cand[PL_W-1:0]) == OP_PATH) cool_q <= CD_W'(COOLDOWN);
          if (cfg_op_e'(cand[PL_W-1:0]) == OP_READ) begin
            pend_q <= 1'b1;
            to_q   <= TO_W'(RSP_TIMEOUT);
          end
        end else if (cand != '0 && op_q == OP_PATH) begin
          cool_q <= CD_W'(COOLDOWN);
        end
      end
      if (q_pop) begin
        sh_q   <= q_head;
        left_q <= 3'd4;
      end

      if (pend_q && !(send && cand_hdr)) begin
        if (rsp_here || to_q == '0) pend_q <= 1'b0;
        else                        to_q   <= to_q - 1'b1;
      end
      if (rsp_here) begin
        rsp_valid <= 1'b1;
        rsp_data  <= rsp_in[PL_W-1:0];
      end else if (rsp_ack) begin
        rsp_valid <= 1'b0;
      end
    end
  end

  assign busy = !q_empty || left_q != '0 || cool_q != '0 || pend_q;
endmodule
