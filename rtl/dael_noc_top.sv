// A complete 2x2 mesh of the TDM network: four routers, four NIs, the configuration
// module of the host and the configuration tree that links them.
//
// Layout (row, column), as in the published platform and path set-up examples:
//
//     NI10 - R10 - R11 - NI11        row 1
//             |     |
//     NI00 - R00 - R01 - NI01        row 0
//
// Router port numbering follows the path set-up example: port 0 is the vertical
// neighbour, port 1 the horizontal neighbour and port 2 the local NI. Element IDs are
// 2*row+col for routers and 32+2*row+col for NIs, which reproduces the IDs of the example
// configuration words. The configuration tree is the one drawn in the example:
// cfg -> R00 -> {NI00, R01}, R01 -> {NI01, R11}, R11 -> {NI11, R10}, R10 -> {NI10}; every
// hop of it adds two cycles forward and two back.
//
// Interface: the host port of the configuration module, and for NI number k = 2*row+col
// its NCH transmit and receive channel streams and its bus configuration output. The
// protocol shells that turn bus transactions into channel streams are outside.
module dael_noc_top
  import dael_pkg::*;
#(
  parameter int NCH       = 3,
  parameter int NSLOTS    = 32,
  parameter int TXQ_DEPTH = 8,
  parameter int RXQ_DEPTH = 8,
  parameter int COOLDOWN  = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  // host access to the configuration module
  input  logic              cfg_wr_valid,
  output logic              cfg_wr_ready,
  input  logic [31:0]       cfg_wr_data,
  output logic              cfg_busy,
  output logic              cfg_rsp_valid,
  output logic [PL_W-1:0]   cfg_rsp_data,
  input  logic              cfg_rsp_ack,
  // channel streams of the four NIs
  input  logic              tx_valid [4][NCH],
  output logic              tx_ready [4][NCH],
  input  logic [DATA_W-1:0] tx_data  [4][NCH],
  output logic              rx_valid [4][NCH],
  input  logic              rx_ready [4][NCH],
  output logic [DATA_W-1:0] rx_data  [4][NCH],
  // bus configuration words of the four NIs
  output logic              bus_valid [4],
  output logic [BUS_W-1:0]  bus_word  [4]
);
  localparam int NPORTS = 3;

  link_t  r_in  [2][2][NPORTS];
  link_t  r_out [2][2][NPORTS];
  link_t  ni_out [2][2];
  cword_t r_cfg_in [2][2];
  cword_t r_cfg_out [2][2][2];
  cword_t r_rsp_in [2][2][2];
  cword_t r_rsp_out [2][2];
  cword_t ni_cfg_in [2][2];
  cword_t ni_rsp_out [2][2];
  cword_t root_cfg, root_rsp;

  // ---------------- data links ----------------
  for (genvar r = 0; r < 2; r++) begin : g_row
    for (genvar c = 0; c < 2; c++) begin : g_col
      assign r_in[r][c][0] = r_out[1-r][c][0];
      assign r_in[r][c][1] = r_out[r][1-c][1];
      assign r_in[r][c][2] = ni_out[r][c];

      dael_router #(
        .NPORTS(NPORTS), .NSLOTS(NSLOTS), .CFG_FANOUT(2), .MY_ID(router_id(r, c))
      ) u_r (
        .clk, .rst_n,
        .in_link(r_in[r][c]), .out_link(r_out[r][c]),
        .cfg_in(r_cfg_in[r][c]), .cfg_out(r_cfg_out[r][c]),
        .rsp_in(r_rsp_in[r][c]), .rsp_out(r_rsp_out[r][c])
      );

      dael_ni #(
        .NCH(NCH), .NSLOTS(NSLOTS), .NPORTS(NPORTS), .TXQ_DEPTH(TXQ_DEPTH),
        .RXQ_DEPTH(RXQ_DEPTH), .MY_ID(ni_id(r, c))
      ) u_ni (
        .clk, .rst_n,
        .tx_valid(tx_valid[2*r+c]), .tx_ready(tx_ready[2*r+c]), .tx_data(tx_data[2*r+c]),
        .rx_valid(rx_valid[2*r+c]), .rx_ready(rx_ready[2*r+c]), .rx_data(rx_data[2*r+c]),
        .link_out(ni_out[r][c]), .link_in(r_out[r][c][2]),
        .cfg_in(ni_cfg_in[r][c]), .rsp_out(ni_rsp_out[r][c]),
        .bus_valid(bus_valid[2*r+c]), .bus_word(bus_word[2*r+c])
      );
    end
  end

  // ---------------- configuration tree ----------------
  // R00: children NI00, R01
  assign r_cfg_in[0][0]    = root_cfg;
  assign ni_cfg_in[0][0]   = r_cfg_out[0][0][0];
  assign r_cfg_in[0][1]    = r_cfg_out[0][0][1];
  assign r_rsp_in[0][0][0] = ni_rsp_out[0][0];
  assign r_rsp_in[0][0][1] = r_rsp_out[0][1];
  // R01: children NI01, R11
  assign ni_cfg_in[0][1]   = r_cfg_out[0][1][0];
  assign r_cfg_in[1][1]    = r_cfg_out[0][1][1];
  assign r_rsp_in[0][1][0] = ni_rsp_out[0][1];
  assign r_rsp_in[0][1][1] = r_rsp_out[1][1];
  // R11: children NI11, R10
  assign ni_cfg_in[1][1]   = r_cfg_out[1][1][0];
  assign r_cfg_in[1][0]    = r_cfg_out[1][1][1];
  assign r_rsp_in[1][1][0] = ni_rsp_out[1][1];
  assign r_rsp_in[1][1][1] = r_rsp_out[1][0];
  // R10: child NI10, second output unused
  assign ni_cfg_in[1][0]   = r_cfg_out[1][0][0];
  assign r_rsp_in[1][0][0] = ni_rsp_out[1][0];
  assign r_rsp_in[1][0][1] = '0;
  assign root_rsp          = r_rsp_out[0][0];

  dael_cfg_module #(.COOLDOWN(COOLDOWN)) u_cfg (
    .clk, .rst_n,
    .wr_valid(cfg_wr_valid), .wr_ready(cfg_wr_ready), .wr_data(cfg_wr_data),
    .busy(cfg_busy), .rsp_valid(cfg_rsp_valid), .rsp_data(cfg_rsp_data),
    .rsp_ack(cfg_rsp_ack),
    .cfg_out(root_cfg), .rsp_in(root_rsp)
  );
endmodule
