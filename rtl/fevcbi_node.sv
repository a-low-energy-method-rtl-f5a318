// fevcbi_node -- one attachment point on the coded data bus.
//
// Each core's L1 pair and the shared L2 reach the bus through one node. A
// node holds a single FEVC, used by its encoder (search port) when it sends
// and by its decoder (read port) when it receives, so n cores need n+1 FEVCs.
//
// Send side: tx_valid/tx_ready handshake, one 32-bit word per cycle; tx_last
// marks the last word of a block and tx_dst names the receiving node. The
// node asks for the bus with bus_req (= tx_valid) and tx_ready follows the
// arbiter's grant; a word is accepted when tx_valid && tx_ready. The coded
// word is offered on drv_* one cycle after acceptance.
// Receive side: words addressed to NODE_ID appear on rx_* one cycle after
// they are on the bus lines.
// FEVC load: cfg_* writes one entry of this node's FEVC.
//
// From the source design: one FEVC per core and one at the L2, shared by
// the sending and receiving halves. Own choices: the valid/ready handshake
// and the destination/source sideband.
module fevcbi_node
  import fevcbi_pkg::*;
#(
  parameter int unsigned N       = FEV_N,
  parameter int unsigned IDX_W   = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned DST_W   = 3,
  parameter int unsigned NODE_ID = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  // FEVC load
  input  logic             cfg_we,
  input  logic [IDX_W-1:0] cfg_idx,
  input  word_t            cfg_value,
  // send port
  input  logic             tx_valid,
  output logic             tx_ready,
  input  word_t            tx_data,
  input  logic             tx_last,
  input  logic [DST_W-1:0] tx_dst,
  // arbitration
  output logic             bus_req,
  input  logic             bus_grant,
  // coded word offered to the bus
  output logic             drv_valid,
  output bus_lines_t       drv_lines,
  output logic             drv_last,
  output logic [DST_W-1:0] drv_dst,
  // registered bus lines and sideband
  input  logic             bus_valid,
  input  bus_lines_t       bus_lines,
  input  logic             bus_last,
  input  logic [DST_W-1:0] bus_dst,
  input  logic [DST_W-1:0] bus_src,
  // receive port
  output logic             rx_valid,
  output word_t            rx_data,
  output logic             rx_last,
  output logic [DST_W-1:0] rx_src
);

  word_t            search_value, rd_value;
  logic             search_hit;
  logic [IDX_W-1:0] search_idx, rd_idx;

  assign bus_req  = tx_valid;
  assign tx_ready = bus_grant;

  fevc #(.N(N), .IDX_W(IDX_W)) u_fevc (
    .clk, .rst_n,
    .cfg_we, .cfg_idx, .cfg_value,
    .search_value, .search_hit, .search_idx,
    .rd_idx, .rd_value
  );

  fevcbi_encoder #(.N(N), .IDX_W(IDX_W), .DST_W(DST_W)) u_enc (
    .clk, .rst_n,
    .in_valid (tx_valid && bus_grant),
    .in_data  (tx_data),
    .in_last  (tx_last),
    .in_dst   (tx_dst),
    .search_value, .search_hit, .search_idx,
    .bus_prev (bus_lines),
    .drv_valid, .drv_lines, .drv_last, .drv_dst
  );

  fevcbi_decoder #(.N(N), .IDX_W(IDX_W), .DST_W(DST_W), .NODE_ID(NODE_ID)) u_dec (
    .clk, .rst_n,
    .bus_valid, .bus_lines, .bus_last, .bus_dst, .bus_src,
    .rd_idx, .rd_value,
    .out_valid (rx_valid),
    .out_data  (rx_data),
    .out_last  (rx_last),
    .out_src   (rx_src)
  );

endmodule
