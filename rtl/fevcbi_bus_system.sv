// fevcbi_bus_system -- shared on-chip data bus with FEVCBI coding.
//
// Five nodes share one 34-line data bus (32 data lines, the fvEN indicator
// line and the bus-invert line): nodes 0..3 are the four cores' L1 caches,
// node 4 is the shared L2. Each node owns an FEVC loaded with the same
// frequent values. A sender looks each word up in its FEVC; a hit travels as
// the entry's index with fvEN raised, a miss travels as the word itself,
// bus-invert coded. The receiver reverses this with its own FEVC.
//
// The bus lines are one register, bus_lines, that every node drives through
// a multiplexer; when no node drives, the lines keep their value and do not
// toggle. bus_arbiter grants the bus one block at a time.
//
// Interface, per node i:
//   tx_valid/tx_ready/tx_data/tx_last/tx_dst  send a block of words to node
//     tx_dst, one word per accepted cycle, tx_last on the final word;
//   rx_valid/rx_data/rx_last/rx_src           words received, with sender;
//   cfg_we/cfg_idx/cfg_value                  load one FEVC entry in all nodes
//     at once (do this before traffic; the contents stay fixed);
//   bus_lines/bus_valid                       the physical lines, for
//     measuring switching activity.
// Timing: a word accepted at cycle t is on bus_lines at t+2 and on the
// receiver's rx port at t+3; a block of B words is delivered in B+2 cycles
// from its first acceptance, back-to-back blocks without gaps.
//
// From the source design: the 4-core + L2 bus organisation, five FEVCs with
// fixed identical contents, the 32+2 line bus and the per-word coding. Own
// choices: the register holding the bus lines, the sideband (valid, last,
// source, destination) that stands in for the undescribed control bus, the
// arbitration policy and the handshakes.
module fevcbi_bus_system
  import fevcbi_pkg::*;
#(
  parameter int unsigned NODES_P = NODES,
  parameter int unsigned N       = FEV_N,
  parameter int unsigned IDX_W   = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned DST_W   = (NODES_P > 1) ? $clog2(NODES_P) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // FEVC load, broadcast to all nodes
  input  logic             cfg_we,
  input  logic [IDX_W-1:0] cfg_idx,
  input  word_t            cfg_value,
  // send ports
  input  logic             tx_valid [NODES_P],
  output logic             tx_ready [NODES_P],
  input  word_t            tx_data  [NODES_P],
  input  logic             tx_last  [NODES_P],
  input  logic [DST_W-1:0] tx_dst   [NODES_P],
  // receive ports
  output logic             rx_valid [NODES_P],
  output word_t            rx_data  [NODES_P],
  output logic             rx_last  [NODES_P],
  output logic [DST_W-1:0] rx_src   [NODES_P],
  // physical bus lines
  output bus_lines_t       bus_lines,
  output logic             bus_valid
);

  logic [NODES_P-1:0] req, last, grant, drv_valid;
  bus_lines_t         drv_lines [NODES_P];
  logic               drv_last  [NODES_P];
  logic [DST_W-1:0]   drv_dst   [NODES_P];

  bus_lines_t       bus_q;
  logic             bus_valid_q, bus_last_q;
  logic [DST_W-1:0] bus_dst_q, bus_src_q;

  bus_lines_t       mux_lines;
  logic             mux_last;
  logic [DST_W-1:0] mux_dst, mux_src;

  for (genvar i = 0; i < NODES_P; i++) begin : g_node
    assign last[i] = tx_last[i];
    fevcbi_node #(.N(N), .IDX_W(IDX_W), .DST_W(DST_W), .NODE_ID(i)) u_node (
      .clk, .rst_n,
      .cfg_we, .cfg_idx, .cfg_value,
      .tx_valid  (tx_valid[i]),
      .tx_ready  (tx_ready[i]),
      .tx_data   (tx_data[i]),
      .tx_last   (tx_last[i]),
      .tx_dst    (tx_dst[i]),
      .bus_req   (req[i]),
      .bus_grant (grant[i]),
      .drv_valid (drv_valid[i]),
      .drv_lines (drv_lines[i]),
      .drv_last  (drv_last[i]),
      .drv_dst   (drv_dst[i]),
      .bus_valid (bus_valid_q),
      .bus_lines (bus_q),
      .bus_last  (bus_last_q),
      .bus_dst   (bus_dst_q),
      .bus_src   (bus_src_q),
      .rx_valid  (rx_valid[i]),
      .rx_data   (rx_data[i]),
      .rx_last   (rx_last[i]),
      .rx_src    (rx_src[i])
    );
  end

  bus_arbiter #(.N(NODES_P)) u_arb (
    .clk, .rst_n,
    .req, .last, .grant
  );

  // Bus multiplexer: at most one node offers a word in any cycle, because a
  // word is offered exactly one cycle after the arbiter let it be accepted.
  always_comb begin
    mux_lines = bus_q;
    mux_last  = 1'b0;
    mux_dst   = '0;
    mux_src   = '0;
    for (int unsigned i = 0; i < NODES_P; i++) begin
      if (drv_valid[i]) begin
        mux_lines = drv_lines[i];
        mux_last  = drv_last[i];
        mux_dst   = drv_dst[i];
        mux_src   = DST_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_q       <= '0;
      bus_valid_q <= 1'b0;
      bus_last_q  <= 1'b0;
      bus_dst_q   <= '0;
      bus_src_q   <= '0;
    end else begin
      bus_q       <= mux_lines;
      bus_valid_q <= |drv_valid;
      bus_last_q  <= mux_last;
      bus_dst_q   <= mux_dst;
      bus_src_q   <= mux_src;
    end
  end

  assign bus_lines = bus_q;
  assign bus_valid = bus_valid_q;

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drv_valid));

endmodule
