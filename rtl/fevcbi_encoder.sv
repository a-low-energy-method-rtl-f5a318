// fevcbi_encoder -- sender half of the FEVCBI coder.
//
// Two pipeline stages per word:
//   1. lookup: the accepted word is presented to the node's FEVC search port
//      (search_value) and the word, the hit flag and the index are registered
//      together with the word's sideband (last-of-block flag, destination).
//   2. drive: the registered word is coded against the current state of the
//      bus lines (bus_prev) and offered to the bus as drv_lines:
//        - FEVC hit: fvEN=1, the index goes on data lines [IDX_W-1:0]; the
//          other data lines and the invert line keep their present value, so
//          only the index lines and fvEN can toggle;
//        - miss: fvEN=0 and the word is bus-invert coded (bus_invert_encoder).
// While word k is driven, word k+1 is being looked up, so a block costs one
// extra cycle at the sender and then one word per cycle. in_valid must only
// be raised for a word the bus has granted (the caller's handshake); the
// stage-1 output is valid exactly one cycle after acceptance.
//
// From the source design: index-or-value choice, fvEN indicator line, the
// BI step on values that are sent raw, the pipelined lookup and its one-cycle
// cost. Own choices: where the index sits on the data lines, holding the
// other lines during an index transfer, and leaving the invert line alone.
module fevcbi_encoder
  import fevcbi_pkg::*;
#(
  parameter int unsigned N     = FEV_N,
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned DST_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // accepted word
  input  logic             in_valid,
  input  word_t            in_data,
  input  logic             in_last,
  input  logic [DST_W-1:0] in_dst,
  // FEVC search port
  output word_t            search_value,
  input  logic             search_hit,
  input  logic [IDX_W-1:0] search_idx,
  // bus side
  input  bus_lines_t       bus_prev,
  output logic             drv_valid,
  output bus_lines_t       drv_lines,
  output logic             drv_last,
  output logic [DST_W-1:0] drv_dst
);

  logic             s1_valid, s1_hit, s1_last;
  logic [IDX_W-1:0] s1_idx;
  word_t            s1_data;
  logic [DST_W-1:0] s1_dst;

  word_t bi_lines;
  logic  bi_inv;

  assign search_value = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_hit   <= 1'b0;
      s1_idx   <= '0;
      s1_data  <= '0;
      s1_last  <= 1'b0;
      s1_dst   <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_hit  <= search_hit;
        s1_idx  <= search_idx;
        s1_data <= in_data;
        s1_last <= in_last;
        s1_dst  <= in_dst;
      end
    end
  end

  bus_invert_encoder u_bi (
    .value      (s1_data),
    .prev_lines (bus_prev.data),
    .out_lines  (bi_lines),
    .inv        (bi_inv)
  );

  always_comb begin
    drv_valid = s1_valid;
    drv_last  = s1_last;
    drv_dst   = s1_dst;
    if (s1_hit) begin
      drv_lines.fv_en = 1'b1;
      drv_lines.inv   = bus_prev.inv;
      drv_lines.data  = bus_prev.data;
      drv_lines.data[IDX_W-1:0] = s1_idx;
    end else begin
      drv_lines.fv_en = 1'b0;
      drv_lines.inv   = bi_inv;
      drv_lines.data  = bi_lines;
    end
  end

endmodule
