// fevcbi_decoder -- receiver half of the FEVCBI coder.
//
// Watches the registered bus lines. When a transfer addressed to this node
// is on the bus (bus_valid and bus_dst == NODE_ID) it recovers the original
// word and registers it on the out_* port one cycle later:
//   - fvEN=1: data lines [IDX_W-1:0] are an index; the value is read from the
//     node's FEVC (rd_idx -> rd_value);
//   - fvEN=0: the data lines are the word, inverted when the invert line is 1.
// One word per cycle, fixed latency of one cycle, no back-pressure: the
// receiving cache takes every word it is sent.
//
// From the source design: the receiver uses the indicator line to choose
// between an FEVC lookup and the raw value, the inverse BI step, and the
// pipelined one-cycle cost at the receiver. Own choices: the destination
// sideband, which belongs to the bus control lines the source does not
// describe, and the lack of back-pressure.
module fevcbi_decoder
  import fevcbi_pkg::*;
#(
  parameter int unsigned N       = FEV_N,
  parameter int unsigned IDX_W   = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned DST_W   = 3,
  parameter int unsigned NODE_ID = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  // bus side
  input  logic             bus_valid,
  input  bus_lines_t       bus_lines,
  input  logic             bus_last,
  input  logic [DST_W-1:0] bus_dst,
  input  logic [DST_W-1:0] bus_src,
  // FEVC read port
  output logic [IDX_W-1:0] rd_idx,
  input  word_t            rd_value,
  // decoded word
  output logic             out_valid,
  output word_t            out_data,
  output logic             out_last,
  output logic [DST_W-1:0] out_src
);

  logic  for_me;
  word_t decoded;

  assign for_me = bus_valid && (32'(bus_dst) == NODE_ID);
  assign rd_idx = bus_lines.data[IDX_W-1:0];

  always_comb begin
    if (bus_lines.fv_en)    decoded = rd_value;
    else if (bus_lines.inv) decoded = ~bus_lines.data;
    else                    decoded = bus_lines.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      out_src   <= '0;
    end else begin
      out_valid <= for_me;
      if (for_me) begin
        out_data <= decoded;
        out_last <= bus_last;
        out_src  <= bus_src;
      end
    end
  end

endmodule
