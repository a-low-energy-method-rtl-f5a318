// fevc -- frequent exchange value cache (FEVC).
//
// A small content-addressed store of FEV_N 32-bit frequent exchange values
// (FEV0..FEV3 at the default size). It has three ports:
//   * write: loads one entry (cfg_we, cfg_idx, cfg_value) and marks it valid.
//     The contents are meant to be loaded before traffic starts and then
//     left alone for the whole run, identical in every FEVC on the bus.
//   * search (sender side): one equality comparator per entry compares
//     search_value with the stored values; an encoder turns the match lines
//     into search_idx, and search_hit is raised when any entry matches.
//   * read (receiver side): a decoder and multiplexer return the entry
//     selected by rd_idx on rd_value.
// Search and read are combinational; writes take effect at the next clock
// edge. Reset clears all entries and their valid bits.
//
// From the source design: 32-bit FEV registers, 4 entries, fully associative
// search with equality comparators, encoder, decoder and multiplexer, fixed
// contents. Own choices: the valid bits (so that an unloaded entry never
// matches), the lowest-index-wins rule when two entries hold the same value,
// and the write port used to load the contents.
module fevc
  import fevcbi_pkg::*;
#(
  parameter int unsigned N     = FEV_N,
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // write port
  input  logic             cfg_we,
  input  logic [IDX_W-1:0] cfg_idx,
  input  word_t            cfg_value,
  // search port
  input  word_t            search_value,
  output logic             search_hit,
  output logic [IDX_W-1:0] search_idx,
  // read port
  input  logic [IDX_W-1:0] rd_idx,
  output word_t            rd_value
);

  word_t        fev   [N];
  logic [N-1:0] valid;
  logic [N-1:0] eq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int unsigned i = 0; i < N; i++) fev[i] <= '0;
    end else if (cfg_we && (32'(cfg_idx) < N)) begin
      fev[cfg_idx]   <= cfg_value;
      valid[cfg_idx] <= 1'b1;
    end
  end

  // Equality comparators, one per entry.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) eq[i] = valid[i] && (fev[i] == search_value);
  end

  // Match-line encoder: the lowest matching entry gives the index.
  always_comb begin
    search_hit = |eq;
    search_idx = '0;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (eq[i]) search_idx = IDX_W'(i);
    end
  end

  // Index decoder and output multiplexer.
  always_comb begin
    rd_value = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (32'(rd_idx) == i) rd_value = fev[i];
    end
  end

endmodule
