// fevcbi_pkg -- constants and types shared by the FEVCBI bus blocks.
//
// FEVCBI (frequent exchange value cache + bus invert) codes every word
// sent over a shared on-chip data bus in one of two ways: a word that is one
// of a few fixed frequent values travels as its small index in a value cache
// (FEVC) and an indicator line fvEN is raised; any other word travels as its
// own value, bus-inverted when that toggles fewer lines. The bus therefore has
// 32 data lines plus two control lines (fvEN and the invert line), 34 in all.
//
// From the source design: 32-bit words, 32+2 bus lines, 4 FEVC entries, five
// bus nodes (four cores and the L2), 64-byte cache lines (16 words per block).
// Own choices: the packed layout of the line bundle and the popcount helper.
package fevcbi_pkg;

  // Width of a data word and of the data part of the bus.
  localparam int unsigned WORD_W = 32;
  // Entries in each frequent exchange value cache.
  localparam int unsigned FEV_N = 4;
  // Bus nodes: four cores plus the shared L2.
  localparam int unsigned NODES = 5;
  // Words in one cache-line block transfer: 64 B / 4 B.
  localparam int unsigned BLOCK_WORDS = 16;

  typedef logic [WORD_W-1:0] word_t;

  // The 34 physical lines of the coded data bus.
  typedef struct packed {
    logic  inv;    // bus-invert line: data lines carry the inverted word
    logic  fv_en;  // indicator line: data lines carry an FEVC index
    word_t data;   // 32 data lines
  } bus_lines_t;

  localparam int unsigned BUS_LINES = $bits(bus_lines_t);

  // Number of ones in a word (Hamming weight).
  function automatic int unsigned popcount(input word_t v);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < WORD_W; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
