// bus_invert_encoder -- bus-invert (BI) decision for one 32-bit word.
//
// Counts the Hamming distance h between the word to send and the value the
// 32 data lines hold now (which is what the lines will toggle from). When h
// is larger than half the word width the inverted word is sent instead and
// inv is raised, so that at most WORD_W/2 data lines toggle. Purely
// combinational.
//
// From the source design: the w/2 threshold on the Hamming distance of the
// data word, and comparing against the previous transfer as it stands on the
// lines (an inverted previous word counts as inverted). Own choice: the
// invert line itself is not counted in h, as the source states the rule on
// the w-bit word only.
module bus_invert_encoder
  import fevcbi_pkg::*;
(
  input  word_t value,      // word to send
  input  word_t prev_lines, // current state of the 32 data lines
  output word_t out_lines,  // what to drive onto the data lines
  output logic  inv         // invert line
);

  int unsigned h;

  always_comb begin
    h         = popcount(value ^ prev_lines);
    inv       = (h > WORD_W / 2);
    out_lines = inv ? ~value : value;
  end

endmodule
