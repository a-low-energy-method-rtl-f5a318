// tb_fevcbi_workload -- synthetic value-locality workload on two bus
// configurations at once: the default four-entry FEVC and an eight-entry
// FEVC. Both systems receive the same stream of 16-word blocks from core 0 to
// the L2 (node 4), where about half of the words are taken from eight
// frequent values with falling weights and the rest are pointer-like or
// random words. The testbench checks that every word arrives unchanged and in
// order in both systems, then reports the switching activity and an energy
// estimate for each:
//   E_O = 11.6 pJ x (toggles of an uncoded 32-line bus)
//   E_X = 11.6 pJ x (toggles of the 34 coded lines)
//         + 18.6 pJ x (FEVC accesses: one search per word sent, one read per
//                      index received)
//   phi = 1 - E_X / E_O
// The per-line and per-access energies are the figures the scheme was
// evaluated with; counting 11.6 pJ per line toggle is this testbench's
// reading of them. Checks that both codings save line toggles and that the
// larger FEVC sends at least as many indexes.
module tb_fevcbi_workload;
  import fevcbi_pkg::*;

  localparam int unsigned NN = NODES;
  localparam int unsigned B  = BLOCK_WORDS;
  localparam int unsigned NBLOCKS = 400;
  localparam real E_LINE = 11.6, E_FEVC = 18.6;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [2:0] cfg_idx = '0;
  word_t cfg_value = '0;
  logic tx_valid [NN], tx_last [NN];
  word_t tx_data [NN];
  logic [2:0] tx_dst [NN];

  logic rdy4 [NN], rv4 [NN], rl4 [NN];
  word_t rd4 [NN];
  logic [2:0] rs4 [NN];
  bus_lines_t bl4;
  logic bv4;
  logic rdy8 [NN], rv8 [NN], rl8 [NN];
  word_t rd8 [NN];
  logic [2:0] rs8 [NN];
  bus_lines_t bl8;
  logic bv8;

  // Four-entry system: loaded with the four most frequent values.
  fevcbi_bus_system #(.N(4)) u_fev4 (
    .clk, .rst_n, .cfg_we(cfg_we && cfg_idx < 3'd4), .cfg_idx(cfg_idx[1:0]), .cfg_value,
    .tx_valid, .tx_ready(rdy4), .tx_data, .tx_last, .tx_dst,
    .rx_valid(rv4), .rx_data(rd4), .rx_last(rl4), .rx_src(rs4), .bus_lines(bl4), .bus_valid(bv4));
  // Eight-entry system.
  fevcbi_bus_system #(.N(8)) u_fev8 (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_value,
    .tx_valid, .tx_ready(rdy8), .tx_data, .tx_last, .tx_dst,
    .rx_valid(rv8), .rx_data(rd8), .rx_last(rl8), .rx_src(rs8), .bus_lines(bl8), .bus_valid(bv8));

  always #5 clk = ~clk;

  word_t fv [8] = '{32'h0000_0000, 32'h0000_0001, 32'hFFFF_FFFF, 32'h0000_0004,
                    32'h0000_0002, 32'h0000_0008, 32'h0000_0010, 32'h0000_0020};
  int    wt [8] = '{20, 12, 8, 6, 5, 4, 3, 2};   // sums to 60

  int checks = 0, failures = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic word_t gen_word();
    int r, acc;
    r = $urandom_range(119);
    if (r < 60) begin
      acc = 0;
      for (int i = 0; i < 8; i++) begin
        acc += wt[i];
        if (r < acc) return fv[i];
      end
    end
    if (r < 95) return 32'h1000_0000 + 32'($urandom_range(16'hFFFF)) * 4;
    return $urandom();
  endfunction

  word_t q4 [$], q8 [$];
  longint raw = 0, t4 = 0, t8 = 0;
  int idx4 = 0, idx8 = 0, words = 0;
  word_t raw_prev = '0;
  bus_lines_t p4 = '0, p8 = '0;
  int left = 0, blocks = 0;

  always @(negedge clk) if (rst_n) begin
    if (rv4[NN-1]) begin
      check(q4.size() > 0 && rd4[NN-1] == q4[0], "FEV4 system word");
      if (q4.size() > 0) void'(q4.pop_front());
    end
    if (rv8[NN-1]) begin
      check(q8.size() > 0 && rd8[NN-1] == q8[0], "FEV8 system word");
      if (q8.size() > 0) void'(q8.pop_front());
    end
    t4 += $countones(bl4 ^ p4); p4 = bl4;
    t8 += $countones(bl8 ^ p8); p8 = bl8;
    if (bv4 && bl4.fv_en) idx4++;
    if (bv8 && bl8.fv_en) idx8++;
  end

  initial begin
    for (int i = 0; i < NN; i++) begin
      tx_valid[i] = 0; tx_last[i] = 0; tx_data[i] = '0; tx_dst[i] = 3'(NN - 1);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); cfg_we = 1; cfg_idx = 3'(i); cfg_value = fv[i];
    end
    @(negedge clk); cfg_we = 0;
    // Core 0 streams blocks to the L2; the bus is never contended, so every
    // word is accepted in the cycle it is offered.
    for (int b = 0; b < int'(NBLOCKS); b++) begin
      for (int k = 0; k < int'(B); k++) begin
        word_t w;
        w = gen_word();
        tx_valid[0] = 1; tx_data[0] = w; tx_last[0] = (k == int'(B) - 1);
        #1;
        check(rdy4[0] && rdy8[0], "uncontended sender always granted");
        q4.push_back(w); q8.push_back(w);
        raw += $countones(w ^ raw_prev); raw_prev = w; words++;
        @(negedge clk);
      end
    end
    tx_valid[0] = 0;
    repeat (6) @(negedge clk);
    check(q4.size() == 0 && q8.size() == 0, "all words delivered");
    check(t4 < raw && t8 < raw, "both codings toggle fewer lines than an uncoded bus");
    check(idx8 >= idx4, "eight-entry FEVC sends at least as many indexes");
    begin
      real eo, ec4, ef4, ec8, ef8;
      eo  = E_LINE * real'(raw);
      ec4 = E_LINE * real'(raw - t4);  ef4 = E_FEVC * real'(words + idx4);
      ec8 = E_LINE * real'(raw - t8);  ef8 = E_FEVC * real'(words + idx8);
      $display("words=%0d uncoded toggles=%0d", words, raw);
      $display("FEV4: toggles=%0d indexes=%0d phi(Ec)=%0.2f%% phi(Ef)=%0.2f%% phi=%0.2f%%",
               t4, idx4, 100.0 * ec4 / eo, -100.0 * ef4 / eo, 100.0 * (ec4 - ef4) / eo);
      $display("FEV8: toggles=%0d indexes=%0d phi(Ec)=%0.2f%% phi(Ef)=%0.2f%% phi=%0.2f%%",
               t8, idx8, 100.0 * ec8 / eo, -100.0 * ef8 / eo, 100.0 * (ec8 - ef8) / eo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
