// tb_fevcbi_bus_system -- end-to-end test of the coded shared bus, at the
// design's default sizes (five nodes, four FEVC entries, 16-word blocks).
//
// The four FEVCs are loaded with the same four frequent values. Every node
// then sends 16-word cache-line blocks at random times: cores to the L2
// (node 4), the L2 to cores and cores to cores. Words are a mix of frequent
// values, random words and words close to the complement of the bus state,
// so index transfers, inverted and plain transfers all occur. The testbench
// checks, against its own reference queues:
//   * every word reaches its destination unchanged, in order, with its sender
//     and last flag, three cycles after it was accepted;
//   * a block sent without bubbles is delivered in 16+2 cycles;
//   * at most 16 data lines toggle for a raw word and none beyond the index
//     lines for an index transfer;
//   * the coded bus toggles fewer lines than an uncoded 32-line bus carrying
//     the same words in the same order.
// It counts each mechanism (index transfer, inverted word, plain word, bus
// contention, hand-over between senders, sender bubble inside a block, each
// kind of transfer) and fails a mechanism that never happened.
module tb_fevcbi_bus_system;
  import fevcbi_pkg::*;

  localparam int unsigned NN = NODES;
  localparam int unsigned B  = BLOCK_WORDS;
  localparam int unsigned BLOCKS_PER_NODE = 24;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0] cfg_idx = '0;
  word_t cfg_value = '0;
  logic tx_valid [NN], tx_ready [NN], tx_last [NN];
  word_t tx_data [NN];
  logic [2:0] tx_dst [NN];
  logic rx_valid [NN], rx_last [NN];
  word_t rx_data [NN];
  logic [2:0] rx_src [NN];
  bus_lines_t bus_lines;
  logic bus_valid;

  fevcbi_bus_system dut (.*);

  always #5 clk = ~clk;

  word_t fev [4] = '{32'h0000_0000, 32'hFFFF_FFFF, 32'h0000_0001, 32'h0000_0004};

  int checks = 0, failures = 0, cyc = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cyc, what);
    end
  endtask

  // Expected deliveries, per destination.
  typedef struct {
    word_t w;
    int    src;
    bit    last;
    int    t;       // acceptance cycle
    int    t0;      // acceptance cycle of the block's first word
    bit    clean;   // block sent without bubbles
  } exp_t;
  exp_t exp_q [NN][$];

  // Generator state per node.
  int    left [NN], dst [NN], sent [NN], t0 [NN];
  bit    clean [NN], acc [NN];
  word_t cur [NN];

  // Mechanism counters.
  int n_index = 0, n_inv = 0, n_plain = 0, n_contend = 0, n_handover = 0, n_bubble = 0;
  int n_l1_l2 = 0, n_l2_l1 = 0, n_l1_l1 = 0, n_clean = 0;
  longint sa_coded = 0, sa_raw = 0;
  word_t raw_prev = '0;
  bus_lines_t lines_prev = '0;
  int last_src = -1, last_bus_cyc = -10;
  bit driving = 0;

  function automatic word_t gen_word(word_t now);
    case ($urandom_range(9))
      0, 1, 2, 3: return fev[$urandom_range(3)];
      4, 5:       return ~now ^ (32'h1 << $urandom_range(31));
      6:          return now ^ 32'(1 << $urandom_range(31));
      default:    return $urandom();
    endcase
  endfunction

  always @(negedge clk) if (rst_n && cyc >= 0) begin
    cyc++;
    // Retire what the last posedge accepted.
    for (int i = 0; i < NN; i++) if (acc[i]) begin
      left[i]--;
      if (left[i] == 0) sent[i]++;
    end
    // Receivers.
    for (int i = 0; i < NN; i++) if (rx_valid[i]) begin
      check(exp_q[i].size() > 0, $sformatf("node %0d got an unexpected word", i));
      if (exp_q[i].size() > 0) begin
        exp_t e;
        e = exp_q[i].pop_front();
        check(rx_data[i] == e.w, $sformatf("node %0d data %h exp %h", i, rx_data[i], e.w));
        check(32'(rx_src[i]) == e.src, $sformatf("node %0d src %0d exp %0d", i, rx_src[i], e.src));
        check(rx_last[i] == e.last, "last flag");
        check(cyc - e.t == 3, $sformatf("word latency %0d", cyc - e.t));
        if (e.last && e.clean) begin
          check(cyc - e.t0 == int'(B) + 2, $sformatf("block latency %0d", cyc - e.t0));
          n_clean++;
        end
      end
    end
    // Bus lines.
    if (bus_valid) begin
      int td, tc;
      word_t w;
      td = $countones(bus_lines.data ^ lines_prev.data);
      if (bus_lines.fv_en) begin
        n_index++;
        check(td <= 2 && (bus_lines.data[31:2] == lines_prev.data[31:2]), "index transfer toggles only index lines");
        check(bus_lines.inv == lines_prev.inv, "invert line held on index transfer");
        w = fev[bus_lines.data[1:0]];
      end else begin
        if (bus_lines.inv) n_inv++; else n_plain++;
        check(td <= 16, $sformatf("raw word toggles %0d data lines", td));
        w = bus_lines.inv ? ~bus_lines.data : bus_lines.data;
      end
      sa_raw += $countones(w ^ raw_prev);
      raw_prev = w;
    end
    sa_coded += $countones(bus_lines ^ lines_prev);
    check(bus_valid || bus_lines == lines_prev, "idle bus lines hold");
    lines_prev = bus_lines;

    // Senders.
    for (int i = 0; i < NN; i++) begin
      if (left[i] == 0 && driving && sent[i] < BLOCKS_PER_NODE && $urandom_range(5) == 0) begin
        left[i] = B; clean[i] = 1;
        if (i == NN - 1) dst[i] = $urandom_range(NN - 2);
        else if ($urandom_range(2) != 0) dst[i] = NN - 1;
        else begin
          dst[i] = $urandom_range(NN - 2);
          if (dst[i] == i) dst[i] = (i + 1) % (NN - 1);
        end
        if (i == NN - 1) n_l2_l1++; else if (dst[i] == NN - 1) n_l1_l2++; else n_l1_l1++;
        cur[i] = gen_word(bus_lines.data);
      end else if (acc[i] && left[i] > 0) begin
        cur[i] = gen_word(bus_lines.data);
      end
      tx_data[i] = cur[i];
      tx_dst[i]  = 3'(dst[i]);
      tx_last[i] = (left[i] == 1);
      tx_valid[i] = (left[i] > 0);
      // occasional bubble inside a block, never before its first word
      if (left[i] > 0 && left[i] < int'(B) && $urandom_range(15) == 0) begin
        tx_valid[i] = 0;
      end
    end
    #1;
    for (int i = 0; i < NN; i++) begin
      acc[i] = tx_valid[i] && tx_ready[i];
      if (left[i] > 0 && left[i] < int'(B) && !tx_valid[i]) begin
        if (clean[i]) n_bubble++;
        clean[i] = 0;
      end
      if (tx_valid[i] && !tx_ready[i]) n_contend++;
      if (acc[i]) begin
        exp_t e;
        if (left[i] == int'(B)) t0[i] = cyc;
        e.w = tx_data[i]; e.src = i; e.last = tx_last[i]; e.t = cyc; e.t0 = t0[i]; e.clean = clean[i];
        exp_q[dst[i]].push_back(e);
        if (last_bus_cyc == cyc - 1 && last_src != i) n_handover++;
        last_src = i; last_bus_cyc = cyc;
      end
    end
  end

  initial begin
    for (int i = 0; i < NN; i++) begin
      tx_valid[i] = 0; tx_last[i] = 0; tx_data[i] = '0; tx_dst[i] = '0;
      left[i] = 0; dst[i] = 0; sent[i] = 0; t0[i] = 0; clean[i] = 0; acc[i] = 0; cur[i] = '0;
    end
    cyc = -1000000;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); cfg_we = 1; cfg_idx = 2'(i); cfg_value = fev[i];
    end
    @(negedge clk); cfg_we = 0;
    cyc = 0; driving = 1;
    wait (sent[0] == BLOCKS_PER_NODE && sent[1] == BLOCKS_PER_NODE && sent[2] == BLOCKS_PER_NODE
          && sent[3] == BLOCKS_PER_NODE && sent[4] == BLOCKS_PER_NODE);
    driving = 0;
    repeat (6) @(posedge clk);
    for (int i = 0; i < NN; i++) check(exp_q[i].size() == 0, $sformatf("node %0d missing words", i));
    check(sa_coded < sa_raw, "coded bus toggles less than an uncoded bus");
    check(n_index > 0,    "index transfer happened");
    check(n_inv > 0,      "inverted transfer happened");
    check(n_plain > 0,    "plain transfer happened");
    check(n_contend > 0,  "bus contention happened");
    check(n_handover > 0, "back-to-back hand-over happened");
    check(n_bubble > 0,   "sender bubble happened");
    check(n_clean > 0,    "clean block timed");
    check(n_l1_l2 > 0 && n_l2_l1 > 0 && n_l1_l1 > 0, "L1-L2, L2-L1 and L1-L1 blocks happened");
    $display("cycles=%0d index=%0d inverted=%0d plain=%0d contention=%0d handover=%0d bubble=%0d",
             cyc, n_index, n_inv, n_plain, n_contend, n_handover, n_bubble);
    $display("blocks L1-L2=%0d L2-L1=%0d L1-L1=%0d timed=%0d", n_l1_l2, n_l2_l1, n_l1_l1, n_clean);
    $display("line toggles: coded 34-line bus %0d, uncoded 32-line bus %0d, saving %0.2f%%",
             sa_coded, sa_raw, 100.0 * (1.0 - real'(sa_coded) / real'(sa_raw)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
