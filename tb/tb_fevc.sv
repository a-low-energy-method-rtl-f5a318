// tb_fevc -- self-checking test of the frequent exchange value cache.
// Loads the entries through the write port, then checks the search port
// (hit flag, lowest matching index) and the read port against a reference
// table kept in the testbench, for loaded values, random values, unloaded
// entries and duplicated entries.
module tb_fevc;
  import fevcbi_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned IW = 2;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [IW-1:0] cfg_idx = '0;
  word_t cfg_value = '0, search_value = '0, rd_value;
  logic search_hit;
  logic [IW-1:0] search_idx, rd_idx = '0;

  int checks = 0, failures = 0;
  word_t ref_fev [N];
  bit    ref_vld [N];

  fevc #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic load(int unsigned i, word_t v);
    @(negedge clk);
    cfg_we = 1; cfg_idx = IW'(i); cfg_value = v;
    @(negedge clk);
    cfg_we = 0;
    ref_fev[i] = v; ref_vld[i] = 1;
  endtask

  task automatic probe(word_t v);
    bit exp_hit;
    int exp_idx;
    exp_hit = 0; exp_idx = 0;
    for (int i = N - 1; i >= 0; i--)
      if (ref_vld[i] && ref_fev[i] == v) begin exp_hit = 1; exp_idx = i; end
    search_value = v;
    #1;
    check(search_hit == exp_hit, $sformatf("hit for %h: got %0b", v, search_hit));
    if (exp_hit) check(32'(search_idx) == exp_idx, $sformatf("idx for %h: got %0d exp %0d", v, search_idx, exp_idx));
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin ref_fev[i] = '0; ref_vld[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Nothing loaded: even zero must miss.
    probe(32'h0);
    probe(32'hDEAD_BEEF);
    load(0, 32'h0000_0000);
    load(1, 32'hFFFF_FFFF);
    load(2, 32'h0000_0001);
    probe(32'h0);
    probe(32'hFFFF_FFFF);
    probe(32'h1);
    probe(32'h8000_0000);   // entry 3 still unloaded
    load(3, 32'h1234_5678);
    for (int i = 0; i < N; i++) begin
      probe(ref_fev[i]);
      rd_idx = IW'(i); #1;
      check(rd_value == ref_fev[i], $sformatf("read %0d got %h", i, rd_value));
    end
    for (int k = 0; k < 200; k++) begin
      word_t v;
      v = (k % 3 == 0) ? ref_fev[$urandom_range(N-1)] : $urandom();
      probe(v);
      probe(v ^ (32'h1 << $urandom_range(31)));   // one bit away: must miss unless stored
    end
    // Duplicate value: the lowest index wins.
    load(3, 32'hFFFF_FFFF);
    probe(32'hFFFF_FFFF);
    // Reloading with new values.
    for (int i = 0; i < N; i++) load(i, $urandom());
    for (int i = 0; i < N; i++) begin
      probe(ref_fev[i]);
      rd_idx = IW'(i); #1;
      check(rd_value == ref_fev[i], $sformatf("read %0d got %h", i, rd_value));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
