// tb_bus_invert_encoder -- self-checking test of the bus-invert decision.
// Drives random and hand-picked (word, line state) pairs, computes the
// Hamming distance independently with a bit loop, and checks the invert
// decision, the driven lines and that no more than 16 data lines toggle.
module tb_bus_invert_encoder;
  import fevcbi_pkg::*;

  word_t value, prev_lines, out_lines;
  logic  inv;
  int checks = 0, failures = 0;
  int n_inv = 0, n_raw = 0;

  bus_invert_encoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic try(word_t v, word_t p);
    int h, t;
    bit exp_inv;
    h = 0;
    for (int j = 0; j < 32; j++) if (v[j] != p[j]) h++;
    exp_inv = (h > 16);
    value = v; prev_lines = p;
    #1;
    t = 0;
    for (int j = 0; j < 32; j++) if (out_lines[j] != p[j]) t++;
    check(inv == exp_inv, $sformatf("inv v=%h p=%h h=%0d", v, p, h));
    check(out_lines == (exp_inv ? ~v : v), $sformatf("lines v=%h p=%h", v, p));
    check(t <= 16, $sformatf("toggles %0d", t));
    if (exp_inv) n_inv++; else n_raw++;
  endtask

  initial begin
    try(32'h0000_FFFF, 32'h0);        // h = 16: not inverted
    try(32'h0001_FFFF, 32'h0);        // h = 17: inverted
    try(32'hFFFF_FFFF, 32'h0);        // h = 32
    try(32'h0, 32'h0);                // h = 0
    try(32'hAAAA_AAAA, 32'h5555_5555);
    for (int k = 0; k < 2000; k++) try($urandom(), $urandom());
    check(n_inv > 0 && n_raw > 0, "both decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
