// tb_fevcbi_encoder -- self-checking test of the sender half of the coder.
// The testbench plays the FEVC (a table of four values searched in the
// testbench) and the bus (a register that takes drv_lines when drv_valid).
// Each accepted word must be offered exactly one cycle later, coded as an
// index with fvEN=1 and all other lines held when it is in the table, or as
// a bus-invert coded word otherwise. Decisions are recomputed independently.
module tb_fevcbi_encoder;
  import fevcbi_pkg::*;

  localparam int unsigned IW = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0;
  word_t in_data = '0, search_value;
  logic [2:0] in_dst = '0;
  logic search_hit;
  logic [IW-1:0] search_idx;
  bus_lines_t bus_prev, drv_lines;
  logic drv_valid, drv_last;
  logic [2:0] drv_dst;

  word_t tbl [4] = '{32'h0, 32'hFFFF_FFFF, 32'h0000_0001, 32'h1000_0000};
  int checks = 0, failures = 0;
  int n_hit = 0, n_inv = 0, n_raw = 0;

  fevcbi_encoder dut (.*);

  always #5 clk = ~clk;

  // FEVC model.
  always_comb begin
    search_hit = 0; search_idx = '0;
    for (int i = 3; i >= 0; i--) if (tbl[i] == search_value) begin search_hit = 1; search_idx = IW'(i); end
  end

  // Bus model.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bus_prev <= '0;
    else if (drv_valid) bus_prev <= drv_lines;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Expected word for the next cycle (one-cycle latency).
  bit         pend_v = 0, pend_last;
  word_t      pend_w;
  logic [2:0] pend_dst;

  always @(negedge clk) if (rst_n) begin
    check(drv_valid == pend_v, "drv_valid one cycle after acceptance");
    if (pend_v && drv_valid) begin
      int hit_i, h;
      bus_lines_t e;
      hit_i = -1;
      for (int i = 3; i >= 0; i--) if (tbl[i] == pend_w) hit_i = i;
      if (hit_i >= 0) begin
        e = bus_prev; e.fv_en = 1; e.data[1:0] = 2'(hit_i);
        n_hit++;
      end else begin
        h = 0;
        for (int j = 0; j < 32; j++) if (pend_w[j] != bus_prev.data[j]) h++;
        e.fv_en = 0; e.inv = (h > 16); e.data = (h > 16) ? ~pend_w : pend_w;
        if (h > 16) n_inv++; else n_raw++;
      end
      check(drv_lines == e, $sformatf("lines for %h: got %h exp %h", pend_w, drv_lines, e));
      check(drv_last == pend_last && drv_dst == pend_dst, "sideband");
    end
    // New word for this cycle.
    in_valid = ($urandom_range(3) != 0);
    in_data  = ($urandom_range(2) == 0) ? tbl[$urandom_range(3)] : $urandom();
    in_last  = $urandom_range(1);
    in_dst   = 3'($urandom_range(4));
    pend_v = in_valid; pend_w = in_data; pend_last = in_last; pend_dst = in_dst;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3000) @(posedge clk);
    check(n_hit > 0 && n_inv > 0 && n_raw > 0, "index, inverted and plain transfers all seen");
    $display("hits=%0d inverted=%0d plain=%0d", n_hit, n_inv, n_raw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
