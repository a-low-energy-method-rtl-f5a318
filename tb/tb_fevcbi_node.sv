// tb_fevcbi_node -- self-checking loop-back test of one bus node.
// The testbench loads the node's FEVC, plays the arbiter (random grants) and
// the bus (a register of the offered lines), and sends words mostly to the
// node itself, so that its encoder, FEVC and decoder are exercised together.
// Every word sent to the node must come back unchanged three cycles after it
// was accepted; words sent elsewhere must not come back.
module tb_fevcbi_node;
  import fevcbi_pkg::*;

  localparam int unsigned ME = 1;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0] cfg_idx = '0;
  word_t cfg_value = '0;
  logic tx_valid = 0, tx_ready, tx_last = 0;
  word_t tx_data = '0;
  logic [2:0] tx_dst = '0;
  logic bus_req, bus_grant = 0;
  logic drv_valid, drv_last;
  bus_lines_t drv_lines;
  logic [2:0] drv_dst;
  logic bus_valid, bus_last;
  bus_lines_t bus_lines;
  logic [2:0] bus_dst, bus_src;
  logic rx_valid, rx_last;
  word_t rx_data;
  logic [2:0] rx_src;

  word_t tbl [4] = '{32'h0, 32'hFFFF_FFFF, 32'h0000_0001, 32'h8000_0000};
  int checks = 0, failures = 0, cycle = 0;
  int n_hit = 0, n_inv = 0, n_raw = 0;
  word_t exp_w [$];
  int    exp_t [$];

  fevcbi_node #(.NODE_ID(ME)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bus_lines <= '0; bus_valid <= 0; bus_last <= 0; bus_dst <= '0; bus_src <= '0;
    end else begin
      if (drv_valid) bus_lines <= drv_lines;
      bus_valid <= drv_valid; bus_last <= drv_last; bus_dst <= drv_dst; bus_src <= 3'(ME);
    end

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  bit running = 0, driving = 0;
  always @(negedge clk) if (running) begin
    cycle++;
    check(tx_ready == bus_grant && bus_req == tx_valid, "handshake wiring");
    if (bus_valid) begin
      if (bus_lines.fv_en) n_hit++; else if (bus_lines.inv) n_inv++; else n_raw++;
    end
    if (rx_valid) begin
      check(exp_w.size() > 0, "unexpected word");
      if (exp_w.size() > 0) begin
        word_t w; int t;
        w = exp_w.pop_front(); t = exp_t.pop_front();
        check(rx_data == w, $sformatf("rx got %h exp %h", rx_data, w));
        check(cycle - t == 3, $sformatf("latency %0d", cycle - t));
        check(rx_src == 3'(ME), "rx_src");
      end
    end
    tx_valid  = driving && ($urandom_range(4) != 0);
    bus_grant = ($urandom_range(4) != 0);
    tx_data   = ($urandom_range(1) == 0) ? tbl[$urandom_range(3)] : $urandom();
    tx_dst    = ($urandom_range(5) == 0) ? 3'd3 : 3'(ME);
    tx_last   = $urandom_range(1);
    if (tx_valid && bus_grant && tx_dst == 3'(ME)) begin
      exp_w.push_back(tx_data); exp_t.push_back(cycle);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); cfg_we = 1; cfg_idx = 2'(i); cfg_value = tbl[i];
    end
    @(negedge clk); cfg_we = 0;
    running = 1; driving = 1;
    repeat (3000) @(posedge clk);
    driving = 0;
    repeat (6) @(posedge clk);
    check(exp_w.size() == 0, "all words returned");
    check(n_hit > 0 && n_inv > 0 && n_raw > 0, "all transfer kinds seen");
    $display("index=%0d inverted=%0d plain=%0d", n_hit, n_inv, n_raw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
