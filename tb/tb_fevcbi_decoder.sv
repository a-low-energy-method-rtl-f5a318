// tb_fevcbi_decoder -- self-checking test of the receiver half of the coder.
// Drives line states covering index transfers, inverted and plain words and
// transfers to other nodes; the testbench plays the FEVC read port. Each
// transfer addressed to the decoder must come out one cycle later with the
// original word, its last flag and its sender.
module tb_fevcbi_decoder;
  import fevcbi_pkg::*;

  localparam int unsigned ME = 2;

  logic clk = 0, rst_n = 0;
  logic bus_valid = 0, bus_last = 0;
  bus_lines_t bus_lines = '0;
  logic [2:0] bus_dst = '0, bus_src = '0;
  logic [1:0] rd_idx;
  word_t rd_value, out_data;
  logic out_valid, out_last;
  logic [2:0] out_src;

  word_t tbl [4] = '{32'hCAFE_0000, 32'h0000_00FF, 32'h7FFF_FFFF, 32'h0000_0004};
  int checks = 0, failures = 0;
  int n_hit = 0, n_inv = 0, n_raw = 0, n_other = 0;

  fevcbi_decoder #(.NODE_ID(ME)) dut (.*);

  assign rd_value = tbl[rd_idx];

  always #5 clk = ~clk;

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

  bit pend_v = 0, pend_last;
  word_t pend_w;
  logic [2:0] pend_src;

  always @(negedge clk) if (rst_n) begin
    word_t w;
    int kind;
    check(out_valid == pend_v, "out_valid one cycle after the bus");
    if (pend_v && out_valid) begin
      check(out_data == pend_w, $sformatf("data got %h exp %h", out_data, pend_w));
      check(out_last == pend_last && out_src == pend_src, "sideband");
    end
    kind = $urandom_range(2);
    bus_valid = ($urandom_range(3) != 0);
    bus_dst   = ($urandom_range(3) == 0) ? 3'($urandom_range(4)) : 3'(ME);
    bus_src   = 3'($urandom_range(4));
    bus_last  = $urandom_range(1);
    w = $urandom();
    bus_lines.data = $urandom();
    bus_lines.inv  = $urandom_range(1);
    if (kind == 0) begin
      bus_lines.fv_en = 1;
      bus_lines.data[1:0] = 2'($urandom_range(3));
      w = tbl[bus_lines.data[1:0]];
    end else begin
      bus_lines.fv_en = 0;
      bus_lines.inv   = (kind == 1);
      bus_lines.data  = (kind == 1) ? ~w : w;
    end
    pend_v = bus_valid && (bus_dst == 3'(ME));
    pend_w = w; pend_last = bus_last; pend_src = bus_src;
    if (pend_v) begin
      if (kind == 0) n_hit++; else if (kind == 1) n_inv++; else n_raw++;
    end else if (bus_valid) n_other++;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3000) @(posedge clk);
    check(n_hit > 0 && n_inv > 0 && n_raw > 0 && n_other > 0, "all transfer kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
