// tb_bus_arbiter -- self-checking test of the block round-robin arbiter.
// A reference model in the testbench tracks the owner and the round-robin
// pointer; random requests and last flags are applied and every cycle's
// grant vector is compared with the model. Also checks that a block is never
// interrupted and that a waiting requester was seen.
module tb_bus_arbiter;
  localparam int unsigned N = 5;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, last = '0, grant;
  int checks = 0, failures = 0, n_wait = 0, n_switch = 0;

  bus_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

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

  bit m_locked = 0;
  int m_owner = 0, m_ptr = 0, prev_owner = -1;

  always @(negedge clk) if (rst_n) begin
    logic [N-1:0] e;
    int s;
    req  = '0;
    last = '0;
    for (int i = 0; i < N; i++) begin
      req[i]  = ($urandom_range(2) != 0);
      last[i] = ($urandom_range(3) == 0);
    end
    // keep the owner requesting most of the time
    if (m_locked && $urandom_range(5) != 0) req[m_owner] = 1;
    #1;
    e = '0; s = -1;
    if (m_locked) s = m_owner;
    else for (int k = 0; k < N; k++) if (s < 0 && req[(m_ptr + k) % N]) s = (m_ptr + k) % N;
    if (s >= 0) e[s] = 1;
    check(grant == e, $sformatf("grant %b exp %b", grant, e));
    if (s >= 0 && req[s]) begin
      if ($countones(req) > 1) n_wait++;
      if (prev_owner >= 0 && prev_owner != s) n_switch++;
      prev_owner = s;
      if (last[s]) begin m_locked = 0; m_ptr = (s + 1) % N; end
      else begin m_locked = 1; m_owner = s; end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    repeat (4000) @(posedge clk);
    check(n_wait > 0 && n_switch > 0, "contention and hand-over seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
