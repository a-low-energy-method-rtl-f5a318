// bus_arbiter -- block-at-a-time round-robin arbiter for the shared bus.
//
// The nodes take turns on the single data bus. When the bus is free the
// first requester at or after the round-robin pointer is granted at once
// (combinationally). A grant is held until the owner's word marked last is
// accepted (req && last while granted); the pointer then moves past the
// owner so the others are served before it is served again. grant is
// one-hot or zero.
//
// From the source design: the data bus is used alternately by the nodes to
// reach the shared L2. Own choices: round-robin order, whole-block grants
// and a zero-cycle grant on a free bus.
module bus_arbiter #(
  parameter int unsigned N   = 5,
  parameter int unsigned ID_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic [N-1:0] last,
  output logic [N-1:0] grant
);

  logic            locked;
  logic [ID_W-1:0] owner, ptr;
  logic [ID_W-1:0] pick, sel;
  logic            any;

  // Round-robin pick: first requester at or after ptr.
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned c;
      c = (32'(ptr) + k) % N;
      if (!any && req[c]) begin
        any  = 1'b1;
        pick = ID_W'(c);
      end
    end
  end

  always_comb begin
    grant = '0;
    sel   = locked ? owner : pick;
    if (locked || any) grant[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
      ptr    <= '0;
    end else if (|(grant & req)) begin
      if (last[sel]) begin
        locked <= 1'b0;
        ptr    <= ID_W'((32'(sel) + 1) % N);
      end else begin
        locked <= 1'b1;
        owner  <= sel;
      end
    end
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
