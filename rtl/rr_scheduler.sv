// rr_scheduler - picks the next non-stable cells to evaluate.
//
// req[c] is set for every cell that must be evaluated (not stable and not
// already being evaluated). The scheduler grants up to G requesting cells per
// clock, one per hypercell instance: the first G requests found at or after
// its pointer, wrapping around. On `take` the pointer moves to the cell after
// the last granted one. `restart` (start of a system cycle) returns the pointer
// to cell 0, so every system cycle begins with cell 0, 1, 2, ... as in the
// three-router schedule example. Round-robin is the example policy named by
// the source; the restart at cell 0 is read from that example, and the
// multi-grant form for several hypercell instances is this design's own.
// Grants are combinational from req and the pointer; the pointer is a register.
// gnt_valid is filled from grant 0 upward.
module rr_scheduler #(
  parameter int unsigned N     = 64,
  parameter int unsigned G     = 1,
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic [N-1:0]     req,
  input  logic             take,
  output logic [G-1:0]     gnt_valid,
  output logic [IDX_W-1:0] gnt_idx [G]
);

  logic [IDX_W-1:0] ptr;
  logic [IDX_W-1:0] last_idx;

  always_comb begin
    int unsigned idx, n;
    gnt_valid = '0;
    last_idx  = ptr;
    n         = 0;
    for (int unsigned g = 0; g < G; g++) gnt_idx[g] = '0;
    for (int unsigned i = 0; i < N; i++) begin
      idx = int'(ptr) + i;
      if (idx >= N) idx -= N;
      if (n < G && req[idx]) begin
        gnt_valid[n] = 1'b1;
        gnt_idx[n]   = IDX_W'(idx);
        last_idx     = IDX_W'(idx);
        n++;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   ptr <= '0;
    else if (restart)             ptr <= '0;
    else if (take && gnt_valid[0]) ptr <= (int'(last_idx) == N - 1) ? '0 : last_idx + 1'b1;
  end

  a_grant_is_request: assert property (@(posedge clk) disable iff (!rst_n)
    gnt_valid[0] |-> req[gnt_idx[0]]);

endmodule
