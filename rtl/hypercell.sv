// hypercell - state-extracted example cell of the simulated ring.
//
// In the parallel system every cell computes its outputs O = G(I, S) and its
// next state S' = F(I, S) from its link inputs I and its registers S. In the
// hypercell the registers are gone (replaced by xff primitives): S comes in as
// `s_old` from the state memory, S' leaves as `s_new`, and one instance of the
// logic serves every cell of the ring in turn. `cell_id` is the cell being
// evaluated; it keeps the small per-cell differences (here: the local address)
// the way a hypercell preserves them, by selecting logic per delta cycle.
//
// The function of this cell is this design's own example (the router used as
// hypercell in the source is not described there). It is a Mealy cell, so
// changes ripple along the links within one system cycle:
//   cell 0:     O[p] = acc ^ cnt ^ p            (depends on state only, so the
//                                                 ring has no combinational loop)
//   cell c > 0: O[p] = I[p] + acc               (combinational path I -> O)
//   acc' = I[0][0] ? acc + (xor of all I[p]) + cell_id : acc   (flip-flop with enable)
//   cnt' = (I[0][3:0] == 4'hF) ? 0 : cnt + 1                   (flip-flop with sync clear)
// Purely combinational.
module hypercell
  import seqsim_pkg::*;
#(
  parameter int unsigned NPORT   = 1,
  parameter int unsigned CELL_W  = 6
) (
  input  logic [CELL_W-1:0]   cell_id,
  input  cell_state_t         s_old,
  output cell_state_t         s_new,
  input  logic [LINK_W-1:0]   in_val  [NPORT],
  output logic [LINK_W-1:0]   out_val [NPORT]
);

  logic [DATA_W-1:0] acc_q, cnt_q, acc_d, cnt_d;
  logic [LINK_W-1:0] in_fold;

  always_comb begin
    in_fold = '0;
    for (int p = 0; p < NPORT; p++) in_fold ^= in_val[p];
  end

  assign acc_d = acc_q + DATA_W'(in_fold) + DATA_W'(cell_id);
  assign cnt_d = cnt_q + 1'b1;

  xff #(.W(DATA_W), .HAS_EN(1'b1), .HAS_CLR(1'b0)) u_acc (
    .d(acc_d), .en(in_val[0][0]), .clr(1'b0),
    .s_old(s_old.acc), .s_new(s_new.acc), .q(acc_q)
  );

  xff #(.W(DATA_W), .HAS_EN(1'b0), .HAS_CLR(1'b1), .CLR_VAL('0)) u_cnt (
    .d(cnt_d), .en(1'b1), .clr(in_val[0][3:0] == 4'hF),
    .s_old(s_old.cnt), .s_new(s_new.cnt), .q(cnt_q)
  );

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      if (cell_id == '0) out_val[p] = LINK_W'(acc_q ^ cnt_q) ^ LINK_W'(p);
      else               out_val[p] = in_val[p] + LINK_W'(acc_q);
    end
  end

endmodule
