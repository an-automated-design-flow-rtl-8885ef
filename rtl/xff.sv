// xff - combinational replacement of an extracted flip-flop.
//
// State extraction removes every flip-flop from a cell. What remains of a
// flip-flop is its D/enable/clear inputs and Q output, plus two new ports: the
// old state S[t], read from the state memory, and the new state S[t+1], written
// back to it. Q is the old state. The new state follows the flip-flop's rule:
//   plain D flip-flop          S[t+1] = D                        (HAS_EN=0, HAS_CLR=0)
//   D flip-flop with enable    S[t+1] = en ? D : S[t]            (HAS_EN=1)
//   with synchronous clear     S[t+1] = clr ? CLR_VAL : (...)    (HAS_CLR=1)
// The plain and enable forms are the replacements of the source; the
// synchronous clear is this design's own example of a flip-flop "with reset"
// that needs extra combinational logic. Only rising-edge flip-flops are covered.
// Purely combinational, no clock.
module xff #(
  parameter int unsigned     W       = 1,
  parameter bit              HAS_EN  = 1'b1,
  parameter bit              HAS_CLR = 1'b0,
  parameter logic [W-1:0]    CLR_VAL = '0
) (
  input  logic [W-1:0] d,        // original D input
  input  logic         en,       // original enable (ignored if HAS_EN = 0)
  input  logic         clr,      // original synchronous clear (ignored if HAS_CLR = 0)
  input  logic [W-1:0] s_old,    // S_p[t] from the state memory
  output logic [W-1:0] s_new,    // S_p[t+1] to the state memory
  output logic [W-1:0] q         // original Q output
);

  always_comb begin
    q     = s_old;
    s_new = d;
    if (HAS_EN && !en)   s_new = s_old;
    if (HAS_CLR && clr)  s_new = CLR_VAL;
  end

endmodule
