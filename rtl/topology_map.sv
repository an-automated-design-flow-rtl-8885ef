// topology_map - link interconnection of the simulator.
//
// The hypercell has NPORT input and NPORT output link ports. For the cell
// being evaluated, this block gives the link-memory address behind each port,
// following the ring topology of seqsim_pkg: output port p of cell c writes
// link c*NPORT+p; input port p reads the link of the neighbour's output port p.
// This replaces the physical wires of the parallel system by addresses into
// the link memory. Purely combinational.
module topology_map
  import seqsim_pkg::*;
#(
  parameter int unsigned NUM_CELLS = 64,
  parameter int unsigned NPORT     = 1,
  parameter int unsigned CELL_W    = (NUM_CELLS > 1) ? $clog2(NUM_CELLS) : 1,
  parameter int unsigned LIDX_W    = (NUM_CELLS * NPORT > 1) ? $clog2(NUM_CELLS * NPORT) : 1
) (
  input  logic [CELL_W-1:0] cell_idx,
  output logic [LIDX_W-1:0] in_addr  [NPORT],
  output logic [LIDX_W-1:0] out_addr [NPORT]
);

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      in_addr[p]  = LIDX_W'(in_link(int'(cell_idx), p, NUM_CELLS, NPORT));
      out_addr[p] = LIDX_W'(out_link(int'(cell_idx), p, NPORT));
    end
  end

endmodule
