// seqsim_pkg - types, sizes and the topology shared by the sequential simulator.
//
// A ring of identical cells (a "system") is simulated by one combinational
// hypercell that is evaluated once per delta cycle for one cell. The cells of
// the ring exchange data over links; every output port of every cell drives
// exactly one link. Link index = cell * NPORT + port.
//
// Topology: input port p of cell c reads the link written by output port p of
// a neighbour. Even ports come from cell c-1 (the unidirectional ring of the
// three-router example), odd ports from cell c+1 (the reverse direction when a
// second port is configured). The ring itself follows the example system; the
// port numbering and the reverse direction are this design's own choice.
//
// The data widths belong to the example hypercell (see hypercell.sv): a link
// carries one 16-bit word, a cell's state is two 16-bit registers.
package seqsim_pkg;

  localparam int unsigned LINK_W = 16;   // width of one link word
  localparam int unsigned DATA_W = 16;   // width of a cell register

  // State of one simulated cid, as it is held in the state memory.
  typedef struct packed {
    logic [DATA_W-1:0] acc;   // accumulator register (flip-flop with enable)
    logic [DATA_W-1:0] cnt;   // counter register (flip-flop with sync clear)
  } cell_state_t;

  localparam int unsigned STATE_W = $bits(cell_state_t);

  // Cell that drives input port `port` of cell `cell`.
  function automatic int unsigned src_cell(int unsigned cid, int unsigned port,
                                           int unsigned ncells);
    if (port % 2 == 0) return (cid == 0) ? ncells - 1 : cid - 1;
    else               return (cid == ncells - 1) ? 0 : cid + 1;
  endfunction

  // Link read by input port `port` of cell `cell`.
  function automatic int unsigned in_link(int unsigned cid, int unsigned port,
                                          int unsigned ncells, int unsigned nport);
    return src_cell(cid, port, ncells) * nport + port;
  endfunction

  // Link written by output port `port` of cell `cell`.
  function automatic int unsigned out_link(int unsigned cid, int unsigned port,
                                           int unsigned nport);
    return cid * nport + port;
  endfunction

endpackage
