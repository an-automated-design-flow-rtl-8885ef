// state_mem - state memory holding the current and the new state of every cell.
//
// Two banks of ENTITIES words each. `bank` names the bank holding the current
// state S[t]; evaluations write S[t+1] into the other bank, and the controller
// swaps the roles at the end of a system cycle instead of copying new to
// current (the banks alternate from one system cycle to the next).
//
// One read and one write port per hypercell instance (PORTS), all clocked by
// the simulator clock:
//   clock k   : rd_en/rd_addr (E_addr) are sampled; the read address is also
//               registered as the write address (E'_addr)
//   clock k+1 : rd_data = S[t] of that entity; the hypercell returns wr_data;
//               at the edge ending k+1 it is written to the new bank at E'_addr
// so an evaluation occupies one clock of each port and a new one can start
// every clock. The read-address / registered write-address arrangement follows
// the memory connection of the source; the ping-pong banks, the port count per
// hypercell and the host load port (ld_*, writes the current bank, used to set
// the initial state while the simulator is idle) are this design's choices.
// Ports write distinct entities; load and evaluation writes must not coincide.
module state_mem
  import seqsim_pkg::*;
#(
  parameter int unsigned ENTITIES = 64,
  parameter int unsigned PORTS    = 1,
  parameter int unsigned ADDR_W   = (ENTITIES > 1) ? $clog2(ENTITIES) : 1
) (
  input  logic                clk,
  input  logic                bank,             // bank of the current state
  input  logic [PORTS-1:0]    rd_en,
  input  logic [ADDR_W-1:0]   rd_addr [PORTS],  // E_addr
  output cell_state_t         rd_data [PORTS],  // S[t], one clock after rd_en
  input  logic [PORTS-1:0]    wr_en,            // write the new state of the entity read last clock
  input  cell_state_t         wr_data [PORTS],  // S[t+1]
  input  logic                ld_en,
  input  logic [ADDR_W-1:0]   ld_addr,
  input  cell_state_t         ld_data
);

  cell_state_t       mem [2][ENTITIES];
  logic [ADDR_W-1:0] wr_addr [PORTS];   // E'_addr: read address delayed by one clock

  always_ff @(posedge clk) begin
    for (int p = 0; p < PORTS; p++) begin
      if (rd_en[p]) rd_data[p] <= mem[bank][rd_addr[p]];
      wr_addr[p] <= rd_addr[p];
      if (wr_en[p]) mem[~bank][wr_addr[p]] <= wr_data[p];
    end
    if (ld_en && !(|wr_en)) mem[bank][ld_addr] <= ld_data;
  end

  a_no_load_during_eval: assert property (@(posedge clk) !(|wr_en && ld_en));

endmodule
