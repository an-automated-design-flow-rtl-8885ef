// seq_simulator - FPGA-style sequential simulator of a ring of identical cells.
//
// The simulated system is NUM_CELLS copies of one synchronous cell connected in
// a ring by links (wires without registers), each cell being a Mealy machine:
// O = G(I, S), S' = F(I, S). Instead of instantiating every cell, the simulator
// holds one state-extracted copy of the cell logic (hypercell), or LANES
// copies working side by side, and evaluates the cells one after another, one
// per delta cycle and copy:
//   state_mem    current and new state of every cell (two banks)
//   link_mem     latest value of every link plus its has-been-read (HBR) bit
//   sim_ctrl     HBR-driven round-robin scheduler and system-cycle controller
//   hypercell    F and G of one cell, combinational
// A cell is evaluated again whenever a link it has already read changes, so
// the result of every system cycle equals one clock of the parallel system,
// independent of the evaluation order, provided the parallel system has no
// combinational loop.
//
// Host interface (this design's own): while idle (busy = 0) the host loads the
// initial state of cell host_ld_entity with host_ld_en, and reads a cell's
// current state on host_rd_state one clock after presenting host_rd_entity.
// host_link_val is the stored value of link host_link_idx (combinational).
// start with num_cycles > 0 runs that many system cycles; done pulses for one
// clock at the end. Link words are cleared by rst_n.
module seq_simulator
  import seqsim_pkg::*;
#(
  parameter int unsigned NUM_CELLS = 64,   // cells of the simulated system
  parameter int unsigned NPORT     = 1,    // link ports per cell and direction
  parameter int unsigned LANES     = 1,    // hypercell instances
  parameter int unsigned CELL_W    = (NUM_CELLS > 1) ? $clog2(NUM_CELLS) : 1,
  parameter int unsigned LIDX_W    = (NUM_CELLS * NPORT > 1) ? $clog2(NUM_CELLS * NPORT) : 1,
  parameter int unsigned CNT_W     = $clog2(LANES * NPORT + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       num_cycles,
  output logic              busy,
  output logic              done,
  input  logic              host_ld_en,
  input  logic [CELL_W-1:0] host_ld_entity,
  input  cell_state_t       host_ld_state,
  input  logic [CELL_W-1:0] host_rd_entity,
  output cell_state_t       host_rd_state,
  input  logic [LIDX_W-1:0] host_link_idx,
  output logic [LINK_W-1:0] host_link_val,
  output logic [31:0]       sys_cycles,
  output logic [31:0]       evals,
  output logic [31:0]       changes,
  output logic [31:0]       rereads
);

  logic                 clear_hbr, bank;
  logic [LANES-1:0]     issue, ev_valid, rd_en;
  logic [CELL_W-1:0]    issue_cell [LANES];
  logic [CELL_W-1:0]    ev_cell    [LANES];
  logic [CELL_W-1:0]    rd_addr    [LANES];
  logic [NUM_CELLS-1:0] stable;
  logic [CNT_W-1:0]     n_changed, n_reread;
  cell_state_t          s_old [LANES];
  cell_state_t          s_new [LANES];
  logic [LINK_W-1:0]    in_val  [LANES][NPORT];
  logic [LINK_W-1:0]    out_val [LANES][NPORT];

  sim_ctrl #(.NUM_CELLS(NUM_CELLS), .NPORT(NPORT), .LANES(LANES), .CELL_W(CELL_W), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .start, .num_cycles, .busy, .done,
    .stable, .n_changed, .n_reread, .clear_hbr,
    .issue, .issue_cell, .ev_valid, .ev_cell, .bank,
    .sys_cycles, .evals, .changes, .rereads
  );

  // Port 0 of the state memory serves the host while the simulator is idle.
  always_comb begin
    rd_en   = issue;
    rd_addr = issue_cell;
    if (!busy) begin
      rd_en[0]   = 1'b1;
      rd_addr[0] = host_rd_entity;
    end
  end

  state_mem #(.ENTITIES(NUM_CELLS), .PORTS(LANES), .ADDR_W(CELL_W)) u_state (
    .clk, .bank,
    .rd_en   (rd_en),
    .rd_addr (rd_addr),
    .rd_data (s_old),
    .wr_en   (ev_valid),
    .wr_data (s_new),
    .ld_en   (host_ld_en && !busy),
    .ld_addr (host_ld_entity),
    .ld_data (host_ld_state)
  );
  assign host_rd_state = s_old[0];

  for (genvar h = 0; h < LANES; h++) begin : g_cell
    hypercell #(.NPORT(NPORT), .CELL_W(CELL_W)) u_cell (
      .cell_id(ev_cell[h]), .s_old(s_old[h]), .s_new(s_new[h]),
      .in_val(in_val[h]), .out_val(out_val[h])
    );
  end

  link_mem #(.NUM_CELLS(NUM_CELLS), .NPORT(NPORT), .LANES(LANES), .CELL_W(CELL_W), .LIDX_W(LIDX_W), .CNT_W(CNT_W)) u_link (
    .clk, .rst_n, .clear_hbr, .ev_valid, .ev_cell, .in_val, .out_val,
    .stable, .n_changed, .n_reread, .host_idx(host_link_idx), .host_val(host_link_val)
  );

endmodule
