// sim_ctrl - scheduler and controller of the sequential simulator.
//
// Runs `num_cycles` system cycles of the simulated system after `start`.
// A system cycle is a sequence of delta cycles, each evaluating one cell:
//   CLEAR : clear every HBR bit (all cells non-stable), pointer of the
//           round-robin scheduler back to cell 0                  (1 clock)
//   RUN   : each clock, grant the next non-stable cells, one per hypercell
//           instance (LANES), (issue stage: their states are read from the
//           state memory) while the cells issued the clock before are
//           evaluated (evaluate stage: hypercells, link memory and state
//           write-back). Cells in the evaluate stage are masked from the
//           scheduler, because their HBR bits are updated only at the end of
//           that clock. When no cell is in flight and every cell is stable,
//           the system cycle is complete: the state banks swap (new state
//           becomes current) and the next system cycle starts, or the
//           controller returns to IDLE and pulses `done`.
// With one instance and a chain of cells evaluated in order, a system cycle
// without re-evaluation takes NUM_CELLS + 3 clocks; every re-evaluation that
// follows a clock with nothing to issue costs 2 more.
// The HBR-driven schedule and the round-robin policy follow the source; the
// two-stage issue/evaluate pipeline and the statistics counters are this
// design's choices. Several hypercell instances are allowed by the source; how
// they share the work (one scheduler granting up to LANES cells per clock) is
// this design's own. Counters: completed system cycles, evaluations (delta
// cycles), changed link writes and re-reads (links invalidated after their
// consumer had read them).
module sim_ctrl #(
  parameter int unsigned NUM_CELLS = 64,
  parameter int unsigned NPORT     = 1,
  parameter int unsigned LANES     = 1,
  parameter int unsigned CELL_W    = (NUM_CELLS > 1) ? $clog2(NUM_CELLS) : 1,
  parameter int unsigned CNT_W     = $clog2(LANES * NPORT + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [31:0]          num_cycles,
  output logic                 busy,
  output logic                 done,
  // link memory status
  input  logic [NUM_CELLS-1:0] stable,
  input  logic [CNT_W-1:0]     n_changed,
  input  logic [CNT_W-1:0]     n_reread,
  output logic                 clear_hbr,
  // issue stage (state memory read)
  output logic [LANES-1:0]     issue,
  output logic [CELL_W-1:0]    issue_cell [LANES],
  // evaluate stage (hypercell, link memory, state write-back)
  output logic [LANES-1:0]     ev_valid,
  output logic [CELL_W-1:0]    ev_cell    [LANES],
  output logic                 bank,
  // statistics
  output logic [31:0]          sys_cycles,
  output logic [31:0]          evals,
  output logic [31:0]          changes,
  output logic [31:0]          rereads
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN} state_t;
  state_t state;

  logic [31:0]          remaining;
  logic [NUM_CELLS-1:0] req;
  logic [LANES-1:0]     gnt_valid;
  logic [CELL_W-1:0]    gnt_idx [LANES];
  localparam int unsigned EV_W = $clog2(LANES + 1);
  logic [EV_W-1:0]      n_ev;
  logic                 cycle_end;

  always_comb begin
    req = '0;
    if (state == S_RUN) begin
      req = ~stable;
      for (int h = 0; h < LANES; h++)
        if (ev_valid[h]) req[ev_cell[h]] = 1'b0;
    end
  end

  rr_scheduler #(.N(NUM_CELLS), .G(LANES), .IDX_W(CELL_W)) u_sched (
    .clk(clk), .rst_n(rst_n), .restart(clear_hbr), .req(req), .take(state == S_RUN),
    .gnt_valid(gnt_valid), .gnt_idx(gnt_idx)
  );

  assign busy       = (state != S_IDLE);
  assign clear_hbr  = (state == S_CLEAR);
  assign issue      = (state == S_RUN) ? gnt_valid : '0;
  assign issue_cell = gnt_idx;
  assign cycle_end  = (state == S_RUN) && !(|ev_valid) && (&stable);

  always_comb begin
    n_ev = '0;
    for (int h = 0; h < LANES; h++) n_ev += EV_W'(ev_valid[h]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      remaining  <= '0;
      ev_valid   <= '0;
      for (int h = 0; h < LANES; h++) ev_cell[h] <= '0;
      bank       <= 1'b0;
      done       <= 1'b0;
      sys_cycles <= '0;
      evals      <= '0;
      changes    <= '0;
      rereads    <= '0;
    end else begin
      done     <= 1'b0;
      ev_valid <= issue;
      ev_cell  <= gnt_idx;
      evals   <= evals + 32'(n_ev);
      changes <= changes + 32'(n_changed);
      rereads <= rereads + 32'(n_reread);
      unique case (state)
        S_IDLE: if (start && num_cycles != 0) begin
          remaining <= num_cycles;
          state     <= S_CLEAR;
        end
        S_CLEAR: state <= S_RUN;
        S_RUN: if (cycle_end) begin
          bank       <= ~bank;
          sys_cycles <= sys_cycles + 1;
          remaining  <= remaining - 1;
          if (remaining == 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_CLEAR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_issue_only_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    |issue |-> state == S_RUN);
  a_no_double_issue: assert property (@(posedge clk) disable iff (!rst_n)
    (issue[0] && ev_valid[0]) |-> issue_cell[0] != ev_cell[0]);

endmodule
