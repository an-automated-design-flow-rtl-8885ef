// link_mem - link memory with has-been-read (HBR) status bits.
//
// Every link of the simulated system has one word here holding its most
// recent value (a link has no register in the real system, so there is no
// old/new pair as in the state memory), and one HBR bit that says whether the
// value now stored has been read by the cell that consumes the link.
//
// Per evaluation (ev_valid[h], cell ev_cell[h], one per hypercell instance h),
// in one clock:
//   * in_val gives the words behind the cell's input ports (asynchronous read);
//   * at the clock edge the HBR bits of those input links are set (read);
//   * each output word out_val that differs from the stored word is written and
//     that link's HBR bit is cleared, so its consumer becomes non-stable again.
//     An unchanged output leaves word and HBR bit alone.
// With several instances evaluating in the same clock, all read the words as
// they were before the clock, and the clearing by a changed output wins over
// the setting by a read, so a cell that read a link another instance changed
// in the same clock is evaluated again.
// clear_hbr clears every HBR bit at the start of a system cycle. A cell is
// stable when the HBR bits of all its input links are set; `stable` gives that
// per cell. The grouping of a link's signals into one word, the single word per
// link and the HBR rules follow the source; the one-clock read-modify-write and
// the reset of all words to zero are this design's choices, as is the port
// per instance.
// Statistics per clock over all instances: n_changed counts written (changed)
// outputs, n_reread counts links whose HBR bit was set before the clock and is
// cleared by it, i.e. links whose consumer had already read them and must be
// evaluated again.
module link_mem
  import seqsim_pkg::*;
#(
  parameter int unsigned NUM_CELLS = 64,
  parameter int unsigned NPORT     = 1,
  parameter int unsigned LANES     = 1,
  parameter int unsigned CELL_W    = (NUM_CELLS > 1) ? $clog2(NUM_CELLS) : 1,
  parameter int unsigned NUM_LINKS = NUM_CELLS * NPORT,
  parameter int unsigned LIDX_W    = (NUM_LINKS > 1) ? $clog2(NUM_LINKS) : 1,
  parameter int unsigned CNT_W     = $clog2(LANES * NPORT + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear_hbr,
  input  logic [LANES-1:0]     ev_valid,
  input  logic [CELL_W-1:0]    ev_cell [LANES],
  output logic [LINK_W-1:0]    in_val  [LANES][NPORT],
  input  logic [LINK_W-1:0]    out_val [LANES][NPORT],
  output logic [NUM_CELLS-1:0] stable,
  output logic [CNT_W-1:0]     n_changed,
  output logic [CNT_W-1:0]     n_reread,
  input  logic [LIDX_W-1:0]    host_idx,
  output logic [LINK_W-1:0]    host_val
);

  logic [LINK_W-1:0]    mem [NUM_LINKS];
  logic [NUM_LINKS-1:0] hbr;
  logic [LIDX_W-1:0]    in_addr  [LANES][NPORT];
  logic [LIDX_W-1:0]    out_addr [LANES][NPORT];

  for (genvar h = 0; h < LANES; h++) begin : g_lane
    topology_map #(.NUM_CELLS(NUM_CELLS), .NPORT(NPORT), .CELL_W(CELL_W), .LIDX_W(LIDX_W)) u_topo (
      .cell_idx(ev_cell[h]), .in_addr(in_addr[h]), .out_addr(out_addr[h])
    );
  end

  always_comb begin
    for (int h = 0; h < LANES; h++)
      for (int p = 0; p < NPORT; p++) in_val[h][p] = mem[in_addr[h][p]];
  end
  assign host_val = mem[host_idx];

  // Stable flags: all input links of a cell have been read.
  always_comb begin
    for (int c = 0; c < NUM_CELLS; c++) begin
      stable[c] = 1'b1;
      for (int p = 0; p < NPORT; p++)
        if (!hbr[in_link(c, p, NUM_CELLS, NPORT)]) stable[c] = 1'b0;
    end
  end

  always_comb begin
    n_changed = '0;
    n_reread  = '0;
    for (int h = 0; h < LANES; h++) begin
      if (ev_valid[h]) begin
        for (int p = 0; p < NPORT; p++) begin
          if (out_val[h][p] != mem[out_addr[h][p]]) begin
            n_changed++;
            if (hbr[out_addr[h][p]]) n_reread++;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hbr <= '0;
      for (int l = 0; l < NUM_LINKS; l++) mem[l] <= '0;
    end else if (clear_hbr) begin
      hbr <= '0;
    end else begin
      for (int h = 0; h < LANES; h++)
        if (ev_valid[h])
          for (int p = 0; p < NPORT; p++) hbr[in_addr[h][p]] <= 1'b1;
      // Outputs after inputs: a changed output wins over a read of the same link.
      for (int h = 0; h < LANES; h++)
        if (ev_valid[h])
          for (int p = 0; p < NPORT; p++)
            if (out_val[h][p] != mem[out_addr[h][p]]) begin
              mem[out_addr[h][p]] <= out_val[h][p];
              hbr[out_addr[h][p]] <= 1'b0;
            end
    end
  end

  a_no_eval_during_clear: assert property (@(posedge clk) disable iff (!rst_n)
    !(clear_hbr && |ev_valid));

endmodule
