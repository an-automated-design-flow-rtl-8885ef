// tb_seq_simulator_ring3 - the three-cell unidirectional ring of the schedule
// example: every system cycle must evaluate cells 0, 1, 2 in this order and
// then cell 0 once more exactly when cell 2 changed the link cell 0 had
// already read (the host reloads cell 0 every third system cycle so that
// both cases occur). The delta order is recorded from the evaluate stage and
// compared with that prediction; otherwise as the 64-cell test:
//
// Loads random initial states, runs system cycles (one at a time, then several
// per start) and after every run compares each cell's state and every link
// word with a reference model of the parallel ring: all cells updated at once
// from outputs settled in dependency order (cell 0 first, then 1, 2, ...).
// The number of evaluations and of busy clocks per system cycle is checked
// against the schedule the reference predicts: N evaluations and N+3 clocks,
// plus one evaluation and 2 clocks when the last cell changes the link cell 0
// has already read. Mechanisms counted (each must occur): re-evaluation after
// an invalidated HBR bit, an unchanged link write, bank swap, multi-cycle run,
// enable low and high in the acc flip-flop, the synchronous clear of cnt.
module tb_seq_simulator_ring3;
  import seqsim_pkg::*;

  localparam int N      = 3;
  localparam int CELL_W = $clog2(N);
  localparam int LIDX_W = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] num_cycles = '0;
  logic busy, done;
  logic host_ld_en = 1'b0;
  logic [CELL_W-1:0] host_ld_entity = '0, host_rd_entity = '0;
  cell_state_t host_ld_state = '0, host_rd_state;
  logic [LIDX_W-1:0] host_link_idx = '0;
  logic [LINK_W-1:0] host_link_val;
  logic [31:0] sys_cycles, evals, changes, rereads;

  seq_simulator #(.NUM_CELLS(N)) dut (.*);

  // delta order of the current run, from the evaluate stage
  int order [$];
  int n_order_ok = 0, n_with_reeval = 0, n_without = 0;
  always @(posedge clk) if (rst_n && dut.ev_valid[0]) order.push_back(int'(dut.ev_cell[0]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reeval = 0, n_unchanged = 0, n_swap = 0, n_multi = 0;
  int n_en0 = 0, n_en1 = 0, n_clr = 0;

  // reference model of the parallel system
  logic [15:0] r_acc [N], r_cnt [N], r_link [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One clock of the parallel ring; returns expected evaluations and clocks.
  task automatic ref_step(output int exp_evals, output int exp_clocks);
    logic [15:0] o [N];
    logic [15:0] i;
    o[0] = r_acc[0] ^ r_cnt[0];
    for (int c = 1; c < N; c++) o[c] = o[c-1] + r_acc[c];
    exp_evals  = N;
    exp_clocks = N + 3;
    if (o[N-1] != r_link[N-1]) begin
      exp_evals++;
      exp_clocks += 2;
      n_reeval++;
    end
    for (int c = 0; c < N; c++) begin
      i = (c == 0) ? o[N-1] : o[c-1];
      if (i[0]) begin
        r_acc[c] = r_acc[c] + i + 16'(c);
        n_en1++;
      end else n_en0++;
      if (i[3:0] == 4'hF) begin
        r_cnt[c] = '0;
        n_clr++;
      end else r_cnt[c] = r_cnt[c] + 1;
    end
    for (int c = 0; c < N; c++) r_link[c] = o[c];
  endtask

  task automatic compare_all();
    for (int c = 0; c < N; c++) begin
      host_rd_entity = CELL_W'(c);
      host_link_idx  = LIDX_W'(c);
      @(posedge clk); #1;
      check(host_rd_state.acc == r_acc[c] && host_rd_state.cnt == r_cnt[c],
            $sformatf("state of cell %0d: got %h/%h exp %h/%h", c,
                      host_rd_state.acc, host_rd_state.cnt, r_acc[c], r_cnt[c]));
      check(host_link_val == r_link[c],
            $sformatf("link %0d: got %h exp %h", c, host_link_val, r_link[c]));
    end
  endtask

  // Run k system cycles; checks evaluation count and busy clocks.
  task automatic run(input int k);
    int e_ev = 0, e_clk = 0, ev, ck, ev0, ch0, busy_clocks = 0;
    for (int j = 0; j < k; j++) begin
      ref_step(ev, ck);
      e_ev += ev;
      e_clk += ck;
    end
    order.delete();
    ev0 = int'(evals);
    ch0 = int'(changes);
    num_cycles = 32'(k);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done) begin
      if (busy) busy_clocks++;
      @(posedge clk); #1;
    end
    check(int'(evals) - ev0 == e_ev,
          $sformatf("evaluations %0d exp %0d", int'(evals) - ev0, e_ev));
    check(busy_clocks == e_clk, $sformatf("busy clocks %0d exp %0d", busy_clocks, e_clk));
    if (int'(evals) - ev0 > int'(changes) - ch0) n_unchanged++;
    if (k == 1) begin
      check(order.size() == ev, $sformatf("delta cycles %0d exp %0d", order.size(), ev));
      for (int j = 0; j < order.size(); j++)
        check(order[j] == j % N, $sformatf("delta %0d evaluated cell %0d", j, order[j]));
      if (ev > N) n_with_reeval++; else n_without++;
    end
    n_swap += k;
    if (k > 1) n_multi++;
    compare_all();
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N; c++) begin
      r_acc[c]  = 16'($urandom);
      r_cnt[c]  = 16'($urandom);
      r_link[c] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < N; c++) begin
      host_ld_en = 1'b1;
      host_ld_entity = CELL_W'(c);
      host_ld_state = '{acc: r_acc[c], cnt: r_cnt[c]};
      @(posedge clk); #1;
    end
    host_ld_en = 1'b0;
    compare_all();
    for (int r = 0; r < 40; r++) begin
      // every third system cycle: the host sets cell 0 so that the ring
      // output reaching cell 0 keeps its value (no re-evaluation needed)
      if (r % 3 == 2) begin
        r_acc[0] = (16'(r_link[N-1] - r_acc[1] - r_acc[2])) ^ r_cnt[0];
        host_ld_en = 1'b1;
        host_ld_entity = '0;
        host_ld_state = '{acc: r_acc[0], cnt: r_cnt[0]};
        @(posedge clk); #1;
        host_ld_en = 1'b0;
      end
      run(1);
    end
    run(5);
    run(17);
    check(int'(sys_cycles) == 62, $sformatf("system cycles %0d", sys_cycles));
    check(int'(rereads) == n_reeval, $sformatf("rereads %0d exp %0d", rereads, n_reeval));
    $display("mechanisms: reeval=%0d unchanged_write_runs=%0d swaps=%0d multi=%0d en0=%0d en1=%0d clr=%0d",
             n_reeval, n_unchanged, n_swap, n_multi, n_en0, n_en1, n_clr);
    check(n_reeval > 0, "re-evaluation never happened");
    check(n_with_reeval > 0 && n_without > 0, "system cycle with and without re-evaluation not both seen");
    $display("system cycles with re-evaluation=%0d without=%0d", n_with_reeval, n_without);
    check(n_unchanged > 0, "unchanged link write never happened");
    check(n_swap > 1, "bank swap never happened");
    check(n_multi > 0, "multi-cycle run never happened");
    check(n_en0 > 0 && n_en1 > 0, "enable never both low and high");
    check(n_clr > 0, "synchronous clear never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
