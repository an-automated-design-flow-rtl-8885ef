// tb_sim_ctrl - the controller and scheduler against a model of the link
// memory status. The model clears all stable flags on clear_hbr, marks the
// evaluated cell stable at the end of its evaluation and, at random, lets that
// evaluation change its output link so the next cell of the ring becomes
// non-stable again. Checks: every cell is evaluated at least once per system
// cycle; the banks swap only when all cells are stable with nothing in flight;
// done comes after exactly num_cycles system cycles; the statistics counters
// match the evaluations, changes and re-reads the model saw.
module tb_sim_ctrl;
  localparam int N = 6;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] num_cycles = '0;
  logic busy, done, clear_hbr, bank;
  logic [0:0] issue, ev_valid;
  logic [N-1:0] stable = '0;
  logic [0:0] n_changed, n_reread;
  logic [2:0] issue_cell [1];
  logic [2:0] ev_cell [1];
  logic [31:0] sys_cycles, evals, changes, rereads;

  sim_ctrl #(.NUM_CELLS(N), .NPORT(1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_evals = 0, m_changes = 0, m_rereads = 0, m_cycles = 0, n_reeval = 0;
  logic [N-1:0] seen = '0;
  bit chg;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // random output change of the evaluated cell, decided before the edge
  always @(negedge clk) chg = ev_valid && ($urandom_range(0, 2) == 0);
  assign n_changed = chg;
  assign n_reread  = chg && stable[(int'(ev_cell[0]) + 1) % N];

  always @(posedge clk) begin
    logic bank_before;
    bank_before = bank;
    if (!rst_n) begin
      stable <= '0;
    end else if (clear_hbr) begin
      check(!ev_valid, "evaluation during clear");
      stable <= '0;
      seen   <= '0;
    end else if (ev_valid) begin
      logic [N-1:0] s;
      if (issue) check(issue_cell[0] != ev_cell[0], "cell issued while being evaluated");
      s = stable;
      s[ev_cell[0]] = 1'b1;
      seen[ev_cell[0]] <= 1'b1;
      if (chg) begin
        if (s[(int'(ev_cell[0]) + 1) % N]) n_reeval++;
        s[(int'(ev_cell[0]) + 1) % N] = 1'b0;
      end
      stable <= s;
      m_evals++;
      m_changes += int'(chg);
      m_rereads += int'(n_reread);
    end
    #1;
    if (bank != bank_before) begin
      m_cycles++;
      check(&stable, "banks swapped with a non-stable cell");
      check(&seen, "a cell was not evaluated in this system cycle");
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int r = 0; r < 10; r++) begin
      int k, c0;
      k = $urandom_range(1, 6);
      c0 = m_cycles;
      @(posedge clk); #2;
      num_cycles = 32'(k);
      start = 1'b1;
      @(posedge clk); #2;
      start = 1'b0;
      while (!done) begin
        @(posedge clk); #2;
      end
      check(m_cycles - c0 == k, $sformatf("ran %0d system cycles, asked %0d", m_cycles - c0, k));
      check(!busy, "busy after done");
    end
    check(int'(sys_cycles) == m_cycles, "system cycle counter");
    check(int'(evals) == m_evals, $sformatf("evaluation counter %0d exp %0d", evals, m_evals));
    check(int'(changes) == m_changes, "change counter");
    check(int'(rereads) == m_rereads, "re-read counter");
    check(n_reeval > 0, "no re-evaluation was provoked");
    $display("cycles=%0d evals=%0d reeval=%0d", m_cycles, m_evals, n_reeval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
