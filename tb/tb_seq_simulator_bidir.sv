// tb_seq_simulator_bidir - the sequential simulator on a bidirectional ring of
// 5 cells (two link ports per cell, a cell count that is not a power of two).
//
// Port 0 data flows 0 -> 1 -> 2 ..., port 1 data flows the other way, so any
// fixed evaluation order reads some links before they are written and the
// simulator must rely on HBR invalidation and re-evaluation. After each run the
// state of every cell and every link word are compared with a reference model
// of the parallel ring whose link values are settled by repeated passes until
// nothing changes. Per system cycle at least N evaluations must occur; more
// than N must occur at least once (re-evaluation) and a re-read must be counted.
module tb_seq_simulator_bidir;
  import seqsim_pkg::*;

  localparam int N      = 5;
  localparam int P      = 2;
  localparam int CELL_W = $clog2(N);
  localparam int LIDX_W = $clog2(N * P);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] num_cycles = '0;
  logic busy, done;
  logic host_ld_en = 1'b0;
  logic [CELL_W-1:0] host_ld_entity = '0, host_rd_entity = '0;
  cell_state_t host_ld_state = '0, host_rd_state;
  logic [LIDX_W-1:0] host_link_idx = '0;
  logic [LINK_W-1:0] host_link_val;
  logic [31:0] sys_cycles, evals, changes, rereads;

  seq_simulator #(.NUM_CELLS(N), .NPORT(P)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_extra = 0;
  logic [15:0] r_acc [N], r_cnt [N], r_link [N*P];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int src(int c, int p);
    if (p == 0) return (c + N - 1) % N;
    return (c + 1) % N;
  endfunction

  task automatic ref_step();
    logic [15:0] o [N*P];
    logic [15:0] i0, i1;
    for (int l = 0; l < N*P; l++) o[l] = r_link[l];
    for (int pass = 0; pass < N + 1; pass++)
      for (int c = 0; c < N; c++)
        for (int p = 0; p < P; p++)
          o[c*P+p] = (c == 0) ? ((r_acc[0] ^ r_cnt[0]) ^ 16'(p))
                              : o[src(c, p)*P+p] + r_acc[c];
    for (int c = 0; c < N; c++) begin
      i0 = o[src(c, 0)*P];
      i1 = o[src(c, 1)*P+1];
      if (i0[0]) r_acc[c] = r_acc[c] + (i0 ^ i1) + 16'(c);
      r_cnt[c] = (i0[3:0] == 4'hF) ? '0 : r_cnt[c] + 1;
    end
    for (int l = 0; l < N*P; l++) r_link[l] = o[l];
  endtask

  task automatic compare_all();
    for (int c = 0; c < N; c++) begin
      host_rd_entity = CELL_W'(c);
      @(posedge clk); #1;
      check(host_rd_state.acc == r_acc[c] && host_rd_state.cnt == r_cnt[c],
            $sformatf("state of cell %0d: got %h/%h exp %h/%h", c,
                      host_rd_state.acc, host_rd_state.cnt, r_acc[c], r_cnt[c]));
    end
    for (int l = 0; l < N*P; l++) begin
      host_link_idx = LIDX_W'(l);
      #1;
      check(host_link_val == r_link[l],
            $sformatf("link %0d: got %h exp %h", l, host_link_val, r_link[l]));
    end
  endtask

  task automatic run(input int k);
    int ev0 = int'(evals);
    for (int j = 0; j < k; j++) ref_step();
    num_cycles = 32'(k);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done) begin
      @(posedge clk); #1;
    end
    check(int'(evals) - ev0 >= k * N, "fewer evaluations than cells");
    if (int'(evals) - ev0 > k * N) n_extra++;
    compare_all();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N; c++) begin
      r_acc[c] = 16'($urandom);
      r_cnt[c] = 16'($urandom);
    end
    for (int l = 0; l < N*P; l++) r_link[l] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < N; c++) begin
      host_ld_en = 1'b1;
      host_ld_entity = CELL_W'(c);
      host_ld_state = '{acc: r_acc[c], cnt: r_cnt[c]};
      @(posedge clk); #1;
    end
    host_ld_en = 1'b0;
    for (int r = 0; r < 20; r++) run(1);
    run(9);
    check(int'(sys_cycles) == 29, "system cycle count");
    check(n_extra > 0, "re-evaluation never happened");
    check(rereads > 0, "no re-read counted");
    $display("runs with re-evaluation=%0d rereads=%0d evals=%0d", n_extra, rereads, evals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
