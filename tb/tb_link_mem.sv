// tb_link_mem - random sequence of HBR clears and evaluations on a 4-cell
// bidirectional ring (8 links), with two evaluation ports used together on
// distinct cells. A model of the link words and HBR bits
// predicts, each clock, the words read by the evaluated cell, the per-cell
// stable flags, the changed/re-read counts and the host read; at the edge the
// model applies the HBR rules (inputs read -> set; changed output -> write and
// clear; unchanged output -> untouched; a clear wins over a read made by the
// other port in the same clock). Counts how often each rule applied.
module tb_link_mem;
  import seqsim_pkg::*;
  localparam int N = 4, P = 2, L = N * P, H = 2;

  logic clk = 1'b0, rst_n = 1'b0, clear_hbr = 1'b0;
  logic [H-1:0] ev_valid = '0;
  logic [1:0] ev_cell [H];
  logic [LINK_W-1:0] in_val [H][P];
  logic [LINK_W-1:0] out_val [H][P];
  logic [N-1:0] stable;
  logic [2:0] n_changed, n_reread;
  logic [2:0] host_idx = '0;
  logic [LINK_W-1:0] host_val;

  link_mem #(.NUM_CELLS(N), .NPORT(P), .LANES(H)) dut (.*);

  always #5 clk = ~clk;

  logic [LINK_W-1:0] m_mem [L];
  logic [L-1:0] m_hbr;
  int checks = 0, failures = 0, n_chg = 0, n_same = 0, n_rr = 0, n_clr = 0, n_stable = 0, n_both = 0;

  function automatic int src(int c, int p);
    return (p == 0) ? (c + N - 1) % N : (c + 1) % N;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c [H];
    int ec, er;
    bit st;
    for (int l = 0; l < L; l++) m_mem[l] = '0;
    m_hbr = '0;
    for (int h = 0; h < H; h++) begin
      ev_cell[h] = '0;
      for (int p = 0; p < P; p++) out_val[h][p] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      c[0] = $urandom_range(0, N - 1);
      c[1] = (c[0] + $urandom_range(1, N - 1)) % N;   // distinct cells
      clear_hbr = ($urandom_range(0, 15) == 0);
      for (int h = 0; h < H; h++) begin
        ev_valid[h] = !clear_hbr && ($urandom_range(0, 2) != 0);
        ev_cell[h]  = 2'(c[h]);
        for (int p = 0; p < P; p++)
          out_val[h][p] = ($urandom_range(0, 1) == 0) ? m_mem[c[h]*P+p] : LINK_W'($urandom_range(0, 3));
      end
      if (&ev_valid) n_both++;
      host_idx = 3'($urandom_range(0, L - 1));
      #1;
      check(host_val == m_mem[host_idx], "host read");
      for (int h = 0; h < H; h++)
        for (int p = 0; p < P; p++)
          check(in_val[h][p] == m_mem[src(c[h], p)*P+p], $sformatf("in_val[%0d][%0d] of cell %0d", h, p, c[h]));
      for (int k = 0; k < N; k++) begin
        st = m_hbr[src(k, 0)*P] && m_hbr[src(k, 1)*P+1];
        check(stable[k] == st, $sformatf("stable[%0d]", k));
        if (st) n_stable++;
      end
      ec = 0; er = 0;
      for (int h = 0; h < H; h++)
        if (ev_valid[h])
          for (int p = 0; p < P; p++)
            if (out_val[h][p] != m_mem[c[h]*P+p]) begin
              ec++;
              if (m_hbr[c[h]*P+p]) er++;
            end
      check(int'(n_changed) == ec && int'(n_reread) == er, "changed / re-read counts");
      @(posedge clk);
      if (clear_hbr) begin
        m_hbr = '0;
        n_clr++;
      end else begin
        logic [LINK_W-1:0] old_mem [L];
        logic [L-1:0] old_hbr;
        old_mem = m_mem;
        old_hbr = m_hbr;
        for (int h = 0; h < H; h++)
          if (ev_valid[h])
            for (int p = 0; p < P; p++) m_hbr[src(c[h], p)*P+p] = 1'b1;
        for (int h = 0; h < H; h++)
          if (ev_valid[h])
            for (int p = 0; p < P; p++)
              if (out_val[h][p] != old_mem[c[h]*P+p]) begin
                if (old_hbr[c[h]*P+p]) n_rr++;
                m_mem[c[h]*P+p] = out_val[h][p];
                m_hbr[c[h]*P+p] = 1'b0;
                n_chg++;
              end else n_same++;
      end
      #1;
    end
    $display("changed=%0d unchanged=%0d reread=%0d clears=%0d stable=%0d", n_chg, n_same, n_rr, n_clr, n_stable);
    check(n_chg > 0 && n_same > 0 && n_rr > 0 && n_clr > 0 && n_stable > 0 && n_both > 0, "a rule never applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
