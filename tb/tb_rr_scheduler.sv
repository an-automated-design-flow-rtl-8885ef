// tb_rr_scheduler - random request vectors on a 6-requester round-robin
// scheduler with two grants per clock. A model keeps the pointer (cell after
// the last taken grant, back to 0 on restart) and predicts the grants: the
// first two requests at or after it, wrapping around.
module tb_rr_scheduler;
  localparam int N = 6;
  localparam int G = 2;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, take = 1'b0;
  logic [N-1:0] req = '0;
  logic [G-1:0] gnt_valid;
  logic [2:0] gnt_idx [G];

  rr_scheduler #(.N(N), .G(G)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_wrap = 0, n_restart = 0, n_none = 0, n_two = 0;

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
    int ptr = 0, n, last;
    int exp_idx [G];
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      req = N'($urandom);
      restart = ($urandom_range(0, 19) == 0);
      take = ($urandom_range(0, 3) != 0);
      n = 0; last = 0;
      for (int i = 0; i < N; i++)
        if (n < G && req[(ptr + i) % N]) begin
          exp_idx[n] = (ptr + i) % N;
          last = exp_idx[n];
          n++;
        end
      #1;
      for (int g = 0; g < G; g++) begin
        check(gnt_valid[g] == (g < n), $sformatf("grant %0d valid", g));
        if (g < n) check(int'(gnt_idx[g]) == exp_idx[g],
                         $sformatf("grant %0d: %0d exp %0d", g, gnt_idx[g], exp_idx[g]));
      end
      if (n == 0) n_none++;
      if (n == 2) n_two++;
      if (n > 0 && last < ptr) n_wrap++;
      @(posedge clk);
      if (restart) begin
        ptr = 0;
        n_restart++;
      end else if (take && n > 0) ptr = (last + 1) % N;
      #1;
    end
    check(n_wrap > 0 && n_restart > 0 && n_none > 0 && n_two > 0, "a case was not reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
