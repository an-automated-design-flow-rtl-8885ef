// tb_topology_map - checks the link addresses of every port of every cell for
// a 5-cell bidirectional ring and a 64-cell unidirectional ring: outputs write
// link c*P+p, port 0 reads from cell c-1, port 1 from cell c+1 (wrapping).
module tb_topology_map;
  logic [2:0] c5;
  logic [3:0] in5 [2], out5 [2];
  logic [5:0] c64;
  logic [5:0] in64 [1], out64 [1];
  int checks = 0, failures = 0;

  topology_map #(.NUM_CELLS(5), .NPORT(2)) u5 (.cell_idx(c5), .in_addr(in5), .out_addr(out5));
  topology_map #(.NUM_CELLS(64), .NPORT(1)) u64 (.cell_idx(c64), .in_addr(in64), .out_addr(out64));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 5; c++) begin
      c5 = 3'(c);
      #1;
      check(int'(out5[0]) == 2*c && int'(out5[1]) == 2*c + 1, $sformatf("5-ring out of %0d", c));
      check(int'(in5[0]) == 2*((c + 4) % 5), $sformatf("5-ring in0 of %0d: %0d", c, in5[0]));
      check(int'(in5[1]) == 2*((c + 1) % 5) + 1, $sformatf("5-ring in1 of %0d: %0d", c, in5[1]));
    end
    for (int c = 0; c < 64; c++) begin
      c64 = 6'(c);
      #1;
      check(int'(out64[0]) == c, "64-ring out");
      check(int'(in64[0]) == (c + 63) % 64, $sformatf("64-ring in of %0d: %0d", c, in64[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
