// tb_state_mem - loads the current bank, then for several system cycles reads
// each entity, writes a new state one clock later (registered write address)
// and swaps banks. Checks read data after load, that an evaluation write goes
// to the new bank only (the current state reads back unchanged in the same
// system cycle) and that the new state is current after the swap.
module tb_state_mem;
  import seqsim_pkg::*;
  localparam int E = 8;
  logic clk = 1'b0, bank = 1'b0, ld_en = 1'b0;
  logic [0:0] rd_en = '0, wr_en = '0;
  logic [2:0] ld_addr = '0;
  logic [2:0] rd_addr [1];
  cell_state_t rd_data [1];
  cell_state_t wr_data [1];
  cell_state_t ld_data = '0;

  state_mem #(.ENTITIES(E)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cell_state_t cur [E];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic read_all();
    for (int e = 0; e < E; e++) begin
      rd_en = 1'b1; rd_addr[0] = 3'(e);
      @(posedge clk); #1;
      check(rd_data[0] == cur[e], $sformatf("entity %0d: got %h exp %h", e, rd_data[0], cur[e]));
    end
    rd_en = 1'b0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_state_t nxt [E];
    rd_addr[0] = '0;
    wr_data[0] = '0;
    @(posedge clk); #1;
    for (int e = 0; e < E; e++) begin
      cur[e] = cell_state_t'($urandom);
      ld_en = 1'b1; ld_addr = 3'(e); ld_data = cur[e];
      @(posedge clk); #1;
    end
    ld_en = 1'b0;
    read_all();
    for (int sc = 0; sc < 4; sc++) begin
      // pipelined: issue e at clock k, data back and write at clock k+1
      for (int e = 0; e <= E; e++) begin
        rd_en = (e < E);
        rd_addr[0] = 3'(e % E);
        wr_en = (e > 0);
        if (e > 0) begin
          check(rd_data[0] == cur[e-1], $sformatf("pipelined read of %0d", e - 1));
          nxt[e-1] = cell_state_t'($urandom);
          wr_data[0] = nxt[e-1];
        end
        @(posedge clk); #1;
      end
      wr_en = 1'b0; rd_en = 1'b0;
      read_all();              // still the current state
      bank = ~bank;
      for (int e = 0; e < E; e++) cur[e] = nxt[e];
      read_all();              // new state is now current
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
