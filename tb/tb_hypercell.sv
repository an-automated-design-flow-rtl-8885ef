// tb_hypercell - drives the example hypercell with random states, inputs and
// cell numbers (two ports) and compares outputs and next state with the cell
// rule written out independently: cell 0 emits acc^cnt^port, other cells add
// acc to the input; acc updates when input 0 bit 0 is set; cnt counts and is
// cleared when input 0 ends in 4'hF.
module tb_hypercell;
  import seqsim_pkg::*;
  localparam int P = 2;
  localparam int CW = 3;
  logic [CW-1:0] cell_id;
  cell_state_t s_old, s_new;
  logic [LINK_W-1:0] in_val [P];
  logic [LINK_W-1:0] out_val [P];
  int checks = 0, failures = 0, n_id0 = 0, n_en = 0, n_clr = 0;

  hypercell #(.NPORT(P), .CELL_W(CW)) dut (.*);

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
    logic [15:0] e_acc, e_cnt;
    for (int i = 0; i < 400; i++) begin
      cell_id = CW'($urandom);
      s_old = '{acc: 16'($urandom), cnt: 16'($urandom)};
      in_val[0] = 16'($urandom);
      in_val[1] = 16'($urandom);
      if (i % 7 == 0) in_val[0][3:0] = 4'hF;
      #1;
      for (int p = 0; p < P; p++) begin
        if (cell_id == 0)
          check(out_val[p] == (s_old.acc ^ s_old.cnt ^ 16'(p)), "cell 0 output");
        else
          check(out_val[p] == 16'(in_val[p] + s_old.acc), "cell output");
      end
      e_acc = in_val[0][0] ? 16'(s_old.acc + (in_val[0] ^ in_val[1]) + 16'(cell_id)) : s_old.acc;
      e_cnt = (in_val[0][3:0] == 4'hF) ? 16'h0 : 16'(s_old.cnt + 1);
      check(s_new.acc == e_acc, $sformatf("acc got %h exp %h", s_new.acc, e_acc));
      check(s_new.cnt == e_cnt, $sformatf("cnt got %h exp %h", s_new.cnt, e_cnt));
      if (cell_id == 0) n_id0++;
      if (in_val[0][0]) n_en++;
      if (in_val[0][3:0] == 4'hF) n_clr++;
    end
    check(n_id0 > 0 && n_en > 0 && n_clr > 0, "a case was not reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
