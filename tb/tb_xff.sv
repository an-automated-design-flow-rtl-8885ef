// tb_xff - checks the three forms of the extracted flip-flop replacement
// (plain, with enable, with enable and synchronous clear) against the
// flip-flop rule, for random data and every control combination.
module tb_xff;
  localparam int W = 8;
  logic [W-1:0] d, s_old;
  logic en, clr;
  logic [W-1:0] sn_p, q_p, sn_e, q_e, sn_c, q_c;
  int checks = 0, failures = 0;

  xff #(.W(W), .HAS_EN(1'b0), .HAS_CLR(1'b0)) u_plain (.d, .en, .clr, .s_old, .s_new(sn_p), .q(q_p));
  xff #(.W(W), .HAS_EN(1'b1), .HAS_CLR(1'b0)) u_en    (.d, .en, .clr, .s_old, .s_new(sn_e), .q(q_e));
  xff #(.W(W), .HAS_EN(1'b1), .HAS_CLR(1'b1), .CLR_VAL(8'h5A)) u_clr (.d, .en, .clr, .s_old, .s_new(sn_c), .q(q_c));

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
    for (int i = 0; i < 200; i++) begin
      d = W'($urandom); s_old = W'($urandom);
      en = i[0]; clr = i[1];
      #1;
      check(q_p == s_old && q_e == s_old && q_c == s_old, "Q is not the old state");
      check(sn_p == d, "plain: new state is not D");
      check(sn_e == (en ? d : s_old), $sformatf("enable: en=%0b got %h", en, sn_e));
      check(sn_c == (clr ? 8'h5A : (en ? d : s_old)), $sformatf("clear: en=%0b clr=%0b got %h", en, clr, sn_c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
