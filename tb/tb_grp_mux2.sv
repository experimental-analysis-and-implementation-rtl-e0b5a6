// tb_grp_mux2: exhaustive check of both mux cell structures.
// For all 8 input combinations, the AND-OR cell and the complementary OR-AND
// cell must output own when sel = 1 and other when sel = 0, and both must
// output 0 when both data inputs are 0 (precharged rails).
module tb_grp_mux2;
  int checks = 0, failures = 0;
  logic sel, own, other, y0, y1;

  grp_mux2 #(.POL(1'b0)) dut0 (.sel, .own, .other, .y(y0));
  grp_mux2 #(.POL(1'b1)) dut1 (.sel, .own, .other, .y(y1));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s sel=%b own=%b other=%b got=%b exp=%b", what, sel, own, other, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, own, other} = 3'(i);
      #1;
      check(y0, sel ? own : other, "and-or");
      check(y1, sel ? own : other, "or-and");
      if (!own && !other) begin
        check(y0, 1'b0, "and-or precharge");
        check(y1, 1'b0, "or-and precharge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
