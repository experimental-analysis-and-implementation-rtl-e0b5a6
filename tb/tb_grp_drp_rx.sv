// tb_grp_drp_rx: checks the dual-rail receiver, reduced (default) and
// universal. In precharge both rails must be all zeros; in evaluation the
// true rail must equal the reference permutation and the complement rail its
// inverse. The published example is checked item by item.
module tb_grp_drp_rx;
  import grp_pkg::*;
  import grp_ref_pkg::*;
  int checks = 0, failures = 0;
  grp_key_t key;
  logic pre;
  subword_t din, t_r, f_r, t_a, f_a;

  grp_drp_rx dut (.key, .pre, .din, .dout_t(t_r), .dout_f(f_r));
  grp_drp_rx #(.KEEP(KEEP_ALL)) dut_all (.key, .pre, .din, .dout_t(t_a), .dout_f(f_a));

  task automatic check(sw_t got, sw_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s pre=%b key=%h din=%b got=%b exp=%b", what, pre, key, din, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = EX_KEY;
    pre = 1'b0;
    for (int k = 0; k < 8; k++) begin
      din = onehot_item(EX_OUT, k);
      #1;
      check(t_r, onehot_item(EX_IN, k), "example true rail");
      check(f_r, ~onehot_item(EX_IN, k), "example complement rail");
    end
    for (int n = 0; n < 2000; n++) begin
      key = 24'($urandom);
      din = 8'($urandom);
      pre = 1'b1;
      #1;
      check(t_r, 8'h00, "precharge true");
      check(f_r, 8'h00, "precharge complement");
      check(t_a, 8'h00, "precharge true (universal)");
      check(f_a, 8'h00, "precharge complement (universal)");
      pre = 1'b0;
      #1;
      check(t_r, ref_rx(key, din, 12'b1000_0011_1111), "reduced true");
      check(f_r, ~ref_rx(key, din, 12'b1000_0011_1111), "reduced complement");
      check(t_a, ref_rx(key, din, 12'hfff), "universal true");
      check(f_a, ~ref_rx(key, din, 12'hfff), "universal complement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
