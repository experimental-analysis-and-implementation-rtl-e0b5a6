// tb_grp_tx: checks the universal transmitter against the published example
// and against the reference model.
// 1. Example key and arrangement: each item, sent alone as a one-hot
//    subword, must leave at its published output position.
// 2. 2000 random keys and subwords, for the universal network (AND-OR cells),
//    its complementary OR-AND copy and the reduced transmitter mask.
module tb_grp_tx;
  import grp_pkg::*;
  import grp_ref_pkg::*;
  int checks = 0, failures = 0;
  grp_key_t key;
  subword_t din, d_all, d_comp, d_red;

  grp_tx dut (.key, .din, .dout(d_all));
  grp_tx #(.POL(1'b1)) dut_c (.key, .din, .dout(d_comp));
  grp_tx #(.KEEP(KEEP_TX_REDUCED)) dut_r (.key, .din, .dout(d_red));

  task automatic check(sw_t got, sw_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s key=%h din=%b got=%b exp=%b", what, key, din, got, exp);
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
    for (int k = 0; k < 8; k++) begin
      din = onehot_item(EX_IN, k);
      #1;
      check(d_all, onehot_item(EX_OUT, k), "example");
      check(d_red, onehot_item(EX_OUT, k), "example reduced");
    end
    for (int n = 0; n < 2000; n++) begin
      key = 24'($urandom);
      din = 8'($urandom);
      #1;
      check(d_all,  ref_tx(key, din, 12'hfff), "universal");
      check(d_comp, ref_tx(key, din, 12'hfff), "complementary cells");
      check(d_red,  ref_tx(key, din, 12'b0101_0011_1000), "reduced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
