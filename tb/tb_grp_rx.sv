// tb_grp_rx: checks the universal receiver.
// 1. Published example: each item placed at its transmitter output position
//    must come back to its original position.
// 2. Random keys and subwords: output equals the reference receiver, and a
//    transmitter followed by the receiver returns the input (round trip).
module tb_grp_rx;
  import grp_pkg::*;
  import grp_ref_pkg::*;
  int checks = 0, failures = 0;
  grp_key_t key;
  subword_t din, dout, ct, rt;

  grp_rx dut (.key, .din, .dout);
  grp_tx u_tx (.key, .din, .dout(ct));
  grp_rx #(.POL(1'b1)) dut_rt (.key, .din(ct), .dout(rt));

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
      din = onehot_item(EX_OUT, k);
      #1;
      check(dout, onehot_item(EX_IN, k), "example");
    end
    for (int n = 0; n < 2000; n++) begin
      key = 24'($urandom);
      din = 8'($urandom);
      #1;
      check(dout, ref_rx(key, din, 12'hfff), "reference");
      check(rt, din, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
