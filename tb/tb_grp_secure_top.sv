// tb_grp_secure_top: end-to-end test of the 16-bit DRP GRP cipher at its
// default parameters (two subword lanes, reduced-mux transmitter and
// receiver). Plaintext words go into the transmitter; every ciphertext word
// it produces is queued and sent into the receiver, whose output must equal
// the original plaintext. Ciphertext is compared with the reference
// permutation, both outputs must carry complementary rails, and each side
// must answer exactly 2 edges after accepting. The published example
// (key 10101100/11010010/00101010, arrangement A7 A6 A5 A4 A3 A2 A0 A1) is
// run first, item by item, in both lanes. The key is then refreshed many
// times (keys keep stage-1 positions 0 and 2 at "pass", which the reduced
// transmitter has no muxes for). Counted mechanisms, each of which must
// occur: precharge cycles with rails at 0, evaluate cycles, back-pressure
// on either side, key refresh, and in every stage at least one built pair
// exchanging and one passing.
module tb_grp_secure_top;
  import grp_pkg::*;
  import grp_ref_pkg::*;

  localparam int W = 2 * SUBWORD;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  grp_key_t key;

  logic tx_iv, tx_ir, tx_ov, rx_iv, rx_ir, rx_ov;
  logic [W-1:0] tx_id, tx_od, tx_odn, rx_id, rx_od, rx_odn;

  grp_secure_top dut (.clk, .rst_n, .key,
    .tx_in_valid(tx_iv), .tx_in_ready(tx_ir), .tx_in_data(tx_id),
    .tx_out_valid(tx_ov), .tx_out_data(tx_od), .tx_out_data_n(tx_odn),
    .rx_in_valid(rx_iv), .rx_in_ready(rx_ir), .rx_in_data(rx_id),
    .rx_out_valid(rx_ov), .rx_out_data(rx_od), .rx_out_data_n(rx_odn));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic logic [W-1:0] enc(logic [23:0] k, logic [W-1:0] d);
    for (int i = 0; i < 2; i++) enc[i*8 +: 8] = ref_tx(k, d[i*8 +: 8], 12'b0101_0011_1000);
  endfunction

  // mechanism counters
  int n_pre = 0, n_eval = 0, n_stall_tx = 0, n_stall_rx = 0, n_key = 0;
  int n_xchg[3] = '{0, 0, 0}, n_pass[3] = '{0, 0, 0};
  localparam logic [11:0] TXK = 12'b0101_0011_1000;

  // scoreboards
  logic [W-1:0] pt_q[$], ct_q[$], rx_exp_q[$], ct_send_q[$];
  int unsigned tx_due[$], rx_due[$];
  int n_done = 0;

  always @(posedge clk) if (rst_n) begin
    // phases of the transmitter engine, seen through its ready signal
    if (tx_ir) begin
      n_pre++;
      check(dut.u_tx.rail_t == '0 && dut.u_tx.rail_f == '0, "precharge rails at 0");
    end else begin
      n_eval++;
      check(dut.u_tx.rail_f == ~dut.u_tx.rail_t, "evaluate rails complementary");
    end
    if (tx_iv && !tx_ir) n_stall_tx++;
    if (rx_iv && !rx_ir) n_stall_rx++;
    if (tx_iv && tx_ir) begin
      pt_q.push_back(tx_id); ct_q.push_back(enc(key, tx_id)); tx_due.push_back(cyc + 2);
      for (int s = 0; s < 3; s++) for (int j = 0; j < 4; j++) if (TXK[11 - 4*s - j]) begin
        int d, h;
        d = 4 >> s;
        h = (j / d) * 2 * d + (j % d);
        if (key[s][7 - h]) n_pass[s]++; else n_xchg[s]++;
      end
    end
    if (rx_iv && rx_ir) rx_due.push_back(cyc + 2);
    if (tx_ov) begin
      check(ct_q.size() > 0, "tx out_valid without pending word");
      if (ct_q.size() > 0) begin
        check(tx_od == ct_q[0], $sformatf("ciphertext %h exp %h", tx_od, ct_q[0]));
        check(tx_odn == ~tx_od, "ciphertext complement rail");
        check(cyc == tx_due[0], "tx latency 2");
        ct_send_q.push_back(tx_od);
        rx_exp_q.push_back(pt_q[0]);
        void'(ct_q.pop_front()); void'(pt_q.pop_front()); void'(tx_due.pop_front());
      end
    end
    if (rx_ov) begin
      check(rx_exp_q.size() > 0, "rx out_valid without pending word");
      if (rx_exp_q.size() > 0) begin
        check(rx_od == rx_exp_q[0], $sformatf("decrypted %h exp %h", rx_od, rx_exp_q[0]));
        check(rx_odn == ~rx_od, "plaintext complement rail");
        check(cyc == rx_due[0], "rx latency 2");
        void'(rx_exp_q.pop_front()); void'(rx_due.pop_front());
        n_done++;
      end
    end
  end

  // ready as sampled at the last rising edge: a word shown with valid was
  // taken at that edge if ready was high then
  logic tx_ir_q, rx_ir_q;
  always @(posedge clk) tx_ir_q <= tx_ir & tx_iv;
  always @(posedge clk) rx_ir_q <= rx_ir & rx_iv;

  // receiver feeder: sends queued ciphertext, holding each word until taken
  initial begin
    rx_iv = 0; rx_id = '0;
    forever begin
      @(negedge clk);
      if (rx_iv && rx_ir_q) begin rx_iv = 0; end
      if (!rx_iv && ct_send_q.size() > 0 && $urandom_range(0, 3) != 0) begin
        rx_id = ct_send_q.pop_front();
        rx_iv = 1;
      end
    end
  end
  task automatic drain();
    int guard = 0;
    @(negedge clk); tx_iv = 0;
    while ((pt_q.size() > 0 || ct_send_q.size() > 0 || rx_exp_q.size() > 0 || rx_iv) && guard < 1000) begin
      @(negedge clk); guard++;
    end
    check(guard < 1000, "pipeline drained");
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    key = EX_KEY;
    tx_iv = 0; tx_id = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // published example: item k alone in each lane; lanes hold different items
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      tx_id = {onehot_item(EX_IN, k), onehot_item(EX_IN, 7 - k)};
      tx_iv = 1;
      do @(posedge clk); while (!tx_ir);
      @(negedge clk); tx_iv = 0;
      repeat (3) @(posedge clk);
      check(tx_od == {onehot_item(EX_OUT, k), onehot_item(EX_OUT, 7 - k)}, "published example");
    end
    drain();
    // key refreshes with random traffic
    for (int blk = 0; blk < 50; blk++) begin
      key = 24'($urandom) | 24'h a0_0000;   // stage-1 positions 0 and 2 pass
      n_key++;
      for (int n = 0; n < 60; n++) begin
        @(negedge clk);
        if (!tx_iv || tx_ir_q) begin
          tx_iv = ($urandom_range(0, 3) != 0);
          tx_id = W'($urandom);
        end
      end
      drain();
    end
    $display("mechanisms: precharge=%0d evaluate=%0d tx_stall=%0d rx_stall=%0d key_refresh=%0d words=%0d",
             n_pre, n_eval, n_stall_tx, n_stall_rx, n_key, n_done);
    for (int s = 0; s < 3; s++) begin
      $display("stage %0d: exchanges=%0d passes=%0d", s + 1, n_xchg[s], n_pass[s]);
      check(n_xchg[s] > 0, "stage exchanged");
      check(n_pass[s] > 0, "stage passed");
    end
    check(n_pre > 0, "precharge happened");
    check(n_eval > 0, "evaluate happened");
    check(n_stall_tx > 0, "transmitter back-pressure happened");
    check(n_stall_rx > 0, "receiver back-pressure happened");
    check(n_key > 1, "key refresh happened");
    check(n_done > 1000, "words round-tripped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
