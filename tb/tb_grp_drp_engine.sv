// tb_grp_drp_engine: checks the precharge/evaluate engine, one transmitter
// and one receiver instance at the default two subword lanes.
// Random words arrive with random gaps (and are sometimes held while the
// engine is busy). Checked: every accepted word produces out_valid exactly
// 2 clock edges after the accepting edge, with the reference permutation of
// each 8-bit lane on out_data and its complement on out_data_n; in_ready is
// low in the evaluate cycle; no out_valid without a pending word; and with
// in_valid held high one word is accepted every 2 cycles.
module tb_grp_drp_engine;
  import grp_pkg::*;
  import grp_ref_pkg::*;

  localparam int W = 2 * SUBWORD;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  grp_key_t key;

  logic tx_iv, tx_ir, tx_ov, rx_iv, rx_ir, rx_ov;
  logic [W-1:0] tx_id, tx_od, tx_odn, rx_id, rx_od, rx_odn;

  grp_drp_engine #(.IS_RX(1'b0)) dut_tx (.clk, .rst_n, .key,
    .in_valid(tx_iv), .in_ready(tx_ir), .in_data(tx_id),
    .out_valid(tx_ov), .out_data(tx_od), .out_data_n(tx_odn));
  grp_drp_engine #(.IS_RX(1'b1)) dut_rx (.clk, .rst_n, .key,
    .in_valid(rx_iv), .in_ready(rx_ir), .in_data(rx_id),
    .out_valid(rx_ov), .out_data(rx_od), .out_data_n(rx_odn));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [W-1:0] exp_word(bit rx, logic [23:0] k, logic [W-1:0] d);
    logic [W-1:0] r;
    for (int i = 0; i < 2; i++)
      r[i*8 +: 8] = rx ? ref_rx(k, d[i*8 +: 8], 12'b1000_0011_1111)
                       : ref_tx(k, d[i*8 +: 8], 12'b0101_0011_1000);
    return r;
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // scoreboards: expected word and the cycle at which out_valid is due
  logic [W-1:0] tx_q[$], rx_q[$];
  int unsigned tx_due[$], rx_due[$];
  int tx_acc = 0, rx_acc = 0, tx_stall = 0;

  always @(posedge clk) if (rst_n) begin
    if (tx_iv && tx_ir) begin
      tx_q.push_back(exp_word(1'b0, key, tx_id)); tx_due.push_back(cyc + 2); tx_acc++;
    end
    if (tx_iv && !tx_ir) tx_stall++;
    if (rx_iv && rx_ir) begin
      rx_q.push_back(exp_word(1'b1, key, rx_id)); rx_due.push_back(cyc + 2); rx_acc++;
    end
    if (tx_ov) begin
      check(tx_q.size() > 0, "tx out_valid without pending word");
      if (tx_q.size() > 0) begin
        check(tx_od == tx_q[0], $sformatf("tx data %h exp %h", tx_od, tx_q[0]));
        check(tx_odn == ~tx_od, "tx complement rail");
        check(cyc == tx_due[0], $sformatf("tx latency: cycle %0d due %0d", cyc, tx_due[0]));
        void'(tx_q.pop_front()); void'(tx_due.pop_front());
      end
    end
    if (rx_ov) begin
      check(rx_q.size() > 0, "rx out_valid without pending word");
      if (rx_q.size() > 0) begin
        check(rx_od == rx_q[0], $sformatf("rx data %h exp %h", rx_od, rx_q[0]));
        check(rx_odn == ~rx_od, "rx complement rail");
        check(cyc == rx_due[0], $sformatf("rx latency: cycle %0d due %0d", cyc, rx_due[0]));
        void'(rx_q.pop_front()); void'(rx_due.pop_front());
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    key = EX_KEY;
    tx_iv = 0; rx_iv = 0; tx_id = '0; rx_id = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // random traffic, key changed while idle
    for (int blk = 0; blk < 20; blk++) begin
      for (int n = 0; n < 100; n++) begin
        @(negedge clk);
        if (!tx_iv || tx_ir) begin  // hold a word until it is taken
          tx_iv = ($urandom_range(0, 2) != 0);
          tx_id = W'($urandom);
        end
        if (!rx_iv || rx_ir) begin
          rx_iv = ($urandom_range(0, 2) != 0);
          rx_id = W'($urandom);
        end
      end
      @(negedge clk); tx_iv = 0; rx_iv = 0;
      repeat (4) @(negedge clk);
      key = 24'($urandom);
    end
    // throughput: in_valid held high for 40 cycles accepts 20 words
    n0 = tx_acc;
    @(negedge clk); tx_iv = 1;
    repeat (40) @(negedge clk);
    tx_iv = 0;
    check(tx_acc - n0 == 20, $sformatf("throughput: %0d words in 40 cycles", tx_acc - n0));
    repeat (5) @(negedge clk);
    check(tx_q.size() == 0 && rx_q.size() == 0, "all words delivered");
    check(tx_stall > 0, "back-pressure exercised");
    check(tx_acc > 500 && rx_acc > 500, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
