// grp_secure_top: 16-bit GRP permutation cipher with dual-rail precharge.
//
// The key is three 8-bit control words. The transmitter engine permutes the
// bits of each 8-bit subword of a plaintext word through three multiplexer
// stages (pair distances 4, 2, 1); the receiver engine applies the stages in
// reverse (1, 2, 4) with the same control words and restores the plaintext.
// Both engines are built in dual-rail precharge logic: a true-rail network
// and a complementary network (AND and OR exchanged) run side by side, both
// rails are 0 during precharge and complementary during evaluation.
//
// Interfaces: tx_in_* takes plaintext, tx_out_* gives ciphertext (true rail
// and complement rail); rx_in_* takes ciphertext, rx_out_* gives plaintext.
// Each side accepts a word when in_valid and in_ready are high on a clock
// edge and pulses out_valid two edges later; at most one word per 2 cycles
// per side. Reset rst_n is asynchronous, active low.
//
// Defaults follow the published configuration: 16 bits as two 8-bit
// subwords and the reduced-multiplexer transmitter and receiver drawn for
// the example key. With these masks the pair between them decrypts
// correctly for any key whose stage-1 control bits at positions 0 and 2 are
// 1. Set TX_KEEP = RX_KEEP = KEEP_ALL for the universal structure. The
// engines' timing and handshakes are this design's choices.
module grp_secure_top
  import grp_pkg::*;
#(
  parameter int unsigned LANES   = 2,
  parameter keep_t       TX_KEEP = KEEP_TX_REDUCED,
  parameter keep_t       RX_KEEP = KEEP_RX_REDUCED
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  grp_key_t                 key,
  // transmitter (encryption)
  input  logic                     tx_in_valid,
  output logic                     tx_in_ready,
  input  logic [LANES*SUBWORD-1:0] tx_in_data,
  output logic                     tx_out_valid,
  output logic [LANES*SUBWORD-1:0] tx_out_data,
  output logic [LANES*SUBWORD-1:0] tx_out_data_n,
  // receiver (decryption)
  input  logic                     rx_in_valid,
  output logic                     rx_in_ready,
  input  logic [LANES*SUBWORD-1:0] rx_in_data,
  output logic                     rx_out_valid,
  output logic [LANES*SUBWORD-1:0] rx_out_data,
  output logic [LANES*SUBWORD-1:0] rx_out_data_n
);

  grp_drp_engine #(.IS_RX(1'b0), .LANES(LANES), .KEEP(TX_KEEP)) u_tx (
    .clk, .rst_n, .key,
    .in_valid(tx_in_valid), .in_ready(tx_in_ready), .in_data(tx_in_data),
    .out_valid(tx_out_valid), .out_data(tx_out_data), .out_data_n(tx_out_data_n));

  grp_drp_engine #(.IS_RX(1'b1), .LANES(LANES), .KEEP(RX_KEEP)) u_rx (
    .clk, .rst_n, .key,
    .in_valid(rx_in_valid), .in_ready(rx_in_ready), .in_data(rx_in_data),
    .out_valid(rx_out_valid), .out_data(rx_out_data), .out_data_n(rx_out_data_n));

endmodule
