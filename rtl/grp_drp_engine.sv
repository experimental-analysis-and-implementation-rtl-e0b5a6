// grp_drp_engine: precharge/evaluate sequencer around LANES DRP GRP lanes.
//
// A word of LANES x 8 bits is split into 8-bit subwords (subword
// parallelism); each subword goes through its own dual-rail transmitter
// (IS_RX = 0) or receiver (IS_RX = 1), all under the same key.
//
// Operation: the engine rests in PRECHARGE with in_ready = 1 and all rails
// at 0. A word accepted (in_valid & in_ready) on a clock edge is stored and
// the engine moves to EVALUATE, where the rails carry the data for one
// cycle. At the end of that cycle both rails are registered, out_valid
// pulses for one cycle and the engine returns to PRECHARGE. So every
// evaluation is preceded by a precharge cycle, an operation takes 2 cycles
// (one word every 2 cycles at most) and out_valid rises 2 clock edges after
// the accepting edge. out_data is the true rail, out_data_n the complement
// rail; they are complementary for every result.
//
// The subword split and DRP come from the published design; the two-phase
// timing, the valid/ready handshake and the asynchronous active-low reset
// are this design's choices. Assertions check the dual-rail rule.
module grp_drp_engine
  import grp_pkg::*;
#(
  parameter bit          IS_RX = 1'b0,
  parameter int unsigned LANES = 2,
  parameter keep_t       KEEP  = IS_RX ? KEEP_RX_REDUCED : KEEP_TX_REDUCED
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  grp_key_t                 key,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [LANES*SUBWORD-1:0] in_data,
  output logic                     out_valid,
  output logic [LANES*SUBWORD-1:0] out_data,
  output logic [LANES*SUBWORD-1:0] out_data_n
);

  typedef enum logic {PRECHARGE, EVALUATE} phase_e;
  phase_e phase;

  logic [LANES*SUBWORD-1:0] data_q;
  logic [LANES*SUBWORD-1:0] rail_t, rail_f;
  logic pre;

  assign pre      = (phase == PRECHARGE);
  assign in_ready = pre;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= PRECHARGE;
      data_q     <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_data_n <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (phase)
        PRECHARGE: if (in_valid) begin
          data_q <= in_data;
          phase  <= EVALUATE;
        end
        EVALUATE: begin
          out_data   <= rail_t;
          out_data_n <= rail_f;
          out_valid  <= 1'b1;
          phase      <= PRECHARGE;
        end
      endcase
    end
  end

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    if (IS_RX) begin : g_rx
      grp_drp_rx #(.KEEP(KEEP)) u_lane (
        .key(key), .pre(pre), .din(data_q[i*SUBWORD +: SUBWORD]),
        .dout_t(rail_t[i*SUBWORD +: SUBWORD]), .dout_f(rail_f[i*SUBWORD +: SUBWORD]));
    end else begin : g_tx
      grp_drp_tx #(.KEEP(KEEP)) u_lane (
        .key(key), .pre(pre), .din(data_q[i*SUBWORD +: SUBWORD]),
        .dout_t(rail_t[i*SUBWORD +: SUBWORD]), .dout_f(rail_f[i*SUBWORD +: SUBWORD]));
    end
  end

  // Dual-rail rule: both rails low in precharge, complementary in evaluation.
  a_precharge_low: assert property (@(posedge clk) disable iff (!rst_n)
    pre |-> (rail_t == '0 && rail_f == '0));
  a_rails_complementary: assert property (@(posedge clk) disable iff (!rst_n)
    !pre |-> (rail_f == ~rail_t));
  a_out_complementary: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (out_data_n == ~out_data));

endmodule
