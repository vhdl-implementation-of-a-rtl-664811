// aes_ms_round: one of rounds 1..10 of the multi-session pipelined cipher.
//
// A copy of the space-optimised cipher round (sixteen S-box ROMs, ShiftRows,
// MixColumns, AddRoundKey) followed by a pipeline register. ROUND sets its
// place in the pipeline: ROUND = 10 takes the final-round result (no
// MixColumns), the others the middle-round result. The stage keeps its own
// round key for each of the 2**KEY_INDEX_W sessions and selects it with the
// key_index that travels down the pipeline with the block, so eleven blocks
// of eleven different sessions can be in flight with different keys. Keys
// are loaded through the broadcast write port; a stage takes a key only when
// key_wr_round equals ROUND (this loading scheme is this design's choice).
//
// Timing: one block per clock, one clock latency; key_index and the valid
// flag are registered along with the data. resetb (synchronous, active low)
// clears valid_out only.
module aes_ms_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND       = 1,
  parameter int unsigned KEY_INDEX_W = 4
) (
  input  logic                   clk,
  input  logic                   resetb,
  input  block_t                 data_in,
  input  logic [KEY_INDEX_W-1:0] key_index,
  input  logic                   valid_in,
  input  logic                   key_wr,
  input  logic [3:0]             key_wr_round,
  input  logic [KEY_INDEX_W-1:0] key_wr_index,
  input  block_t                 key_wr_data,
  output block_t                 data_out,
  output logic [KEY_INDEX_W-1:0] key_index_out,
  output logic                   valid_out
);
  block_t keys [2**KEY_INDEX_W];
  block_t r0_unused, rmid, rfin;

  always_ff @(posedge clk) begin
    if (key_wr && key_wr_round == 4'(ROUND)) keys[key_wr_index] <= key_wr_data;
  end

  aes_cipher_round u_round (
    .data_in, .key_in(keys[key_index]),
    .data_out_round0(r0_unused), .data_out_mid(rmid), .data_out_final(rfin)
  );

  always_ff @(posedge clk) begin
    data_out      <= (ROUND == NR) ? rfin : rmid;
    key_index_out <= key_index;
  end

  always_ff @(posedge clk) begin
    if (!resetb) valid_out <= 1'b0;
    else         valid_out <= valid_in;
  end
endmodule
