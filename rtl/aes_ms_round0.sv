// aes_ms_round0: round-0 stage of the multi-session pipelined cipher.
//
// It chooses what enters the pipeline and performs the initial AddRoundKey:
//   mode_in = 0 (ECB)            data_in ^ K0
//   mode_in = 1, sop_in = 1      data_in ^ iv_in ^ K0
//   mode_in = 1, sop_in = 0      data_in ^ feedback ^ K0
// feedback is the pipeline's output, which at this moment is the ciphertext
// of the block that entered eleven clocks earlier, i.e. the previous block of
// the same queue/session. K0 is read from a store of SESSIONS round-0 keys,
// indexed by key_index; the store is loaded through the key write port
// (key_wr_round must be 0 for this stage to take the key). The document keeps
// pre-computed round keys in each stage but does not say how they are loaded;
// the broadcast write port is this design's choice.
//
// Timing: one block per clock; data_out, key_index_out and valid_out are
// registered (one clock latency). resetb (synchronous, active low) clears the
// valid flag; the key store is not reset.
module aes_ms_round0
  import aes_pkg::*;
#(
  parameter int unsigned KEY_INDEX_W = 4
) (
  input  logic                   clk,
  input  logic                   resetb,
  input  block_t                 data_in,
  input  block_t                 iv_in,
  input  logic [KEY_INDEX_W-1:0] key_index,
  input  logic                   mode_in,
  input  logic                   sop_in,
  input  logic                   valid_in,
  input  block_t                 feedback,
  input  logic                   key_wr,
  input  logic [3:0]             key_wr_round,
  input  logic [KEY_INDEX_W-1:0] key_wr_index,
  input  block_t                 key_wr_data,
  output block_t                 data_out,
  output logic [KEY_INDEX_W-1:0] key_index_out,
  output logic                   valid_out
);
  block_t keys [2**KEY_INDEX_W];
  block_t whitened;

  always_ff @(posedge clk) begin
    if (key_wr && key_wr_round == 4'd0) keys[key_wr_index] <= key_wr_data;
  end

  always_comb begin
    if (!mode_in)    whitened = data_in;
    else if (sop_in) whitened = data_in ^ iv_in;
    else             whitened = data_in ^ feedback;
  end

  always_ff @(posedge clk) begin
    data_out      <= whitened ^ keys[key_index];
    key_index_out <= key_index;
  end

  always_ff @(posedge clk) begin
    if (!resetb) valid_out <= 1'b0;
    else         valid_out <= valid_in;
  end
endmodule
