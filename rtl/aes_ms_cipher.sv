// aes_ms_cipher: the multi-session pipelined AES-128 encryption module.
//
// Eleven stages (round 0 and rounds 1..10), each with its own round hardware
// and its own per-session round-key store, take a new 128-bit block every
// clock. CBC, which normally forbids pipelining, works because the feeding
// scheduler presents blocks of one session exactly eleven clocks apart: the
// ciphertext of a session's previous block leaves the last stage in the very
// clock the session's next block enters round 0, and a feedback path carries
// it there to be XORed in. Up to eleven sessions are therefore encrypted at
// once, each at the rate of a one-round-per-clock engine, for an aggregate
// of one block per clock.
//
// Interface (document Table 5, 128-bit data, IV and output): data_input,
// iv_in, key_index, mode_in (0 = ECB, 1 = CBC), sop_in, data_valid_in in;
// data_output, data_valid_out out. The round-key load port (key_wr,
// key_wr_round, key_wr_index, key_wr_data) writes one round key of one
// session into the matching stage; the document does not describe key
// loading, so this port is this design's addition. resetb is synchronous and
// active low.
// Timing: latency 11 clocks from data_valid_in to data_valid_out; throughput
// one block per clock.
module aes_ms_cipher
  import aes_pkg::*;
#(
  parameter int unsigned KEY_INDEX_W = 4
) (
  input  logic                   clk,
  input  logic                   resetb,
  input  block_t                 data_input,
  input  block_t                 iv_in,
  input  logic [KEY_INDEX_W-1:0] key_index,
  input  logic                   mode_in,
  input  logic                   sop_in,
  input  logic                   data_valid_in,
  output block_t                 data_output,
  output logic                   data_valid_out,
  input  logic                   key_wr,
  input  logic [3:0]             key_wr_round,
  input  logic [KEY_INDEX_W-1:0] key_wr_index,
  input  block_t                 key_wr_data
);
  block_t                 stage_data [NR+1];
  logic [KEY_INDEX_W-1:0] stage_kidx [NR+1];
  logic                   stage_vld  [NR+1];

  aes_ms_round0 #(.KEY_INDEX_W(KEY_INDEX_W)) u_round0 (
    .clk, .resetb, .data_in(data_input), .iv_in, .key_index, .mode_in, .sop_in,
    .valid_in(data_valid_in), .feedback(data_output),
    .key_wr, .key_wr_round, .key_wr_index, .key_wr_data,
    .data_out(stage_data[0]), .key_index_out(stage_kidx[0]), .valid_out(stage_vld[0])
  );

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_ms_round #(.ROUND(r), .KEY_INDEX_W(KEY_INDEX_W)) u_round (
      .clk, .resetb, .data_in(stage_data[r-1]), .key_index(stage_kidx[r-1]),
      .valid_in(stage_vld[r-1]),
      .key_wr, .key_wr_round, .key_wr_index, .key_wr_data,
      .data_out(stage_data[r]), .key_index_out(stage_kidx[r]), .valid_out(stage_vld[r])
    );
  end

  assign data_output    = stage_data[NR];
  assign data_valid_out = stage_vld[NR];
endmodule
