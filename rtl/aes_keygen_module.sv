// aes_keygen_module: the key-generation engine of the co-processor.
//
// It re-uses the input FIFO and the shared control state machine of the
// cipher engines and replaces the cipher round with the key-expansion
// sub-module. The host writes a 128-bit cipher key as the data field of a
// block (IV ignored) with a context word whose mode field is ECB or CBC and
// whose key_index names the key set. The controller then runs eleven round
// cycles: round 0 passes the cipher key through and rounds 1..10 each derive
// the next round key, and every one of the eleven keys is written to the
// round-key memories on key_wr/key_wr_addr/key_wr_data with
// key_wr_addr = {key_index, round}. Where the generated keys go (straight to
// the key memories rather than through an output FIFO) is this design's
// choice; the document only says the generator's output feeds the cipher and
// inverse cipher so their round keys are updated automatically.
//
// Interface: host write side as in the cipher engines (wrb active low, two
// 64-bit writes per key, fullb); key write port. resetb: synchronous, active
// low. Timing: one round key per clock, 12 clocks per key back to back.
module aes_keygen_module
  import aes_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 8,
  parameter int unsigned KEY_IDX_W = 1
) (
  input  logic                 clk,
  input  logic                 resetb,
  input  logic [63:0]          data_input,
  input  logic [63:0]          iv_in,
  input  logic [15:0]          context_in,
  input  logic                 wrb,
  output logic                 fullb,
  output logic                 key_wr,
  output logic [KEY_IDX_W+3:0] key_wr_addr,
  output block_t               key_wr_data
);
  block_t      f_data, f_iv, r_in, r_next, unused_out;
  logic [31:0] f_ctx;
  logic        f_emptyb, f_rd, unused_wr, unused_rd;
  logic [3:0]  round;
  logic [KEY_IDX_W+3:0] unused_ka;

  aes_in_fifo #(.DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .resetb, .data_input, .iv_in, .context_in, .wrb, .fullb,
    .rd(f_rd), .rd_data(f_data), .rd_iv(f_iv), .rd_context(f_ctx), .emptyb(f_emptyb)
  );

  aes_ctrl #(.ENGINE(ENG_KEYGEN), .KEY_IDX_W(KEY_IDX_W)) u_ctrl (
    .clk, .resetb,
    .fifo_emptyb(f_emptyb), .fifo_data(f_data), .fifo_iv(f_iv), .fifo_context(f_ctx), .fifo_rd(f_rd),
    .fifo_fullb(1'b1), .out_wr(unused_wr), .out_data(unused_out),
    .aes_data_in(r_in), .round, .aes_data_out_round0(r_in), .aes_data_out_mid(r_next),
    .aes_data_out_final(r_next), .key_address(unused_ka), .read_mem(unused_rd),
    .key_wr, .key_wr_addr, .key_wr_data
  );

  aes_key_expand u_expand (.key_in(r_in), .round, .key_out(r_next));
endmodule
