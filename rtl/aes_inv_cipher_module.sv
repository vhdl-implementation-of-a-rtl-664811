// aes_inv_cipher_module: the space-optimised AES-128 decryption engine.
//
// It mirrors the encryption engine: the same input and output FIFOs, the
// shared control state machine run in its decryption variant (round keys
// read in reverse order, 10 down to 0) and an inverse cipher round
// (InvShiftRows, sixteen inverse S-box ROMs, AddRoundKey, InvMixColumns).
// For CBC the controller keeps the previous ciphertext block in a register
// and XORs it (or the IV at start of packet) into the output of the last
// round, the arrangement the document draws for CBC decryption.
//
// Interface (document Table 4): data_input/iv_in/context_in + wrb (active
// low) + fullb for the host writes, two writes per 128-bit block, most
// significant half first; data_output + rdb (active low) + emptyb for the
// host reads; key_address/read_mem/key_in to an external round-key memory
// whose read data must arrive one clock after read_mem. resetb is a
// synchronous active-low reset.
// Timing: 12 clocks per block back to back (1 load/store + 11 rounds).
module aes_inv_cipher_module
  import aes_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 8,
  parameter int unsigned OUT_DEPTH = 8,
  parameter int unsigned KEY_IDX_W = 1
) (
  input  logic                 clk,
  input  logic                 resetb,
  input  logic [63:0]          data_input,
  input  logic [63:0]          iv_in,
  input  logic [15:0]          context_in,
  input  logic                 wrb,
  output logic                 fullb,
  output logic [63:0]          data_output,
  input  logic                 rdb,
  output logic                 emptyb,
  input  block_t               key_in,
  output logic [KEY_IDX_W+3:0] key_address,
  output logic                 read_mem
);
  block_t      f_data, f_iv, o_data, r_in, r0, rmid, rfin, unused_kwd;
  logic [31:0] f_ctx;
  logic        f_emptyb, f_rd, o_fullb, o_wr, unused_kw;
  logic [3:0]  round;
  logic [KEY_IDX_W+3:0] unused_kwa;

  aes_in_fifo #(.DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .resetb, .data_input, .iv_in, .context_in, .wrb, .fullb,
    .rd(f_rd), .rd_data(f_data), .rd_iv(f_iv), .rd_context(f_ctx), .emptyb(f_emptyb)
  );

  aes_ctrl #(.ENGINE(ENG_DECRYPT), .KEY_IDX_W(KEY_IDX_W)) u_ctrl (
    .clk, .resetb,
    .fifo_emptyb(f_emptyb), .fifo_data(f_data), .fifo_iv(f_iv), .fifo_context(f_ctx), .fifo_rd(f_rd),
    .fifo_fullb(o_fullb), .out_wr(o_wr), .out_data(o_data),
    .aes_data_in(r_in), .round, .aes_data_out_round0(r0), .aes_data_out_mid(rmid),
    .aes_data_out_final(rfin), .key_address, .read_mem,
    .key_wr(unused_kw), .key_wr_addr(unused_kwa), .key_wr_data(unused_kwd)
  );

  aes_inv_cipher_round u_round (
    .data_in(r_in), .key_in, .data_out_round0(r0), .data_out_mid(rmid), .data_out_final(rfin)
  );

  aes_out_fifo #(.DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .resetb, .wr(o_wr), .wr_data(o_data), .fullb(o_fullb),
    .rdb, .data_output, .emptyb
  );
endmodule
