// aes_inv_cipher_round: one AES decryption round, the inverse cipher
// sub-module of the space-optimised decryption engine.
//
// The round order follows the FIPS-197 inverse cipher: InvShiftRows (wiring),
// sixteen inverse S-box ROMs, AddRoundKey, then InvMixColumns for the middle
// rounds. Keys are applied in reverse order by the controller (round key 10
// first). Outputs:
//   data_out_round0 : data_in ^ key_in                         (first step)
//   data_out_mid    : InvMixColumns(InvSub(InvShift(data_in)) ^ key_in)
//   data_out_final  : InvSub(InvShift(data_in)) ^ key_in        (last step)
// InvMixColumns uses the 0x09/0x0B/0x0D/0x0E products built from repeated
// xtime, as in the document; the rest of the structure is this design's
// mirror of the encryption sub-module.
// Timing: purely combinational; the state register lives in the controller.
module aes_inv_cipher_round
  import aes_pkg::*;
(
  input  block_t data_in,
  input  block_t key_in,
  output block_t data_out_round0,
  output block_t data_out_mid,
  output block_t data_out_final
);
  block_t shifted, substate, keyed;

  assign shifted = inv_shift_rows(data_in);

  for (genvar i = 0; i < 16; i++) begin : g_rom
    aes_inv_sbox u_inv_sbox (
      .addr(shifted[127 - 8*i -: 8]),
      .data(substate[127 - 8*i -: 8])
    );
  end

  assign keyed           = substate ^ key_in;
  assign data_out_round0 = data_in ^ key_in;
  assign data_out_mid    = inv_mix_columns(keyed);
  assign data_out_final  = keyed;

endmodule
