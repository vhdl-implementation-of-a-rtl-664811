// aes_cipher_round: one AES encryption round, the cipher sub-module of the
// space-optimised engine.
//
// The incoming state addresses sixteen S-box ROMs (Substate). ShiftRows is
// pure wiring (Shiftstate); xtime of the shifted bytes gives Shiftstate_2 and
// the balanced MixColumns equations combine 1x, 2x and 3x = 1x ^ 2x terms.
// The result is XORed with the round key. Like the document's sub-module it
// offers one result per kind of round and the controller picks the one for
// the current round:
//   data_out_round0 : data_in ^ key_in                     (round 0)
//   data_out_mid    : MixColumns(ShiftRows(Sub(data_in))) ^ key_in (1..9)
//   data_out_final  : ShiftRows(Sub(data_in)) ^ key_in     (round 10)
// The document also gives the sub-module a registered copy of the round-10
// result; here the controller's result register plays that part.
// Timing: purely combinational; the state register lives in the controller.
module aes_cipher_round
  import aes_pkg::*;
(
  input  block_t data_in,
  input  block_t key_in,
  output block_t data_out_round0,
  output block_t data_out_mid,
  output block_t data_out_final
);
  block_t substate, shiftstate;

  for (genvar i = 0; i < 16; i++) begin : g_rom
    aes_sbox u_sbox (
      .addr(data_in[127 - 8*i -: 8]),
      .data(substate[127 - 8*i -: 8])
    );
  end

  assign shiftstate      = shift_rows(substate);
  assign data_out_round0 = data_in ^ key_in;
  assign data_out_mid    = mix_columns(shiftstate) ^ key_in;
  assign data_out_final  = shiftstate ^ key_in;

endmodule
