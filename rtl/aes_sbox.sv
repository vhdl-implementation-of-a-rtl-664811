// aes_sbox: the 256 x 8 SubBytes look-up ROM.
//
// One ROM per state byte is the document's S-box approach: the cipher round
// holds sixteen of these. The contents are the table computed at elaboration
// in aes_pkg (GF(2^8) inverse followed by the SubBytes affine transform); a
// synthesis tool maps the constant array to a ROM or LUTs.
//
// Interface: addr is the byte to substitute, data is SubBytes(addr).
// Timing: purely combinational (an asynchronous ROM read).
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t addr,
  output byte_t data
);
  assign data = SBOX_TABLE[addr];
endmodule
