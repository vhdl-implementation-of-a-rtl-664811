// aes_inv_sbox: the 256 x 8 InvSubBytes look-up ROM.
//
// The inverse S-box used by the decryption round. Its contents are the
// inverse permutation of the forward S-box, computed at elaboration in
// aes_pkg, so that InvSubBytes(SubBytes(b)) == b by construction.
//
// Interface: addr is the byte to substitute, data is InvSubBytes(addr).
// Timing: purely combinational (an asynchronous ROM read).
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t addr,
  output byte_t data
);
  assign data = INV_SBOX_TABLE[addr];
endmodule
