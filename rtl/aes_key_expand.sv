// aes_key_expand: the key-expansion sub-module. Computes round key r from
// round key r-1 for a 128-bit AES key.
//
// Word 3 of the previous key is rotated (RotWord), passed through four S-box
// ROMs (SubWord) and XORed with RCON(r); that gives NWord0 = word0 ^ temp,
// and each further word is the previous new word XORed with the matching old
// word (document 4.3.3). RCON is the doubling sequence 01,02,..,80,1B,36 in
// the top byte.
//
// Interface: key_in is round key r-1, round (1..10) selects RCON, key_out is
// round key r. Timing: purely combinational.
module aes_key_expand
  import aes_pkg::*;
(
  input  block_t     key_in,
  input  logic [3:0] round,
  output block_t     key_out
);
  logic [31:0] w0, w1, w2, w3, rot, sub, temp, rc;

  assign {w0, w1, w2, w3} = key_in;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_rom
    aes_sbox u_sbox (.addr(rot[31 - 8*i -: 8]), .data(sub[31 - 8*i -: 8]));
  end

  always_comb begin
    rc = '0;
    for (int unsigned r = 1; r <= NR; r++)
      if (round == 4'(r)) rc = rcon(r);
  end

  assign temp = sub ^ rc;
  always_comb begin
    logic [31:0] n0, n1, n2, n3;
    n0 = w0 ^ temp;
    n1 = w1 ^ n0;
    n2 = w2 ^ n1;
    n3 = w3 ^ n2;
    key_out = {n0, n1, n2, n3};
  end
endmodule
