// tb_aes_inv_cipher_round: checks the decryption round against the reference
// inverse round for random states and keys, and that its last-round output
// undoes an encryption last round (with zero keys).
module tb_aes_inv_cipher_round;
  import aes_ref_pkg::*;
  blk_t din, key, r0, rmid, rfin, s;
  int checks = 0, failures = 0;

  aes_inv_cipher_round dut (.data_in(din), .key_in(key), .data_out_round0(r0),
                            .data_out_mid(rmid), .data_out_final(rfin));

  task automatic chk(string what, blk_t got, blk_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %032x expected %032x", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 60; i++) begin
      din = rand_blk();
      key = rand_blk();
      #1;
      chk("round0", r0, din ^ key);
      chk("mid", rmid, dec_round(din, key, 0));
      chk("final", rfin, dec_round(din, key, 1));
      s   = rand_blk();
      din = enc_round(s, '0, 1);
      key = '0;
      #1 chk("undo", rfin, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
