// tb_aes_cipher_round: checks the three outputs of the encryption round
// against the reference model for random states and keys, and round 1 of the
// FIPS-197 appendix B example.
module tb_aes_cipher_round;
  import aes_ref_pkg::*;
  blk_t din, key, r0, rmid, rfin;
  int checks = 0, failures = 0;

  aes_cipher_round dut (.data_in(din), .key_in(key), .data_out_round0(r0),
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
    // FIPS-197 appendix B: round 0 then round 1.
    din = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1 chk("round0", r0, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    key = 128'ha0fafe1788542cb123a339392a6c7605;
    #1 chk("round1", rmid, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 100; i++) begin
      din = rand_blk();
      key = rand_blk();
      #1;
      chk("round0", r0, din ^ key);
      chk("mid", rmid, enc_round(din, key, 0));
      chk("final", rfin, enc_round(din, key, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
