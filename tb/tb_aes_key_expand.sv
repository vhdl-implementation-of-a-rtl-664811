// tb_aes_key_expand: steps the key-expansion sub-module through all ten
// rounds for the FIPS-197 key and for random keys and compares every round
// key with the reference key schedule (round 10 of the FIPS key is also
// checked against the published value).
module tb_aes_key_expand;
  import aes_ref_pkg::*;
  blk_t kin, kout, k;
  logic [3:0] round;
  keys_t ks;
  int checks = 0, failures = 0;

  aes_key_expand dut (.key_in(kin), .round, .key_out(kout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      k  = (n == 0) ? KAT1_KEY : rand_blk();
      ks = expand(k);
      kin = k;
      for (int r = 1; r <= 10; r++) begin
        round = 4'(r);
        #1;
        checks++;
        if (kout !== ks[r]) begin
          failures++;
          $display("key %0d round %0d: got %032x expected %032x", n, r, kout, ks[r]);
        end
        kin = kout;
      end
      if (n == 0) begin
        checks++;
        if (kin !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
