// tb_aes_sbox: checks all 256 entries of the S-box ROM against the
// reference S-box (inverse found by search, affine transform bit by bit) and
// two FIPS-197 values.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] addr, data;
  int checks = 0, failures = 0;

  aes_sbox dut (.addr, .data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      checks++;
      if (data !== sbox(8'(i))) begin
        failures++;
        $display("sbox[%02x] = %02x, expected %02x", i, data, sbox(8'(i)));
      end
    end
    addr = 8'h00; #1; checks++; if (data !== 8'h63) failures++;
    addr = 8'h53; #1; checks++; if (data !== 8'hed) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
