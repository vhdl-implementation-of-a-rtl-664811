// tb_aes_inv_sbox: checks all 256 entries of the inverse S-box ROM against the
// inverse of the reference S-box (found by search) and
// two FIPS-197 values.
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;
  logic [7:0] addr, data;
  int checks = 0, failures = 0;

  aes_inv_sbox dut (.addr, .data);

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
      if (data !== inv_sbox(8'(i))) begin
        failures++;
        $display("inv_sbox[%02x] = %02x, expected %02x", i, data, inv_sbox(8'(i)));
      end
    end
    addr = 8'h00; #1; checks++; if (data !== 8'h52) failures++;
    addr = 8'h53; #1; checks++; if (data !== 8'h50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
