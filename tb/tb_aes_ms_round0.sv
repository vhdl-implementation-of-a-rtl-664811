// tb_aes_ms_round0: loads random round-0 keys for 16 sessions (plus writes
// for other rounds that this stage must ignore) and checks the registered
// output for ECB, CBC start of packet (IV) and CBC continuation (feedback),
// together with the key_index and valid pipeline registers.
module tb_aes_ms_round0;
  import aes_ref_pkg::*;
  logic clk = 0, resetb = 0;
  blk_t data_in, iv_in, feedback, key_wr_data, data_out;
  logic [3:0] key_index, key_wr_index, key_index_out, key_wr_round;
  logic mode_in, sop_in, valid_in, key_wr = 0, valid_out;
  blk_t k0 [16];
  blk_t exp_d;
  logic [3:0] exp_k;
  logic exp_v;
  int checks = 0, failures = 0;

  aes_ms_round0 #(.KEY_INDEX_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      @(negedge clk);
      key_wr = 1; key_wr_round = 0; key_wr_index = 4'(s); key_wr_data = rand_blk(); k0[s] = key_wr_data;
      @(negedge clk);
      key_wr_round = 4'(1 + $urandom % 10); key_wr_data = rand_blk();   // not for this stage
    end
    @(negedge clk) key_wr = 0;
    valid_in = 0;
    @(negedge clk) resetb = 1;
    for (int i = 0; i < 300; i++) begin
      data_in = rand_blk(); iv_in = rand_blk(); feedback = rand_blk();
      key_index = 4'($urandom); mode_in = 1'($urandom); sop_in = 1'($urandom); valid_in = 1'($urandom);
      exp_d = data_in ^ k0[key_index] ^ (!mode_in ? '0 : (sop_in ? iv_in : feedback));
      exp_k = key_index; exp_v = valid_in;
      @(negedge clk);
      checks++;
      if (data_out !== exp_d || key_index_out !== exp_k || valid_out !== exp_v) begin
        failures++;
        $display("mismatch at %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
