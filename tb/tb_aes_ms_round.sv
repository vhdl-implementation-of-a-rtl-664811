// tb_aes_ms_round: checks a middle stage (round 5) and the last stage
// (round 10) of the multi-session pipeline: per-session key selection,
// ignored key writes for other rounds, the registered round result against
// the reference round, and key_index/valid propagation.
module tb_aes_ms_round;
  import aes_ref_pkg::*;
  logic clk = 0, resetb = 0;
  blk_t data_in, key_wr_data, out5, out10;
  logic [3:0] key_index, key_wr_index, kout5, kout10, key_wr_round;
  logic valid_in, key_wr = 0, v5, v10;
  blk_t k5 [16], k10 [16];
  int checks = 0, failures = 0;

  aes_ms_round #(.ROUND(5), .KEY_INDEX_W(4)) dut5 (
    .clk, .resetb, .data_in, .key_index, .valid_in, .key_wr, .key_wr_round, .key_wr_index,
    .key_wr_data, .data_out(out5), .key_index_out(kout5), .valid_out(v5));
  aes_ms_round #(.ROUND(10), .KEY_INDEX_W(4)) dut10 (
    .clk, .resetb, .data_in, .key_index, .valid_in, .key_wr, .key_wr_round, .key_wr_index,
    .key_wr_data, .data_out(out10), .key_index_out(kout10), .valid_out(v10));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++)
      for (int r = 0; r <= 10; r++) begin
        @(negedge clk);
        key_wr = 1; key_wr_round = 4'(r); key_wr_index = 4'(s); key_wr_data = rand_blk();
        if (r == 5) k5[s] = key_wr_data;
        if (r == 10) k10[s] = key_wr_data;
      end
    @(negedge clk) key_wr = 0; valid_in = 0;
    @(negedge clk) resetb = 1;
    for (int i = 0; i < 100; i++) begin
      blk_t e5, e10;
      logic [3:0] ki;
      logic vi;
      data_in = rand_blk(); key_index = 4'($urandom); valid_in = 1'($urandom);
      e5 = enc_round(data_in, k5[key_index], 0);
      e10 = enc_round(data_in, k10[key_index], 1);
      ki = key_index; vi = valid_in;
      @(negedge clk);
      checks += 2;
      if (out5 !== e5 || kout5 !== ki || v5 !== vi) begin failures++; $display("round 5 mismatch"); end
      if (out10 !== e10 || kout10 !== ki || v10 !== vi) begin failures++; $display("round 10 mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
