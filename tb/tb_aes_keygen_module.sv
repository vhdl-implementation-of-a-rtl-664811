// tb_aes_keygen_module: writes cipher keys (the FIPS-197 key and random
// keys, to alternating key sets) into the key-generation engine and collects
// the round keys it writes out. Checks each of the eleven round keys and its
// {key index, round} address against the reference key schedule, one key
// per clock, and that keys queued back to back start 12 clocks apart.
module tb_aes_keygen_module;
  import aes_ref_pkg::*;
  logic clk = 0, resetb = 0;
  logic [63:0] data_input, iv_in;
  logic [15:0] context_in;
  logic wrb = 1, fullb, key_wr;
  logic [4:0] key_wr_addr;
  blk_t key_wr_data;
  blk_t keys [$];
  int kidx [$];
  int checks = 0, failures = 0, cyc = 0, nkey = 0, nround = 0, last_r0 = -1, spacing12 = 0, prev_wr = -2, gaps = 0;
  keys_t ks;

  aes_keygen_module #(.KEY_IDX_W(1)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (resetb && key_wr) begin
    if (nround == 0) begin
      ks = expand(keys[nkey]);
      if (last_r0 >= 0 && cyc - last_r0 == 12) spacing12++;
      last_r0 = cyc;
    end else if (cyc - prev_wr != 1) gaps++;
    prev_wr = cyc;
    checks++;
    if (key_wr_data !== ks[nround] || key_wr_addr !== {1'(kidx[nkey]), 4'(nround)}) begin
      failures++;
      $display("key %0d round %0d: %h @%h expected %h", nkey, nround, key_wr_data, key_wr_addr, ks[nround]);
    end
    nround++;
    if (nround == 11) begin nround = 0; nkey++; end
  end

  task automatic send(blk_t k, int idx);
    @(negedge clk);
    while (!fullb) @(negedge clk);
    wrb = 0; data_input = k[127:64]; iv_in = '0; context_in = {1'b1, 1'b1, 2'b01, 12'(idx)};
    @(negedge clk);
    data_input = k[63:0]; context_in = '0;
    @(negedge clk) wrb = 1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    resetb = 1;
    for (int n = 0; n < 10; n++) begin
      blk_t k;
      k = (n == 0) ? KAT1_KEY : rand_blk();
      keys.push_back(k); kidx.push_back(n % 2);
      send(k, n % 2);
    end
    wait (nkey == 10);
    repeat (5) @(negedge clk);
    checks++; if (spacing12 < 3) begin failures++; $display("12-clock spacing seen %0d", spacing12); end
    checks++; if (gaps != 0) begin failures++; $display("round keys not one per clock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
