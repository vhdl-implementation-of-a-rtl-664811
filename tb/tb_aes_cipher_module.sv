// tb_aes_cipher_module: end-to-end test of the space-optimised encryption
// engine through its host interface, with the round-key memory modelled in
// the testbench (one clock read latency).
// Stream 1: the known-answer vectors (two ECB blocks, the two-block RFC 3602
// CBC packet). Stream 2: random ECB/CBC packets over four key sets. Checks
// every output block against the reference cipher, the 12-clock spacing of
// back-to-back blocks, and that both the input-full and the output-full
// conditions occurred (the reader pauses to force the latter).
module tb_aes_cipher_module;
  import aes_ref_pkg::*;
  localparam bit DEC = 0;
  localparam int KW  = 2;
  logic clk = 0, resetb = 0;
  logic [63:0] data_input, iv_in, data_output;
  logic [15:0] context_in;
  logic wrb = 1, fullb, rdb = 1, emptyb, read_mem;
  blk_t key_in;
  logic [KW+3:0] key_address;
  keys_t ks [4];
  blk_t keys [4];
  blk_t expq [$];
  int checks = 0, failures = 0, cyc = 0, last_wr = -1, spacing12 = 0, in_full = 0, out_full = 0;
  bit reader_pause = 0;

  aes_cipher_module #(.KEY_IDX_W(KW)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  always_ff @(posedge clk) if (read_mem) key_in <= ks[key_address[KW+3:4]][key_address[3:0]];

  always @(posedge clk) if (resetb) begin
    if (dut.o_wr) begin
      if (last_wr >= 0 && cyc - last_wr == 12) spacing12++;
      last_wr = cyc;
    end
    if (!fullb) in_full++;
    if (!dut.o_fullb && !dut.o_wr) out_full++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host write of one block: two 64-bit halves, most significant first
  task automatic send(blk_t d, blk_t iv, bit sop, logic [1:0] mode, int k);
    @(negedge clk);
    while (!fullb) @(negedge clk);
    wrb = 0; data_input = d[127:64]; iv_in = iv[127:64];
    context_in = {sop, !DEC, mode, 12'(k)};
    @(negedge clk);
    data_input = d[63:0]; iv_in = iv[63:0]; context_in = '0;
    @(negedge clk);
    wrb = 1;
  endtask

  // reader: pulls two words whenever a block is waiting
  initial begin
    blk_t got;
    forever begin
      @(negedge clk);
      if (emptyb && !reader_pause) begin
        rdb = 0; got[127:64] = data_output;
        @(negedge clk); got[63:0] = data_output;
        @(negedge clk) rdb = 1;
        checks++;
        if (expq.size() == 0 || got !== expq[0]) begin
          failures++;
          $display("output %032x, expected %032x", got, expq.size() ? expq[0] : '0);
        end
        if (expq.size()) void'(expq.pop_front());
      end
    end
  end

  function automatic blk_t ref_ecb(blk_t x, int k);
    return DEC ? decrypt(x, keys[k]) : encrypt(x, keys[k]);
  endfunction

  initial begin
    blk_t prev_in, prev_out, d, iv, e;
    keys[0] = KAT1_KEY; keys[1] = KAT2_KEY; keys[2] = CBC_KEY; keys[3] = rand_blk();
    for (int k = 0; k < 4; k++) ks[k] = expand(keys[k]);
    repeat (3) @(negedge clk);
    resetb = 1;
    if (!DEC) begin
      expq.push_back(KAT1_CT); send(KAT1_PT, '0, 1, 2'b01, 0);
      expq.push_back(KAT2_CT); send(KAT2_PT, '0, 1, 2'b01, 1);
      expq.push_back(CBC_CT0); send(CBC_PT0, CBC_IV, 1, 2'b10, 2);
      expq.push_back(CBC_CT1); send(CBC_PT1, CBC_IV, 0, 2'b10, 2);
    end else begin
      expq.push_back(KAT1_PT); send(KAT1_CT, '0, 1, 2'b01, 0);
      expq.push_back(KAT2_PT); send(KAT2_CT, '0, 1, 2'b01, 1);
      expq.push_back(CBC_PT0); send(CBC_CT0, CBC_IV, 1, 2'b10, 2);
      expq.push_back(CBC_PT1); send(CBC_CT1, CBC_IV, 0, 2'b10, 2);
    end
    // random packets; the reader pauses for a while to fill the output FIFO
    fork
      begin
        repeat (100) @(negedge clk);
        reader_pause = 1;
        repeat (200) @(negedge clk);
        reader_pause = 0;
      end
    join_none
    for (int p = 0; p < 20; p++) begin
      int k, len;
      bit cbc;
      k = $urandom % 4; len = 1 + $urandom % 4; cbc = (p % 3 != 0);
      iv = rand_blk();
      for (int b = 0; b < len; b++) begin
        d = rand_blk();
        if (!cbc) e = ref_ecb(d, k);
        else if (!DEC) e = encrypt(d ^ (b == 0 ? iv : prev_out), keys[k]);
        else e = decrypt(d, keys[k]) ^ (b == 0 ? iv : prev_in);
        prev_in = d; prev_out = e;
        expq.push_back(e);
        send(d, iv, b == 0, cbc ? 2'b10 : 2'b01, k);
      end
    end
    wait (expq.size() == 0);
    repeat (30) @(negedge clk);
    checks++; if (spacing12 < 5) begin failures++; $display("12-clock spacing seen %0d times", spacing12); end
    checks++; if (in_full == 0) begin failures++; $display("input FIFO never full"); end
    checks++; if (out_full == 0) begin failures++; $display("output FIFO never full"); end
    $display("12-clock spacings %0d, input-full cycles %0d, output-full stall cycles %0d",
             spacing12, in_full, out_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
