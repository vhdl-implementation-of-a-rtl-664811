// tb_aes_ctrl: drives the control state machine (encryption variant) with a
// modelled input FIFO, a modelled one-clock-latency key memory and a
// reference round datapath, so only the sequencing is under test. Checks:
// results of ECB and CBC packets against the reference cipher, the
// 12-clock spacing of back-to-back results, that an undefined mode is
// dropped, and that a full output FIFO holds the result until there is room.
module tb_aes_ctrl;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, resetb = 0;
  logic fifo_emptyb, fifo_rd, fifo_fullb = 1, out_wr, read_mem, key_wr;
  blk_t fifo_data, fifo_iv, out_data, din, r0, rmid, rfin, key_in, key_wr_data;
  logic [31:0] fifo_context;
  logic [3:0] round;
  logic [4:0] key_address, key_wr_addr;
  int checks = 0, failures = 0, cyc = 0, last_wr = -1, spacing_ok = 0, stalls = 0, drops = 0;
  keys_t ks [2];
  logic [287:0] inq [$];
  blk_t expq [$];
  blk_t prev;

  aes_ctrl #(.ENGINE(ENG_ENCRYPT), .KEY_IDX_W(1)) dut (
    .clk, .resetb, .fifo_emptyb, .fifo_data, .fifo_iv, .fifo_context, .fifo_rd,
    .fifo_fullb, .out_wr, .out_data, .aes_data_in(din), .round,
    .aes_data_out_round0(r0), .aes_data_out_mid(rmid), .aes_data_out_final(rfin),
    .key_address, .read_mem, .key_wr, .key_wr_addr, .key_wr_data
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // reference datapath
  always_comb begin
    r0   = din ^ key_in;
    rmid = enc_round(din, key_in, 0);
    rfin = enc_round(din, key_in, 1);
  end
  // key memory with registered read
  always_ff @(posedge clk) if (read_mem) key_in <= ks[key_address[4]][key_address[3:0]];
  // input FIFO model
  // (head refreshed every falling edge, popped on the rising edge)
  always @(negedge clk) begin
    fifo_emptyb = (inq.size() != 0);
    {fifo_data, fifo_iv, fifo_context} = fifo_emptyb ? inq[0] : '0;
  end
  always @(posedge clk) if (resetb && fifo_rd) void'(inq.pop_front());

  always @(posedge clk) if (out_wr) begin
    checks++;
    if (expq.size() == 0 || out_data !== expq[0]) begin
      failures++;
      $display("result %032x unexpected at %0t", out_data, $time);
    end
    if (expq.size() != 0) void'(expq.pop_front());
    if (last_wr >= 0 && cyc - last_wr == 12) spacing_ok++;
    last_wr = cyc;
  end
  always @(posedge clk) if (resetb && !fifo_fullb && dut.st_q == dut.S_DONE) stalls++;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // queue one block; ctx: sop, mode, key index
  task automatic put(blk_t d, blk_t iv, bit sop, logic [1:0] mode, bit kidx, blk_t exp, bit expect_out);
    inq.push_back({d, iv, {sop, 1'b1, mode, 11'd0, kidx}, 16'h0});
    if (expect_out) expq.push_back(exp);
  endtask

  initial begin
    ks[0] = expand(KAT2_KEY);
    ks[1] = expand(CBC_KEY);
    repeat (2) @(posedge clk);
    // ECB known answer, then the RFC 3602 two-block CBC packet, then random
    put(KAT2_PT, '0, 1, 2'b01, 0, KAT2_CT, 1);
    put(CBC_PT0, CBC_IV, 1, 2'b10, 1, CBC_CT0, 1);
    put(CBC_PT1, CBC_IV, 0, 2'b10, 1, CBC_CT1, 1);
    put(rand_blk(), '0, 1, 2'b11, 0, '0, 0);      // undefined mode: dropped
    drops++;
    prev = CBC_CT1;
    for (int i = 0; i < 20; i++) begin
      blk_t d, iv, e;
      bit sop, cbc, k;
      d = rand_blk(); iv = rand_blk(); k = 1'($urandom);
      cbc = (i % 5 != 0); sop = (i % 5 == 1);
      if (!cbc)     e = encrypt(d, k ? CBC_KEY : KAT2_KEY);
      else if (sop) e = encrypt(d ^ iv, k ? CBC_KEY : KAT2_KEY);
      else          e = encrypt(d ^ prev, k ? CBC_KEY : KAT2_KEY);
      prev = e;
      put(d, iv, sop, cbc ? 2'b10 : 2'b01, k, e, 1);
    end
    @(negedge clk) resetb = 1;
    // stall the output now and then once the stream is running
    repeat (150) @(negedge clk);
    repeat (12) begin
      fifo_fullb = 0;
      repeat (1 + $urandom % 20) @(negedge clk);
      fifo_fullb = 1;
      repeat (1 + $urandom % 20) @(negedge clk);
    end
    wait (expq.size() == 0 && inq.size() == 0);
    repeat (20) @(negedge clk);
    checks++; if (spacing_ok < 10) begin failures++; $display("12-clock spacing seen %0d times", spacing_ok); end
    checks++; if (stalls == 0) begin failures++; $display("output stall never happened"); end
    checks++; if (expq.size() != 0) failures++;
    $display("back-to-back 12-clock results: %0d, stall cycles: %0d, dropped blocks: %0d",
             spacing_ok, stalls, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
