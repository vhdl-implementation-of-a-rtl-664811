// tb_aes_security_coprocessor: end-to-end test of the whole co-processor at
// its default parameters.
//
// Space-optimised side: the key generator expands the RFC 3602 CBC key into
// key set 0 and the FIPS-197 key 000102..0f into set 1; the encryption and
// decryption engines then run the known-answer vectors and random ECB/CBC
// packets, sharing the host bus, and every result is checked against the
// reference cipher. Midway, set 0 is regenerated with a new key while the
// engines work on set 1. The reader pauses so that the output FIFOs fill,
// the writer outruns the engines so that the input FIFOs fill, and a block
// with an undefined mode is dropped.
// Multi-session side: round keys of eleven sessions are loaded, whole
// packets (CBC and ECB) are pushed into the eleven queues, and every
// ciphertext leaving the pipeline is matched to its queue and checked.
// Each mechanism is counted; one that never happened is a failure.
module tb_aes_security_coprocessor;
  import aes_ref_pkg::*;
  localparam int NS = 11;

  logic clk = 0, resetb = 0;
  logic [63:0] data_input, iv_in, data_output;
  logic [15:0] context_in;
  logic wrb_enc = 1, wrb_dec = 1, wrb_kgen = 1, rdb_enc = 1, rdb_dec = 1;
  logic fullb_enc, fullb_dec, fullb_kgen, emptyb_enc, emptyb_dec;
  logic ms_push = 0, ms_push_mode, ms_push_sop, ms_key_wr = 0, ms_data_valid_out;
  logic [3:0] ms_push_queue, ms_push_key_index, ms_key_wr_round, ms_key_wr_index;
  blk_t ms_push_data, ms_push_iv, ms_key_wr_data, ms_data_output;
  logic [10:0] ms_queue_full;

  aes_security_coprocessor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_keygen = 0, n_ecb_enc = 0, n_cbc_enc = 0, n_ecb_dec = 0, n_cbc_dec = 0, n_drop = 0;
  int n_in_full = 0, n_out_full = 0, n_key_update = 0;
  int n_ms_cbc_fb = 0, n_ms_ecb = 0, n_ms_bubble = 0, n_ms_qfull = 0, n_ms_out = 0;

  blk_t enc_exp [$], dec_exp [$];
  bit   reader_pause = 0;
  blk_t set_key [2];

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge clk) if (resetb) begin
    if (dut.kg_wr) n_keygen++;
    if (!fullb_enc || !fullb_dec) n_in_full++;
    if ((!dut.u_enc.o_fullb && !dut.u_enc.o_wr) || (!dut.u_dec.o_fullb && !dut.u_dec.o_wr)) n_out_full++;
    if (!ms_data_valid_out && dut.u_ms.stage_vld[9] == 0) n_ms_bubble++;
    if (ms_queue_full != '0) n_ms_qfull++;
  end

  // ---------------- host write (engine 0 = enc, 1 = dec, 2 = keygen) ----------------
  task automatic send(int eng, blk_t d, blk_t iv, bit sop, logic [1:0] mode, int k);
    @(negedge clk);
    while ((eng == 0 && !fullb_enc) || (eng == 1 && !fullb_dec) || (eng == 2 && !fullb_kgen))
      @(negedge clk);
    data_input = d[127:64]; iv_in = iv[127:64]; context_in = {sop, eng == 0, mode, 12'(k)};
    wrb_enc = (eng != 0); wrb_dec = (eng != 1); wrb_kgen = (eng != 2);
    @(negedge clk);
    data_input = d[63:0]; iv_in = iv[63:0]; context_in = '0;
    @(negedge clk);
    wrb_enc = 1; wrb_dec = 1; wrb_kgen = 1;
  endtask

  // ---------------- host read: one reader serves both engines ----------------
  initial begin
    blk_t got;
    forever begin
      @(negedge clk);
      if (!reader_pause && (emptyb_enc || emptyb_dec)) begin
        bit from_dec;
        from_dec = !emptyb_enc;
        if (from_dec) rdb_dec = 0; else rdb_enc = 0;
        #1 got[127:64] = data_output;
        @(negedge clk) got[63:0] = data_output;
        @(negedge clk) begin rdb_enc = 1; rdb_dec = 1; end
        if (from_dec) begin
          chk(dec_exp.size() != 0 && got === dec_exp[0], "decryption result");
          if (dec_exp.size()) void'(dec_exp.pop_front());
        end else begin
          chk(enc_exp.size() != 0 && got === enc_exp[0], "encryption result");
          if (enc_exp.size()) void'(enc_exp.pop_front());
        end
      end
    end
  end

  task automatic gen_key(blk_t k, int set);
    int n0;
    n0 = n_keygen;
    set_key[set] = k;
    send(2, k, '0, 1, 2'b01, set);
    wait (n_keygen == n0 + 11);
    @(negedge clk);
  endtask

  // one packet to each engine: encrypt it, and decrypt its ciphertext
  task automatic packet(int k, int len, bit cbc);
    blk_t iv, prev_c, prev_p, d, c;
    blk_t pts [$], cts [$];
    iv = rand_blk();
    for (int b = 0; b < len; b++) begin
      d = rand_blk();
      c = cbc ? encrypt(d ^ (b == 0 ? iv : prev_c), set_key[k]) : encrypt(d, set_key[k]);
      prev_c = c;
      pts.push_back(d); cts.push_back(c);
    end
    for (int b = 0; b < len; b++) begin
      enc_exp.push_back(cts[b]);
      send(0, pts[b], iv, b == 0, cbc ? 2'b10 : 2'b01, k);
      if (cbc) n_cbc_enc++; else n_ecb_enc++;
    end
    for (int b = 0; b < len; b++) begin
      dec_exp.push_back(pts[b]);
      send(1, cts[b], iv, b == 0, cbc ? 2'b10 : 2'b01, k);
      if (cbc) n_cbc_dec++; else n_ecb_dec++;
    end
  endtask

  // ---------------- multi-session side ----------------
  blk_t ms_keys [NS];
  blk_t ms_exp [NS][$];
  int   inflight [$];
  always @(posedge clk) if (resetb) begin
    if (dut.u_sched.out_valid) inflight.push_back(int'(dut.u_sched.slot));
    if (ms_data_valid_out) begin
      int q;
      n_ms_out++;
      q = inflight.size() ? inflight.pop_front() : -1;
      checks++;
      if (q < 0 || ms_exp[q].size() == 0 || ms_data_output !== ms_exp[q][0]) begin
        failures++;
        $display("multi-session output %h from queue %0d wrong", ms_data_output, q);
      end
      if (q >= 0 && ms_exp[q].size()) void'(ms_exp[q].pop_front());
    end
  end

  task automatic ms_packet(int q, int len, bit cbc, bit kat);
    blk_t iv, prev, d, e;
    iv = kat ? CBC_IV : rand_blk();
    for (int b = 0; b < len; b++) begin
      d = kat ? (b ? CBC_PT1 : CBC_PT0) : rand_blk();
      e = cbc ? encrypt(d ^ (b == 0 ? iv : prev), ms_keys[q]) : encrypt(d, ms_keys[q]);
      prev = e;
      if (kat) chk(e === (b ? CBC_CT1 : CBC_CT0), "reference CBC vector");
      if (cbc && b > 0) n_ms_cbc_fb++;
      if (!cbc) n_ms_ecb++;
      ms_exp[q].push_back(e);
      @(negedge clk);
      ms_push = 1; ms_push_queue = 4'(q); ms_push_data = d; ms_push_iv = iv;
      ms_push_key_index = 4'(q); ms_push_mode = cbc; ms_push_sop = (b == 0);
    end
    @(negedge clk) ms_push = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    resetb = 1;
    fork
      // ======== space-optimised co-processor ========
      begin
        gen_key(CBC_KEY, 0);
        gen_key(KAT2_KEY, 1);
        // known answers
        enc_exp.push_back(KAT2_CT); send(0, KAT2_PT, '0, 1, 2'b01, 1); n_ecb_enc++;
        enc_exp.push_back(CBC_CT0); send(0, CBC_PT0, CBC_IV, 1, 2'b10, 0); n_cbc_enc++;
        enc_exp.push_back(CBC_CT1); send(0, CBC_PT1, CBC_IV, 0, 2'b10, 0); n_cbc_enc++;
        dec_exp.push_back(CBC_PT0); send(1, CBC_CT0, CBC_IV, 1, 2'b10, 0); n_cbc_dec++;
        dec_exp.push_back(CBC_PT1); send(1, CBC_CT1, CBC_IV, 0, 2'b10, 0); n_cbc_dec++;
        dec_exp.push_back(KAT2_PT); send(1, KAT2_CT, '0, 1, 2'b01, 1); n_ecb_dec++;
        // undefined mode: dropped, no output expected
        send(0, rand_blk(), '0, 1, 2'b11, 1); n_drop++;
        // random packets; the reader pauses to let the output FIFOs fill
        fork
          begin
            repeat (200) @(negedge clk);
            reader_pause = 1;
            repeat (150) @(negedge clk);
            reader_pause = 0;
          end
        join_none
        for (int p = 0; p < 6; p++) packet(p % 2, 1 + $urandom % 4, p % 3 != 2);
        // regenerate set 0 while set 1 packets are still queued
        for (int p = 0; p < 2; p++) packet(1, 3, 1);
        gen_key(rand_blk(), 0);
        n_key_update++;
        for (int p = 0; p < 4; p++) packet(p % 2, 1 + $urandom % 4, 1);
        wait (enc_exp.size() == 0 && dec_exp.size() == 0);
      end
      // ======== multi-session pipelined cipher ========
      begin
        ms_keys[0] = CBC_KEY;
        for (int s = 1; s < NS; s++) ms_keys[s] = rand_blk();
        for (int s = 0; s < NS; s++) begin
          keys_t ks;
          ks = expand(ms_keys[s]);
          for (int r = 0; r <= 10; r++) begin
            @(negedge clk);
            ms_key_wr = 1; ms_key_wr_round = 4'(r); ms_key_wr_index = 4'(s); ms_key_wr_data = ks[r];
          end
        end
        @(negedge clk) ms_key_wr = 0;
        ms_packet(0, 2, 1, 1);
        for (int round_no = 0; round_no < 8; round_no++) begin
          int q;
          // pick a queue that is empty and whose slot is far enough away for
          // the whole packet to be queued before it is served
          q = (int'(dut.u_sched.slot) + 6) % NS;
          wait (ms_exp[q].size() == 0);
          q = (int'(dut.u_sched.slot) + 6) % NS;
          if (ms_exp[q].size() == 0 && dut.u_sched.count[q] == 0)
            ms_packet(q, 4, round_no % 4 != 3, 0);
          else @(negedge clk);
        end
        repeat (60) @(negedge clk);
      end
    join
    repeat (40) @(negedge clk);
    for (int q = 0; q < NS; q++) chk(ms_exp[q].size() == 0, "multi-session outputs missing");
    chk(n_keygen == 33, "round keys generated");
    chk(n_ecb_enc > 0, "ECB encryption");
    chk(n_cbc_enc > 0, "CBC encryption");
    chk(n_ecb_dec > 0, "ECB decryption");
    chk(n_cbc_dec > 0, "CBC decryption");
    chk(n_drop > 0, "undefined mode dropped");
    chk(n_in_full > 0, "input FIFO full");
    chk(n_out_full > 0, "output FIFO full stall");
    chk(n_key_update > 0, "key set update");
    chk(n_ms_cbc_fb > 0, "multi-session CBC feedback");
    chk(n_ms_ecb > 0, "multi-session ECB");
    chk(n_ms_bubble > 0, "multi-session empty slot");
    chk(n_ms_qfull > 0, "multi-session queue full");
    $display("keygen writes %0d | enc ECB %0d CBC %0d | dec ECB %0d CBC %0d | dropped %0d",
             n_keygen, n_ecb_enc, n_cbc_enc, n_ecb_dec, n_cbc_dec, n_drop);
    $display("input-full cycles %0d | output-full stall cycles %0d | key set updates %0d",
             n_in_full, n_out_full, n_key_update);
    $display("multi-session: outputs %0d, CBC feedback blocks %0d, ECB blocks %0d, bubble cycles %0d, queue-full cycles %0d",
             n_ms_out, n_ms_cbc_fb, n_ms_ecb, n_ms_bubble, n_ms_qfull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
