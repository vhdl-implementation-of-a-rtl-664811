// tb_aes_ms_cipher: runs eleven sessions through the multi-session pipelined
// cipher at one block per clock, scheduling them round robin the way the
// queue scheduler does. Session 0 carries the RFC 3602 two-block CBC packet,
// session 1 the FIPS-197 ECB vector, the others random CBC and ECB packets
// with their own random keys. Checks every output against the reference
// cipher, the 11-clock latency, one result per clock in steady state, and
// that CBC continuation blocks (feedback path) were exercised.
module tb_aes_ms_cipher;
  import aes_ref_pkg::*;
  localparam int NS = 11, NBLK = 6;
  logic clk = 0, resetb = 0;
  blk_t data_input, iv_in, data_output, key_wr_data;
  logic [3:0] key_index, key_wr_round, key_wr_index;
  logic mode_in, sop_in, data_valid_in = 0, data_valid_out, key_wr = 0;
  blk_t keys [NS];
  blk_t prev [NS];
  blk_t iv [NS];
  blk_t expq [$];
  int   inc [$];
  int checks = 0, failures = 0, cyc = 0, outs = 0, feedbacks = 0, run = 0, maxrun = 0;

  aes_ms_cipher #(.KEY_INDEX_W(4)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (resetb) begin
    if (data_valid_out) begin
      checks += 2;
      if (expq.size() == 0 || data_output !== expq[0]) begin
        failures++;
        $display("output %h expected %h", data_output, expq.size() ? expq[0] : '0);
      end
      if (inc.size() == 0 || cyc - inc[0] != 11) begin
        failures++;
        $display("latency %0d", inc.size() ? cyc - inc[0] : -1);
      end
      if (expq.size()) void'(expq.pop_front());
      if (inc.size()) void'(inc.pop_front());
      outs++; run++;
      if (run > maxrun) maxrun = run;
    end else run = 0;
  end

  initial begin
    keys[0] = CBC_KEY; keys[1] = KAT2_KEY;
    for (int s = 2; s < NS; s++) keys[s] = rand_blk();
    for (int s = 0; s < NS; s++) begin
      keys_t ks;
      ks = expand(keys[s]);
      for (int r = 0; r <= 10; r++) begin
        @(negedge clk);
        key_wr = 1; key_wr_round = 4'(r); key_wr_index = 4'(s); key_wr_data = ks[r];
      end
      iv[s] = (s == 0) ? CBC_IV : rand_blk();
    end
    @(negedge clk) key_wr = 0;
    @(negedge clk) resetb = 1;
    @(negedge clk);
    for (int j = 0; j < NBLK; j++)
      for (int s = 0; s < NS; s++) begin
        blk_t d, e;
        bit cbc;
        cbc = (s != 1) && (s % 4 != 3);
        if (s == 0 && j < 2) d = j ? CBC_PT1 : CBC_PT0;
        else if (s == 1 && j == 0) d = KAT2_PT;
        else d = rand_blk();
        if (!cbc) e = encrypt(d, keys[s]);
        else e = encrypt(d ^ (j == 0 ? iv[s] : prev[s]), keys[s]);
        if (cbc && j > 0) feedbacks++;
        if (s == 0 && j == 0 && e !== CBC_CT0) failures++;
        if (s == 0 && j == 1 && e !== CBC_CT1) failures++;
        if (s == 1 && j == 0 && e !== KAT2_CT) failures++;
        prev[s] = e;
        data_input = d; iv_in = iv[s]; key_index = 4'(s); mode_in = cbc; sop_in = (j == 0);
        data_valid_in = 1;
        expq.push_back(e); inc.push_back(cyc + 0);
        @(negedge clk);
      end
    data_valid_in = 0;
    repeat (20) @(negedge clk);
    checks += 3;
    if (outs != NS * NBLK) begin failures++; $display("outputs %0d", outs); end
    if (maxrun != NS * NBLK) begin failures++; $display("longest run of back-to-back outputs %0d", maxrun); end
    if (feedbacks == 0) failures++;
    $display("blocks %0d, longest one-per-clock run %0d, CBC feedback blocks %0d", outs, maxrun, feedbacks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
