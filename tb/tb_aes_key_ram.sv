// tb_aes_key_ram: fills the round-key memory with random keys, reads every
// address back (one clock read latency), checks that the read data holds
// while rd is low, and that a write to one set leaves the other intact.
module tb_aes_key_ram;
  logic clk = 0, wr = 0, rd = 0;
  logic [4:0] waddr, raddr;
  logic [127:0] wdata, rdata, held;
  logic [127:0] model [32];
  int checks = 0, failures = 0;

  aes_key_ram #(.KEY_IDX_W(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      wr = 1; waddr = 5'(a); wdata = {$urandom, $urandom, $urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk) wr = 0;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk) rd = 1; raddr = 5'(31 - a);
      @(negedge clk) rd = 0;
      chk(rdata == model[31 - a], "read");
      held = rdata;
      raddr = 5'(a);
      @(negedge clk) chk(rdata == held, "hold");
    end
    // rewrite set 0 round 3 while reading set 1 round 3 in the same clock
    @(negedge clk) wr = 1; waddr = 5'd3; wdata = '1; rd = 1; raddr = 5'd19;
    @(negedge clk) wr = 0; rd = 0; chk(rdata == model[19], "other set");
    @(negedge clk) rd = 1; raddr = 5'd3;
    @(negedge clk) rd = 0; chk(rdata == '1, "rewritten");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
