// tb_aes_out_fifo: writes random 128-bit results into the output FIFO
// whenever fullb allows and reads 64-bit words back at random times; checks
// word order (upper half first), the flags against the fill level, and that
// the FIFO both fills and empties.
module tb_aes_out_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, resetb = 0;
  logic wr = 0, fullb, rdb = 1, emptyb;
  logic [127:0] wr_data;
  logic [63:0] data_output;
  int checks = 0, failures = 0, level = 0, full_seen = 0, empty_seen = 0;
  logic [63:0] q [$];

  aes_out_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    resetb = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      chk(fullb == (level <= DEPTH - 2), "fullb");
      chk(emptyb == (level >= 2), "emptyb");
      if (!fullb) full_seen++;
      if (!emptyb) empty_seen++;
      wr = fullb && ($urandom % 4 != 0);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      rdb = !((level > 0) && (cyc < 1500 ? ($urandom % 3 == 0) : ($urandom % 2 == 0)));
      if (!rdb) chk(data_output == q.pop_front(), "data");
      if (wr) begin q.push_back(wr_data[127:64]); q.push_back(wr_data[63:0]); end
      level = level + (wr ? 2 : 0) - (!rdb ? 1 : 0);
    end
    chk(full_seen > 0 && empty_seen > 0, "flags never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
