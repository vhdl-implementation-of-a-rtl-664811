// tb_aes_in_fifo: writes random 64-bit halves (data, IV, context) into the
// input FIFO while a reader pops whole blocks at random times; checks every
// popped block against a software queue, the fullb/emptyb flags against the
// fill level, and that fullb stops the writer when the FIFO fills.
module tb_aes_in_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, resetb = 0;
  logic [63:0] data_input, iv_in;
  logic [15:0] context_in;
  logic wrb = 1, fullb, rd = 0, emptyb;
  logic [127:0] rd_data, rd_iv;
  logic [31:0] rd_context;
  int checks = 0, failures = 0, level = 0, full_seen = 0;
  logic [143:0] q [$];   // {data, iv, ctx} per half

  aes_in_fifo #(.DEPTH(DEPTH)) dut (.*);

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
    logic [143:0] a, b;
    repeat (2) @(posedge clk);
    resetb = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      chk(fullb == (level <= DEPTH - 2), "fullb");
      chk(emptyb == (level >= 2), "emptyb");
      if (!fullb) full_seen++;
      // writer: whole blocks only, start only when fullb allows
      wrb = 1;
      if ((level % 2 == 1) || (fullb && ($urandom % 3 != 0))) begin
        data_input = {$urandom, $urandom};
        iv_in      = {$urandom, $urandom};
        context_in = 16'($urandom);
        wrb = 0;
      end
      rd = emptyb && (cyc > 1500 ? ($urandom % 2 == 0) : ($urandom % 5 == 0));
      if (rd) begin
        a = q.pop_front();
        b = q.pop_front();
        chk(rd_data == {a[143:80], b[143:80]}, "data");
        chk(rd_iv == {a[79:16], b[79:16]}, "iv");
        chk(rd_context == {a[15:0], b[15:0]}, "context");
      end
      if (!wrb) q.push_back({data_input, iv_in, context_in});
      level = level + (!wrb ? 1 : 0) - (rd ? 2 : 0);
    end
    chk(full_seen > 0, "FIFO never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
