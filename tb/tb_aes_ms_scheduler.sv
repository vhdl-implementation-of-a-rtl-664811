// tb_aes_ms_scheduler: pushes random blocks into random queues of the
// round-robin scheduler and checks that each queue's blocks are issued in
// order, only in that queue's slot (so two issues from one queue are a
// multiple of eleven clocks apart), that pushes into a full queue are
// refused, and that empty slots leave bubbles (out_valid low).
module tb_aes_ms_scheduler;
  import aes_ref_pkg::*;
  localparam int NQ = 11, QD = 4;
  logic clk = 0, resetb = 0;
  logic push = 0, push_mode, push_sop, out_mode, out_sop, out_valid;
  logic [3:0] push_queue, push_key_index, out_key_index, slot;
  blk_t push_data, push_iv, out_data, out_iv;
  logic [NQ-1:0] queue_full;
  blk_t model [NQ][$];
  int last_issue [NQ];
  int popq;
  int checks = 0, failures = 0, cyc = 0, bubbles = 0, refused = 0, issued = 0, exp_slot = 1;

  aes_ms_scheduler #(.NUM_QUEUES(NQ), .QDEPTH(QD), .KEY_INDEX_W(4)) dut (.*);

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
    for (int q = 0; q < NQ; q++) last_issue[q] = -1;
    repeat (2) @(negedge clk);
    resetb = 1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      popq = -1;
      // observe this clock's issue (the pop itself happens at the next edge)
      chk(slot == 4'(exp_slot), "slot order");
      if (out_valid) begin
        chk(model[slot].size() != 0 && out_data == model[slot][0], "issued block");
        chk(out_key_index == 4'(slot) && out_iv == ~out_data, "block fields");
        if (last_issue[slot] >= 0) chk((cyc - last_issue[slot]) % NQ == 0, "spacing");
        last_issue[slot] = cyc;
        popq = int'(slot);
        issued++;
      end else begin
        chk(model[slot].size() == 0, "bubble with data waiting");
        bubbles++;
      end
      // push a block (the scheduler sees it next clock)
      push = (cyc < 1500) && ($urandom % 4 != 0);
      push_queue = 4'($urandom % NQ);
      push_data = rand_blk(); push_iv = ~push_data; push_key_index = push_queue;
      push_mode = 1; push_sop = 0;
      if (push) begin
        chk(queue_full[push_queue] == (model[push_queue].size() == QD), "queue_full");
        if (model[push_queue].size() < QD) model[push_queue].push_back(push_data);
        else refused++;
      end
      if (popq >= 0) void'(model[popq].pop_front());
      exp_slot = (exp_slot + 1) % NQ;
    end
    chk(refused > 0, "no full queue seen");
    chk(bubbles > 0, "no bubble seen");
    $display("issued %0d, bubbles %0d, refused pushes %0d", issued, bubbles, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
