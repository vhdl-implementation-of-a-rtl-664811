// aes_ms_scheduler: the queue scheduler that feeds the multi-session
// pipelined cipher (the "external processor" of the document's system
// diagram).
//
// NUM_QUEUES (= pipeline depth, 11) FIFO queues each hold blocks of one or
// more sessions; the host puts every block of a session into the same queue,
// and a packet's blocks contiguously. A slot counter steps 0..NUM_QUEUES-1,
// one step per clock, and in slot q the head block of queue q (if any) is
// issued to the cipher. Strict round robin means two blocks from one queue
// enter the pipeline a multiple of NUM_QUEUES clocks apart, which is what
// CBC chaining through the pipeline feedback needs. A CBC packet's next block
// must already be queued when its queue's slot comes round again, otherwise
// the chain value leaves the pipeline unused; the host therefore queues a
// whole packet before or while its first block issues.
//
// Interface: push/push_queue/push_* write one block into a queue (ignored if
// that queue is full; queue_full shows which are full); out_* drive the
// cipher's inputs, out_valid marking an issued block.
// Timing: one push and one issue per clock; the issued block is combinational
// from the queue head in its slot. The queue depth is this design's choice;
// resetb is synchronous, active low, and empties all queues.
module aes_ms_scheduler
  import aes_pkg::*;
#(
  parameter int unsigned NUM_QUEUES  = NR + 1,
  parameter int unsigned QDEPTH      = 4,
  parameter int unsigned KEY_INDEX_W = 4
) (
  input  logic                          clk,
  input  logic                          resetb,
  input  logic                          push,
  input  logic [$clog2(NUM_QUEUES)-1:0] push_queue,
  input  block_t                        push_data,
  input  block_t                        push_iv,
  input  logic [KEY_INDEX_W-1:0]        push_key_index,
  input  logic                          push_mode,
  input  logic                          push_sop,
  output logic [NUM_QUEUES-1:0]         queue_full,
  output block_t                        out_data,
  output block_t                        out_iv,
  output logic [KEY_INDEX_W-1:0]        out_key_index,
  output logic                          out_mode,
  output logic                          out_sop,
  output logic                          out_valid,
  output logic [$clog2(NUM_QUEUES)-1:0] slot
);
  localparam int unsigned QW = $clog2(NUM_QUEUES);
  localparam int unsigned PW = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;

  typedef struct packed {
    block_t                 data;
    block_t                 iv;
    logic [KEY_INDEX_W-1:0] key_index;
    logic                   mode;
    logic                   sop;
  } entry_t;

  entry_t          mem   [NUM_QUEUES][QDEPTH];
  logic [PW-1:0]   wp    [NUM_QUEUES];
  logic [PW-1:0]   rp    [NUM_QUEUES];
  logic [PW:0]     count [NUM_QUEUES];
  entry_t          head;
  logic            issue;

  for (genvar q = 0; q < NUM_QUEUES; q++) begin : g_full
    assign queue_full[q] = (count[q] == (PW+1)'(QDEPTH));
  end

  assign head  = mem[slot][rp[slot]];
  assign issue = (count[slot] != '0);

  assign out_data      = head.data;
  assign out_iv        = head.iv;
  assign out_key_index = head.key_index;
  assign out_mode      = head.mode;
  assign out_sop       = head.sop;
  assign out_valid     = issue;

  always_ff @(posedge clk) begin
    if (push && !queue_full[push_queue])
      mem[push_queue][wp[push_queue]] <= '{data: push_data, iv: push_iv,
                                          key_index: push_key_index,
                                          mode: push_mode, sop: push_sop};
  end

  always_ff @(posedge clk) begin
    if (!resetb) begin
      slot <= '0;
      for (int q = 0; q < NUM_QUEUES; q++) begin
        wp[q]    <= '0;
        rp[q]    <= '0;
        count[q] <= '0;
      end
    end else begin
      slot <= (slot == QW'(NUM_QUEUES - 1)) ? '0 : slot + QW'(1);
      for (int q = 0; q < NUM_QUEUES; q++) begin
        logic do_push, do_pop;
        do_push = push && (push_queue == QW'(q)) && !queue_full[q];
        do_pop  = issue && (slot == QW'(q));
        if (do_push) wp[q] <= (wp[q] == PW'(QDEPTH - 1)) ? '0 : wp[q] + PW'(1);
        if (do_pop)  rp[q] <= (rp[q] == PW'(QDEPTH - 1)) ? '0 : rp[q] + PW'(1);
        count[q] <= count[q] + (do_push ? (PW+1)'(1) : '0) - (do_pop ? (PW+1)'(1) : '0);
      end
    end
  end

  a_push_in_range: assert property (@(posedge clk) disable iff (!resetb)
      push |-> (push_queue < QW'(NUM_QUEUES)));
endmodule
