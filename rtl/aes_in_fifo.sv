// aes_in_fifo: input FIFO of a space-optimised engine.
//
// Three circular buffers of DEPTH locations (data 64 bits, IV 64 bits,
// context 16 bits) share one write pointer and one read pointer so the three
// stay aligned. The host writes one 64-bit half per write; the engine's
// controller reads two consecutive locations at once, giving a 128-bit data
// block, a 128-bit IV and a 32-bit context (first-written half in the upper
// bits). A contents counter drives the flags:
//   fullb  = 1 while at least two locations are free (room for a block)
//   emptyb = 1 while at least two locations are filled (a block is ready)
// Both flags follow the document's active-low naming ('0' means full/empty).
//
// Timing: wrb is active low and sampled on the rising edge of clk; the head
// block is visible on rd_* whenever emptyb is 1 (first-word fall-through) and
// rd pops it on the rising edge. resetb is a synchronous active-low reset.
// The depth of 8 and the shared pointers are the document's; the exact flag
// thresholds are this design's reading of its "within 2 locations" rule.
module aes_in_fifo #(
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         resetb,
  // host side
  input  logic [63:0]  data_input,
  input  logic [63:0]  iv_in,
  input  logic [15:0]  context_in,
  input  logic         wrb,
  output logic         fullb,
  // controller side
  input  logic         rd,
  output logic [127:0] rd_data,
  output logic [127:0] rd_iv,
  output logic [31:0]  rd_context,
  output logic         emptyb
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [63:0] data_mem [DEPTH];
  logic [63:0] iv_mem   [DEPTH];
  logic [15:0] ctx_mem  [DEPTH];
  logic [AW-1:0] wp, rp, rp1;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign do_wr  = !wrb;
  assign do_rd  = rd;
  assign rp1    = rp + AW'(1);
  assign fullb  = (count <= (AW+1)'(DEPTH - 2));
  assign emptyb = (count >= (AW+1)'(2));

  assign rd_data    = {data_mem[rp], data_mem[rp1]};
  assign rd_iv      = {iv_mem[rp],   iv_mem[rp1]};
  assign rd_context = {ctx_mem[rp],  ctx_mem[rp1]};

  always_ff @(posedge clk) begin
    if (do_wr) begin
      data_mem[wp] <= data_input;
      iv_mem[wp]   <= iv_in;
      ctx_mem[wp]  <= context_in;
    end
  end

  always_ff @(posedge clk) begin
    if (!resetb) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + AW'(1);
      if (do_rd) rp <= rp + AW'(2);
      count <= count + (do_wr ? (AW+1)'(1) : '0) - (do_rd ? (AW+1)'(2) : '0);
    end
  end

  // Handshake rules: never write into a full buffer, never pop an
  // incomplete block.
  a_no_overrun:  assert property (@(posedge clk) disable iff (!resetb)
                                  do_wr |-> (count < (AW+1)'(DEPTH)));
  a_no_underrun: assert property (@(posedge clk) disable iff (!resetb)
                                  do_rd |-> emptyb);
endmodule
