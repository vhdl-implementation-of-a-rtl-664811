// aes_out_fifo: output FIFO of a space-optimised engine.
//
// One circular buffer of DEPTH 64-bit locations. The controller writes a
// whole 128-bit result at once, filling two locations (bits 127:64 first);
// the host reads one 64-bit location per read, so two reads return a block.
//   fullb  = 1 while at least two locations are free (controller may write)
//   emptyb = 1 while at least two locations hold data (a block is waiting)
// Both flags use the document's active-low naming.
//
// Timing: wr is sampled on the rising edge of clk. The oldest word is always
// visible on data_output; the host pulls rdb low for one clock per word to
// pop it. resetb is a synchronous active-low reset. Depth 8 and the 2:1 width
// conversion follow the document; the flag thresholds are this design's.
module aes_out_fifo #(
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         resetb,
  // controller side
  input  logic         wr,
  input  logic [127:0] wr_data,
  output logic         fullb,
  // host side
  input  logic         rdb,
  output logic [63:0]  data_output,
  output logic         emptyb
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [63:0]   mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic          do_rd;

  assign do_rd       = !rdb;
  assign fullb       = (count <= (AW+1)'(DEPTH - 2));
  assign emptyb      = (count >= (AW+1)'(2));
  assign data_output = mem[rp];

  always_ff @(posedge clk) begin
    if (wr) begin
      mem[wp]          <= wr_data[127:64];
      mem[wp + AW'(1)] <= wr_data[63:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!resetb) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr)    wp <= wp + AW'(2);
      if (do_rd) rp <= rp + AW'(1);
      count <= count + (wr ? (AW+1)'(2) : '0) - (do_rd ? (AW+1)'(1) : '0);
    end
  end

  a_no_overrun:  assert property (@(posedge clk) disable iff (!resetb)
                                  wr |-> fullb);
  a_no_underrun: assert property (@(posedge clk) disable iff (!resetb)
                                  do_rd |-> (count != '0));
endmodule
