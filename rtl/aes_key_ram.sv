// aes_key_ram: dual-port round-key memory of a space-optimised engine.
//
// Holds the eleven round keys of 2**KEY_IDX_W key sets; the address is
// {key index, round number}, the concatenation the engines drive on
// key_address. One port is written by the key-generation engine while the
// other is read by a cipher engine, so keys that are not in use can be
// replaced while the engine works with another set (document, co-processor
// chapter). With KEY_IDX_W = 1 the address is 5 bits wide, as on the
// document's key interface.
//
// Timing: write on the rising edge when wr is 1. Read is registered: the key
// at raddr appears on rdata the clock after rd is 1, and rdata holds its
// value while rd is 0. A read and a write of the same address in one clock
// return the old key. No reset: the contents are undefined until written.
module aes_key_ram
  import aes_pkg::*;
#(
  parameter int unsigned KEY_IDX_W = 1
) (
  input  logic                 clk,
  input  logic                 wr,
  input  logic [KEY_IDX_W+3:0] waddr,
  input  block_t               wdata,
  input  logic                 rd,
  input  logic [KEY_IDX_W+3:0] raddr,
  output block_t               rdata
);
  block_t mem [2**(KEY_IDX_W+4)];

  always_ff @(posedge clk) begin
    if (wr) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd) rdata <= mem[raddr];
  end
endmodule
