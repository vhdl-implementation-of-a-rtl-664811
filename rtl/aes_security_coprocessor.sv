// aes_security_coprocessor: AES-128 security co-processor, top level.
//
// Two independent engines stand side by side.
//
// 1. The space-optimised co-processor. An encryption engine, a decryption
//    engine and a key-generation engine share the host data bus
//    (data_input, iv_in, context_in in; data_output out) while each keeps its
//    own write strobe and flags (wrb_*/fullb_*, and rdb_*/emptyb_* for the two
//    engines that return data), so the host can watch and select them
//    separately. The key generator expands a cipher key into eleven round
//    keys and writes them into two dual-port round-key memories, one per
//    cipher engine; a key set not in use can be rewritten while the engines
//    work with another. data_output carries the decryption engine's output
//    FIFO head while rdb_dec is low and the encryption engine's otherwise.
//    Each engine works one round per clock: 12 clocks per 128-bit block.
//
// 2. The multi-session pipelined cipher with its round-robin queue
//    scheduler. The host pushes 128-bit blocks into one of eleven queues
//    (ms_push*); the scheduler issues one queue per clock into an
//    eleven-stage pipeline that encrypts one block per clock in ECB or CBC,
//    CBC working because a session's blocks enter eleven clocks apart and
//    meet their predecessor's ciphertext on the feedback path. Round keys of
//    each session are written through ms_key_*; ciphertexts leave on
//    ms_data_output when ms_data_valid_out is 1.
//
// All strobes named *b are active low. resetb is a synchronous active-low
// reset. Clock: single rising-edge clock clk.
module aes_security_coprocessor
  import aes_pkg::*;
#(
  parameter int unsigned IN_DEPTH       = 8,
  parameter int unsigned OUT_DEPTH      = 8,
  parameter int unsigned KEY_IDX_W      = 1,
  parameter int unsigned MS_KEY_INDEX_W = 4,
  parameter int unsigned MS_QDEPTH      = 4
) (
  input  logic                        clk,
  input  logic                        resetb,
  // space-optimised co-processor: shared host bus
  input  logic [63:0]                 data_input,
  input  logic [63:0]                 iv_in,
  input  logic [15:0]                 context_in,
  output logic [63:0]                 data_output,
  // per-engine strobes and flags
  input  logic                        wrb_enc,
  output logic                        fullb_enc,
  input  logic                        rdb_enc,
  output logic                        emptyb_enc,
  input  logic                        wrb_dec,
  output logic                        fullb_dec,
  input  logic                        rdb_dec,
  output logic                        emptyb_dec,
  input  logic                        wrb_kgen,
  output logic                        fullb_kgen,
  // multi-session pipelined cipher
  input  logic                        ms_push,
  input  logic [3:0]                  ms_push_queue,
  input  block_t                      ms_push_data,
  input  block_t                      ms_push_iv,
  input  logic [MS_KEY_INDEX_W-1:0]   ms_push_key_index,
  input  logic                        ms_push_mode,
  input  logic                        ms_push_sop,
  output logic [NR:0]                 ms_queue_full,
  input  logic                        ms_key_wr,
  input  logic [3:0]                  ms_key_wr_round,
  input  logic [MS_KEY_INDEX_W-1:0]   ms_key_wr_index,
  input  block_t                      ms_key_wr_data,
  output block_t                      ms_data_output,
  output logic                        ms_data_valid_out
);
  // ---------------- space-optimised co-processor ----------------
  logic [63:0]          enc_out, dec_out;
  block_t               enc_key, dec_key, kg_data;
  logic [KEY_IDX_W+3:0] enc_kaddr, dec_kaddr, kg_addr;
  logic                 enc_krd, dec_krd, kg_wr;

  aes_keygen_module #(.IN_DEPTH(IN_DEPTH), .KEY_IDX_W(KEY_IDX_W)) u_keygen (
    .clk, .resetb, .data_input, .iv_in, .context_in, .wrb(wrb_kgen), .fullb(fullb_kgen),
    .key_wr(kg_wr), .key_wr_addr(kg_addr), .key_wr_data(kg_data)
  );

  aes_key_ram #(.KEY_IDX_W(KEY_IDX_W)) u_enc_keys (
    .clk, .wr(kg_wr), .waddr(kg_addr), .wdata(kg_data),
    .rd(enc_krd), .raddr(enc_kaddr), .rdata(enc_key)
  );

  aes_key_ram #(.KEY_IDX_W(KEY_IDX_W)) u_dec_keys (
    .clk, .wr(kg_wr), .waddr(kg_addr), .wdata(kg_data),
    .rd(dec_krd), .raddr(dec_kaddr), .rdata(dec_key)
  );

  aes_cipher_module #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH), .KEY_IDX_W(KEY_IDX_W)) u_enc (
    .clk, .resetb, .data_input, .iv_in, .context_in, .wrb(wrb_enc), .fullb(fullb_enc),
    .data_output(enc_out), .rdb(rdb_enc), .emptyb(emptyb_enc),
    .key_in(enc_key), .key_address(enc_kaddr), .read_mem(enc_krd)
  );

  aes_inv_cipher_module #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH), .KEY_IDX_W(KEY_IDX_W)) u_dec (
    .clk, .resetb, .data_input, .iv_in, .context_in, .wrb(wrb_dec), .fullb(fullb_dec),
    .data_output(dec_out), .rdb(rdb_dec), .emptyb(emptyb_dec),
    .key_in(dec_key), .key_address(dec_kaddr), .read_mem(dec_krd)
  );

  assign data_output = !rdb_dec ? dec_out : enc_out;

  // ---------------- multi-session pipelined cipher ----------------
  block_t                    s_data, s_iv;
  logic [MS_KEY_INDEX_W-1:0] s_kidx;
  logic                      s_mode, s_sop, s_valid;
  logic [3:0]                s_slot;

  aes_ms_scheduler #(.NUM_QUEUES(NR + 1), .QDEPTH(MS_QDEPTH), .KEY_INDEX_W(MS_KEY_INDEX_W)) u_sched (
    .clk, .resetb, .push(ms_push), .push_queue(ms_push_queue), .push_data(ms_push_data),
    .push_iv(ms_push_iv), .push_key_index(ms_push_key_index), .push_mode(ms_push_mode),
    .push_sop(ms_push_sop), .queue_full(ms_queue_full),
    .out_data(s_data), .out_iv(s_iv), .out_key_index(s_kidx), .out_mode(s_mode),
    .out_sop(s_sop), .out_valid(s_valid), .slot(s_slot)
  );

  aes_ms_cipher #(.KEY_INDEX_W(MS_KEY_INDEX_W)) u_ms (
    .clk, .resetb, .data_input(s_data), .iv_in(s_iv), .key_index(s_kidx), .mode_in(s_mode),
    .sop_in(s_sop), .data_valid_in(s_valid), .data_output(ms_data_output),
    .data_valid_out(ms_data_valid_out), .key_wr(ms_key_wr), .key_wr_round(ms_key_wr_round),
    .key_wr_index(ms_key_wr_index), .key_wr_data(ms_key_wr_data)
  );
endmodule
