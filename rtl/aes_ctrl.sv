// aes_ctrl: control state machine of a space-optimised (one round per clock)
// AES engine. One module serves the three engines of the co-processor; the
// ENGINE parameter selects the variant, as the document re-uses its control
// state machine for the inverse cipher and the key generator with small
// changes.
//
// Operation. In IDLE the controller waits for the input FIFO to hold a
// block, pops it (data, IV, 32-bit context) and issues a read of round key 0
// to the key memory. It then spends eleven ROUND cycles, r = 0..10: in each
// it drives the state (or, for r = 0, the input block) into the round
// datapath and registers the output that belongs to round r (round-0 XOR,
// full middle round, or final round), while it reads the key for round r+1.
// After r = 10 it enters DONE, where the result is written to the output
// FIFO; if the output FIFO is full it waits there, and if another block is
// waiting it pops it in the same cycle, so back-to-back blocks take
// 12 clocks each, the document's figure.
//
// Modes (context bits: sop, encrypt, mode[1:0], key_index):
//   ECB (01)      each block on its own.
//   CBC (10)      encryption XORs the input with the IV at start of packet,
//                 else with the previous ciphertext, before round 0;
//                 decryption XORs the final round with the IV or the
//                 previous ciphertext block after round 10.
//   other         the block is popped and dropped (document: "ignored").
// ENGINE = ENG_DECRYPT reads round keys in reverse order (10 down to 0).
// ENGINE = ENG_KEYGEN reads no key: the popped block is the cipher key, each
// round's output is the next round key, and every round key is written to
// the key memories through key_wr / key_wr_addr / key_wr_data; nothing goes
// to an output FIFO.
//
// Key memory interface: key_address = {key_index[KEY_IDX_W-1:0], round};
// read_mem is the read strobe; key_in must carry the addressed key one clock
// later (a registered RAM read). The counts of states differ from the
// document's 27-state machine, which unrolls the round counter; the
// behaviour per clock is the same.
// Reset: synchronous, active-low resetb.
module aes_ctrl
  import aes_pkg::*;
#(
  parameter engine_e     ENGINE    = ENG_ENCRYPT,
  parameter int unsigned KEY_IDX_W = 1
) (
  input  logic                   clk,
  input  logic                   resetb,
  // input FIFO
  input  logic                   fifo_emptyb,
  input  block_t                 fifo_data,
  input  block_t                 fifo_iv,
  input  logic [31:0]            fifo_context,
  output logic                   fifo_rd,
  // output FIFO
  input  logic                   fifo_fullb,
  output logic                   out_wr,
  output block_t                 out_data,
  // round datapath
  output block_t                 aes_data_in,
  output logic [3:0]             round,
  input  block_t                 aes_data_out_round0,
  input  block_t                 aes_data_out_mid,
  input  block_t                 aes_data_out_final,
  // key memory read port
  output logic [KEY_IDX_W+3:0]   key_address,
  output logic                   read_mem,
  // key memory write port (key generation only)
  output logic                   key_wr,
  output logic [KEY_IDX_W+3:0]   key_wr_addr,
  output block_t                 key_wr_data
);
  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_DONE} state_e;

  state_e     st_q;
  logic [3:0] round_q;
  block_t     state_q, data_q, iv_q, chain_q, result_q;
  context_t   ctx_q, ctx_head;
  block_t     next_state;
  logic       load, mode_ok_head, cbc_q;

  // The first-written half carries the context that is used.
  assign ctx_head     = context_t'(fifo_context[31:16]);
  assign mode_ok_head = (ctx_head.mode == MODE_ECB) || (ctx_head.mode == MODE_CBC);
  assign cbc_q        = (ctx_q.mode == MODE_CBC);

  // Pop a new block in IDLE, or in DONE once the result can be delivered.
  always_comb begin
    load = 1'b0;
    if (fifo_emptyb) begin
      if (st_q == S_IDLE) load = 1'b1;
      if (st_q == S_DONE && (fifo_fullb || ENGINE == ENG_KEYGEN)) load = 1'b1;
    end
  end
  assign fifo_rd = load;

  assign out_wr   = (ENGINE != ENG_KEYGEN) && (st_q == S_DONE) && fifo_fullb;
  assign out_data = result_q;

  // Datapath input: the (CBC-whitened) input block in round 0, else the state.
  always_comb begin
    if (st_q == S_ROUND && round_q == 4'd0) begin
      if (ENGINE == ENG_ENCRYPT && cbc_q)
        aes_data_in = data_q ^ (ctx_q.sop ? iv_q : chain_q);
      else
        aes_data_in = data_q;
    end else begin
      aes_data_in = state_q;
    end
  end
  assign round = round_q;

  always_comb begin
    if (round_q == 4'd0)          next_state = aes_data_out_round0;
    else if (round_q == 4'(NR))   next_state = aes_data_out_final;
    else                          next_state = aes_data_out_mid;
  end

  // Key read: round key for the round that runs next clock.
  function automatic logic [3:0] key_round(logic [3:0] r);
    return (ENGINE == ENG_DECRYPT) ? 4'(NR) - r : r;
  endfunction

  always_comb begin
    read_mem    = 1'b0;
    key_address = '0;
    if (ENGINE != ENG_KEYGEN) begin
      if (load && mode_ok_head) begin
        read_mem    = 1'b1;
        key_address = {ctx_head.key_index[KEY_IDX_W-1:0], key_round(4'd0)};
      end else if (st_q == S_ROUND && round_q != 4'(NR)) begin
        read_mem    = 1'b1;
        key_address = {ctx_q.key_index[KEY_IDX_W-1:0], key_round(round_q + 4'd1)};
      end
    end
  end

  assign key_wr      = (ENGINE == ENG_KEYGEN) && (st_q == S_ROUND);
  assign key_wr_addr = {ctx_q.key_index[KEY_IDX_W-1:0], round_q};
  assign key_wr_data = next_state;

  always_ff @(posedge clk) begin
    if (!resetb) begin
      st_q     <= S_IDLE;
      round_q  <= '0;
      state_q  <= '0;
      data_q   <= '0;
      iv_q     <= '0;
      chain_q  <= '0;
      result_q <= '0;
      ctx_q    <= '0;
    end else begin
      case (st_q)
        S_IDLE: ;
        S_ROUND: begin
          state_q <= next_state;
          if (round_q == 4'(NR)) begin
            st_q <= S_DONE;
            if (ENGINE == ENG_DECRYPT && cbc_q) begin
              result_q <= aes_data_out_final ^ (ctx_q.sop ? iv_q : chain_q);
              chain_q  <= data_q;
            end else begin
              result_q <= aes_data_out_final;
              if (ENGINE == ENG_ENCRYPT) chain_q <= aes_data_out_final;
            end
          end else begin
            round_q <= round_q + 4'd1;
          end
        end
        S_DONE: begin
          if (out_wr || ENGINE == ENG_KEYGEN) st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
      // A popped block with a valid mode starts round 0 next clock; one with
      // an undefined mode is dropped.
      if (load) begin
        data_q  <= fifo_data;
        iv_q    <= fifo_iv;
        ctx_q   <= ctx_head;
        round_q <= '0;
        st_q    <= mode_ok_head ? S_ROUND : S_IDLE;
      end
    end
  end

  a_one_round_per_clock: assert property (@(posedge clk) disable iff (!resetb)
      (st_q == S_ROUND && round_q != 4'(NR)) |=> (st_q == S_ROUND && round_q == $past(round_q) + 4'd1));
  a_no_pop_mid_block: assert property (@(posedge clk) disable iff (!resetb)
      fifo_rd |-> (st_q != S_ROUND));
endmodule
