// aes_enc_iter: round-iterative AES-128 encryption core, one round per clock.
//
// This is the sequencing of the document's timing chart of overlapped key
// generation: after reset the core waits for ld, then steps through r0 (the
// initial AddRoundKey) and rounds r1 .. r10, and may go from r10 straight into
// r0 of the next block. A single aes_enc_round is reused for all ten rounds.
// Its key path expands the round key for round n+1 while the state path
// computes round n, and both results are written back on the same edge, so the
// next round key is in its register at the start of every round.
//
//   ST_RESET : entered and held while rst_n is low; the first edge after
//              reset moves to ST_WAIT
//   ST_WAIT  : ready_o = 1; ld_i loads plaintext and key, go to ST_RUN, r0
//   ST_RUN   : r0: state ^= key, key <= round key 1
//              r1..r10: state, key <= round(state, key), next key
//              at r10 the ciphertext register is written and done_o pulses;
//              with ld_i set the next block is loaded and r0 follows,
//              otherwise back to ST_WAIT
//
// Interface: ld_i is sampled only while ready_o is high (ST_WAIT or r10).
// ciphertext_o holds its value until the next block completes.
//
// Timing: done_o and ciphertext_o are set by the edge that ends r10, 11 edges
// after the edge that sampled ld_i (12 cycles after the cycle in which ld_i was
// high and accepted); back to back, one block every 11 cycles.
// Synchronous active-low reset of the control state; the data registers are
// not reset. Which register shows which round during reset and waiting is not
// fixed by the document; here the key register is simply loaded with ld.
module aes_enc_iter
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ld_i,
  input  block_t plaintext_i,
  input  block_t key_i,
  output logic   ready_o,
  output logic   done_o,
  output block_t ciphertext_o
);

  typedef enum logic [1:0] {ST_RESET, ST_WAIT, ST_RUN} phase_t;

  phase_t     phase;
  logic [3:0] rnd;          // current round r0..r10 while in ST_RUN
  block_t     state_q, key_q;
  block_t     rnd_state, rnd_key;
  logic       load;

  aes_enc_round u_round (
    .state_i   (state_q),
    .key_i     (key_q),
    .rcon_i    (RCON_TABLE[rnd + 4'd1]),
    .last_i    (rnd == 4'(NR)),
    .state_o   (rnd_state),
    .key_next_o(rnd_key)
  );

  assign ready_o = (phase == ST_WAIT) || (phase == ST_RUN && rnd == 4'(NR));
  assign load    = ready_o && ld_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase  <= ST_RESET;
      rnd    <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (phase)
        ST_RESET: phase <= ST_WAIT;
        ST_WAIT: if (load) begin
          phase <= ST_RUN;
          rnd   <= '0;
        end
        ST_RUN: begin
          if (rnd == 4'(NR)) begin
            done_o <= 1'b1;
            rnd    <= '0;
            if (!load) phase <= ST_WAIT;
          end else begin
            rnd <= rnd + 4'd1;
          end
        end
        default: phase <= ST_WAIT;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      state_q <= plaintext_i;
      key_q   <= key_i;
    end else if (phase == ST_RUN && rnd == 4'd0) begin
      state_q <= state_q ^ key_q;
      key_q   <= rnd_key;           // round key 1 from the round block's key path
    end else if (phase == ST_RUN) begin
      state_q <= rnd_state;
      key_q   <= rnd_key;
    end
    if (phase == ST_RUN && rnd == 4'(NR)) ciphertext_o <= rnd_state;
  end

  // Handshake rules: a block completes only out of round 10, the round counter
  // never passes round 10, and a load is taken only while ready.
  a_done_after_r10: assert property (@(posedge clk) disable iff (!rst_n)
    done_o |-> $past(phase == ST_RUN && rnd == 4'(NR)));
  a_rnd_range: assert property (@(posedge clk) disable iff (!rst_n) rnd <= 4'(NR));
  a_load_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == ST_RUN && rnd == 4'd0) |-> $past(load));

endmodule
