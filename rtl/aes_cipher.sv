// aes_cipher -- iterative AES-128 encryption of one 128-bit block.
//
// One round circuit (sub_shift, mix_columns, an AddRoundKey XOR and the
// on-the-fly key_expander) is reused for all ten rounds. Following the
// document, every round operator takes one clock cycle except SubBytes and
// ShiftRows, which share one, so a full round takes 3 cycles, and one block
// takes 33 cycles in all:
//
//   cycle 1       LOAD   block and key captured (start sampled)
//   cycle 2       ARK0   state ^= key, round key 1 computed
//   cycles 3..32  rounds 1..10, each SBSR -> MC -> ARK
//   cycle 33      OUT    result register loaded, done raised
//
// In round 10 the MixColumns cycle still elapses but leaves the state
// unchanged (the standard's last round has no MixColumns); keeping the
// round at a uniform 3 cycles is this design's reading of the document's
// "the full round operation takes 3 clock cycles" and 33-cycle total.
//
// Interface: start is accepted while ready is high (only when idle); key
// and blk_in are sampled on that edge. done is a one-cycle pulse in the
// cycle after the 33rd edge counted from the one that sampled start, and
// blk_out holds the ciphertext until the next result replaces it.
module aes_cipher
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key,
  input  block_t blk_in,
  output logic   ready,
  output logic   done,
  output block_t blk_out
);

  typedef enum logic [2:0] {
    S_IDLE, S_ARK0, S_SBSR, S_MC, S_ARK, S_OUT
  } phase_t;

  phase_t     phase;
  logic [3:0] round;
  block_t     st;
  block_t     rk;
  block_t     st_sbsr;
  block_t     st_mc;
  block_t     rk_next;

  sub_shift u_sub_shift (
    .state_in  (st),
    .state_out (st_sbsr)
  );

  mix_columns u_mix_columns (
    .state_in  (st),
    .state_out (st_mc)
  );

  key_expander u_key_expander (
    .key_in  (rk),
    .rcon_in (rcon(round + 4'd1)),
    .key_out (rk_next)
  );

  assign ready = (phase == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= S_IDLE;
      round   <= '0;
      st      <= '0;
      rk      <= '0;
      done    <= 1'b0;
      blk_out <= '0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        S_IDLE: if (start) begin
          st    <= blk_in;
          rk    <= key;
          round <= '0;
          phase <= S_ARK0;
        end
        S_ARK0: begin
          st    <= st ^ rk;
          rk    <= rk_next;
          round <= 4'd1;
          phase <= S_SBSR;
        end
        S_SBSR: begin
          st    <= st_sbsr;
          phase <= S_MC;
        end
        S_MC: begin
          if (round != 4'(NUM_ROUNDS)) st <= st_mc;
          phase <= S_ARK;
        end
        S_ARK: begin
          st <= st ^ rk;
          rk <= rk_next;
          if (round == 4'(NUM_ROUNDS)) begin
            phase <= S_OUT;
          end else begin
            round <= round + 4'd1;
            phase <= S_SBSR;
          end
        end
        S_OUT: begin
          blk_out <= st;
          done    <= 1'b1;
          phase   <= S_IDLE;
        end
        default: phase <= S_IDLE;
      endcase
    end
  end

endmodule
