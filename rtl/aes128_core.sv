// aes128_core: iterative AES-128 encryption and decryption built on the
// composite S-box. One round is computed per clock by aes_round (16
// composite S-boxes shared by SubBytes and InvSubBytes); the key schedule
// runs once per key and fills a store of the 11 round keys, so decryption
// can walk the keys backwards.
//
// Operation
//   key_load (when not busy): round key 0 = key_in is stored, then one
//     aes_key_expand step per cycle writes round keys 1..10. key_ready rises
//     10 cycles after the edge that took key_load and stays high until the
//     next key_load.
//   start (when not busy and key_ready): data_in is XORed with round key 0
//     (encrypt) or round key 10 (decrypt) and the ten rounds follow, one
//     per cycle, the last without (Inv)MixColumns. data_out is written and
//     done pulses for one cycle 10 cycles after the edge that took start.
//     decrypt is sampled with start. A new start is accepted in the cycle
//     done is high, so back-to-back blocks take 11 cycles each.
//   start or key_load while busy is ignored.
// The decryption flow is the equivalent inverse cipher: the round keys of
// rounds 1..9 pass through InvMixColumns inside aes_round.
// Reset (rst_n low, asynchronous) clears the control state, key_ready and
// data_out; the key store and the state register are not reset.
module aes128_core
  import aes_pkg::*;
#(
  parameter bit SQ_LAMBDA_COMBINED = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key_in,
  output logic   key_ready,
  input  logic   start,
  input  logic   decrypt,
  input  block_t data_in,
  output logic   busy,
  output logic   done,
  output block_t data_out
);
  typedef enum logic [1:0] {S_IDLE, S_KEYEXP, S_RUN} state_e;

  state_e      st;
  logic [3:0]  cnt;          // key-expansion step or round number, 1..10
  logic [7:0]  rcon_q;
  logic        dec_q;
  block_t      state_q;
  block_t      rk [NR+1];

  block_t      next_key, round_key, round_out;
  logic        final_round;

  aes_key_expand u_kexp (.key_in(rk[cnt - 4'd1]), .rcon(rcon_q), .key_out(next_key));

  always_comb begin
    round_key   = dec_q ? rk[4'(NR) - cnt] : rk[cnt];
    final_round = (cnt == 4'(NR));
  end

  aes_round #(.SQ_LAMBDA_COMBINED(SQ_LAMBDA_COMBINED)) u_round (
    .state_in   (state_q),
    .round_key  (round_key),
    .decrypt    (dec_q),
    .final_round(final_round),
    .state_out  (round_out)
  );

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      cnt       <= 4'd1;
      rcon_q    <= 8'h01;
      dec_q     <= 1'b0;
      key_ready <= 1'b0;
      done      <= 1'b0;
      data_out  <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (key_load) begin
            rk[0]     <= key_in;
            cnt       <= 4'd1;
            rcon_q    <= 8'h01;
            key_ready <= 1'b0;
            st        <= S_KEYEXP;
          end else if (start && key_ready) begin
            state_q <= data_in ^ (decrypt ? rk[NR] : rk[0]);
            dec_q   <= decrypt;
            cnt     <= 4'd1;
            st      <= S_RUN;
          end
        end
        S_KEYEXP: begin
          rk[cnt] <= next_key;
          rcon_q  <= xtime(rcon_q);
          if (cnt == 4'(NR)) begin
            key_ready <= 1'b1;
            cnt       <= 4'd1;
            st        <= S_IDLE;
          end else begin
            cnt <= cnt + 4'd1;
          end
        end
        S_RUN: begin
          if (final_round) begin
            data_out <= round_out;
            done     <= 1'b1;
            cnt      <= 4'd1;
            st       <= S_IDLE;
          end else begin
            state_q <= round_out;
            cnt     <= cnt + 4'd1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // done is a single-cycle pulse, and a block never runs without keys.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_run_keyed:  assert property (@(posedge clk) disable iff (!rst_n) (st == S_RUN) |-> key_ready);
endmodule
