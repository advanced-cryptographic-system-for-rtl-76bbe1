// aes_core: iterative AES-128 encryption / decryption engine.
//
// One 128-bit block is processed at a time with one round per clock. A ds
// (data start) pulse latches the key, the block and the direction (dec) and
// first runs the key schedule (10 clocks), then the initial AddRoundKey and
// the 10 rounds. Rounds 1..9 use SubBytes, ShiftRows, MixColumns and
// AddRoundKey; round 10 leaves out MixColumns. Decryption uses the
// rearranged inverse cipher, with the same step order built from the inverse
// transformations and keys taken in reverse order (round key 10 first); its
// middle keys come from the key schedule already passed through
// InvMixColumns. A single aes_round instance serves both directions.
//
// Interface: ds is a one-clock start pulse, accepted in any state (it
// restarts the engine). ready goes high with a valid data_out 22 clocks
// after ds (10 key-expansion clocks, 1 initial AddRoundKey, 10 rounds, 1 to
// leave the key wait) and stays high until the next ds. rst is synchronous
// and active high. The block size, the key size and Nr = 10 follow AES-128;
// the ds/ready handshake and the expand-then-encrypt schedule are choices of
// this design.
module aes_core
  import aes_pkg::*;
#(
  parameter int unsigned ROUNDS = aes_pkg::NR
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   ds,        // start pulse
  input  logic   dec,       // 0: encrypt, 1: decrypt
  input  block_t key,
  input  block_t data_in,
  output block_t data_out,
  output logic   ready
);
  typedef enum logic [1:0] {S_IDLE, S_KEY, S_ROUND} state_e;

  state_e     st;
  block_t     state_q, round_out;
  logic [3:0] round;       // 1..ROUNDS while in S_ROUND
  logic       dec_q;
  logic       ks_ready;
  logic [3:0] rk_idx;
  block_t     rk;

  aes_key_schedule #(.ROUNDS(ROUNDS)) u_ks (
    .clk(clk), .rst(rst), .start(ds), .dec(dec), .key(key),
    .ready(ks_ready), .rd_idx(rk_idx), .rd_key(rk)
  );

  // Round-key index: forward for encryption, reversed for decryption.
  always_comb begin
    if (st == S_KEY) rk_idx = dec_q ? 4'(ROUNDS) : 4'd0;
    else             rk_idx = dec_q ? 4'(ROUNDS) - round : round;
  end

  aes_round u_round (
    .inv(dec_q), .last(round == 4'(ROUNDS)),
    .state_i(state_q), .round_key(rk), .state_o(round_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= S_IDLE;
      ready <= 1'b0;
      round <= '0;
      dec_q <= 1'b0;
    end else if (ds) begin
      st      <= S_KEY;
      ready   <= 1'b0;
      state_q <= data_in;
      dec_q   <= dec;
      round   <= '0;
    end else begin
      unique case (st)
        S_IDLE: ;
        S_KEY: if (ks_ready) begin
          state_q <= state_q ^ rk;        // initial AddRoundKey
          round   <= 4'd1;
          st      <= S_ROUND;
        end
        S_ROUND: begin
          state_q <= round_out;
          if (round == 4'(ROUNDS)) begin
            st    <= S_IDLE;
            ready <= 1'b1;
          end else begin
            round <= round + 4'd1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign data_out = state_q;
endmodule
