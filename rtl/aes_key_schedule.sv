// aes_key_schedule: AES-128 key expansion ("Expand key") with round-key store.
//
// On a start pulse the 128-bit cipher key is taken as round key 0
// (w[0..3]) and the next round key is derived from the previous one once per
// clock: w[4i] = w[4i-4] ^ SubWord(RotWord(w[4i-1])) ^ Rcon[i], and
// w[4i+j] = w[4i+j-4] ^ w[4i+j-1] for j = 1..3. All 11 round keys are kept
// in an 11 x 128-bit register array that the cipher datapath reads by index.
//
// For decryption (dec = 1 at start) round keys 1..9 are stored after an
// InvMixColumns step. That is the change to the key generation needed by the
// rearranged inverse cipher, whose rounds add the key after InvMixColumns.
// Round keys 0 and 10 are stored unchanged in both modes.
//
// Timing: start is sampled on a rising edge; round key i is written on the
// i-th following edge, and ready rises together with the write of round key
// 10, i.e. 10 clocks after start. ready stays high until the next start.
// Reset (rst, synchronous, active high) clears ready and the counter; the
// key store is not reset and must be filled by a start before it is read.
module aes_key_schedule
  import aes_pkg::*;
#(
  parameter int unsigned ROUNDS = aes_pkg::NR
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic                      dec,
  input  block_t                    key,
  output logic                      ready,
  input  logic [3:0]                rd_idx,
  output block_t                    rd_key
);
  block_t     rk_mem [ROUNDS+1];
  block_t     kreg;        // previous round key, always in plain form
  block_t     knext;
  logic [3:0] idx;         // index of the next round key to produce
  logic       busy;
  logic       dec_q;

  // Next round key from the previous one.
  always_comb begin
    word_t w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = kreg;
    t  = {sbox(w3[23:16]), sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    t[31:24] ^= rcon(idx);
    w0 ^= t;
    w1 ^= w0;
    w2 ^= w1;
    w3 ^= w2;
    knext = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      idx   <= '0;
      dec_q <= 1'b0;
    end else if (start) begin
      rk_mem[0] <= key;
      kreg      <= key;
      idx       <= 4'd1;
      dec_q     <= dec;
      busy      <= 1'b1;
      ready     <= 1'b0;
    end else if (busy) begin
      kreg        <= knext;
      rk_mem[idx] <= (dec_q && idx != 4'(ROUNDS)) ? inv_mix_block(knext) : knext;
      idx         <= idx + 4'd1;
      if (idx == 4'(ROUNDS)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  assign rd_key = rk_mem[rd_idx];
endmodule
