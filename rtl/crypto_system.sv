// crypto_system: hybrid AES/RSA link between a sending and a receiving system.
//
// The message is protected with a symmetric AES-128 session key, and the
// session key itself with RSA, so only the holder of the RSA private key can
// recover it:
//
//   sender   (ds1): cypher_text = AES_enc(aes_key, data_in)
//                   cypher_key  = aes_key^E mod M   (aes_key is the RSA data)
//   receiver (ds2): key'          = cypher_key^D mod M
//                   original_data = AES_dec(key', cypher_text)
//
// Four engines are instantiated, two per side, as in the system overview: a
// sender AES core (encrypting) and RSA unit (public exponent), a receiver
// RSA unit (private exponent) and AES core (decrypting). On the sender side
// the AES encryption and the RSA key encryption run in parallel; done1 rises
// when both have finished. On the receiver side, ds2 starts the RSA
// decryption of cypher_key; when it finishes, the recovered key starts the
// AES decryption, and done2 rises with original_data valid. The receiver
// reads cypher_text and cypher_key from the sender's output registers (the
// link), so ds2 must follow done1.
//
// The session key is a port (aes_key), as are the RSA exponents and the
// modulus: how keys are generated is outside this design. RSA_BITS = 128
// makes the RSA operand as wide as the AES key it carries. Starts are
// one-clock pulses; done1/done2 are levels that stay high until the next
// start of their side (an assertion checks that ds2 comes with done1 high).
// rst is synchronous, active high.
//
// Timing (RSA_BITS = 128): done1 follows ds1 after the RSA latency,
// 17,551 clocks (the AES part needs 22); done2 follows ds2 after
// 17,551 + 22 clocks (the AES start is taken from the rising RSA ready in
// the same clock).
module crypto_system
  import aes_pkg::*;
#(
  parameter int unsigned RSA_BITS = 128
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ds1,
  input  logic                ds2,
  input  block_t              aes_key,
  input  block_t              data_in,
  input  logic [RSA_BITS-1:0] public_key,    // E
  input  logic [RSA_BITS-1:0] private_key,   // D
  input  logic [RSA_BITS-1:0] modulus,       // M, odd, > aes_key
  output block_t              cypher_text,
  output logic [RSA_BITS-1:0] cypher_key,
  output block_t              original_data,
  output logic                done1,
  output logic                done2
);
  // ---------------- sender (System 1 side) ----------------
  logic rdy_aes1, rdy_rsa1;

  aes_core u_aes_enc (
    .clk(clk), .rst(rst), .ds(ds1), .dec(1'b0), .key(aes_key),
    .data_in(data_in), .data_out(cypher_text), .ready(rdy_aes1)
  );

  rsa_modexp #(.N(RSA_BITS)) u_rsa_enc (
    .clk(clk), .rst(rst), .ds(ds1), .indata(RSA_BITS'(aes_key)),
    .inexp(public_key), .inmod(modulus), .cypher(cypher_key), .ready(rdy_rsa1)
  );

  assign done1 = rdy_aes1 & rdy_rsa1;

  // ---------------- receiver (System 2 side) ----------------
  logic [RSA_BITS-1:0] key_rx;
  logic                rdy_rsa2, rdy_rsa2_q, rdy_aes2;
  logic                ds_aes2;

  rsa_modexp #(.N(RSA_BITS)) u_rsa_dec (
    .clk(clk), .rst(rst), .ds(ds2), .indata(cypher_key),
    .inexp(private_key), .inmod(modulus), .cypher(key_rx), .ready(rdy_rsa2)
  );

  // Start the receiver AES on the rising edge of the RSA ready.
  always_ff @(posedge clk) begin
    if (rst || ds2) rdy_rsa2_q <= 1'b0;
    else            rdy_rsa2_q <= rdy_rsa2;
  end
  assign ds_aes2 = rdy_rsa2 & ~rdy_rsa2_q;

  aes_core u_aes_dec (
    .clk(clk), .rst(rst), .ds(ds_aes2), .dec(1'b1), .key(block_t'(key_rx)),
    .data_in(cypher_text), .data_out(original_data), .ready(rdy_aes2)
  );

  // done2 only after this start's AES pass, not a stale one.
  logic rx_busy;
  always_ff @(posedge clk) begin
    if (rst)          rx_busy <= 1'b0;
    else if (ds2)     rx_busy <= 1'b1;
    else if (ds_aes2) rx_busy <= 1'b0;
  end
  assign done2 = rdy_aes2 & ~rx_busy & rdy_rsa2;

  // The RSA unit must be wide enough to carry the whole session key.
  if (RSA_BITS < 128) begin : g_width_check
    $error("crypto_system: RSA_BITS must be at least 128");
  end

  // The receiver reads the sender's outputs, so it may only start once the
  // sender has finished.
  a_ds2_after_done1: assert property (@(posedge clk) disable iff (rst) ds2 |-> done1);
endmodule
