// mont_mult: radix-2, bit-serial Montgomery modular multiplier.
//
// Computes product = mpand * mplier * 2^-(N+2) mod modulus, with the result
// in [0, 2*modulus), one bit of the multiplicand per clock:
//     P = 0
//     for i = 0 .. N+2:   q = P[0];  P = (P + q*M)/2 + a_i*B
// N is the modulus width m. Operands must satisfy mpand < 2M and
// mplier < 2M, and M must be odd (as an RSA modulus always is). Because the
// multiplicand's two top bits a_(N+1), a_(N+2) are zero, the loop leaves
// P < 2M, so results can be fed straight back as operands without a final
// subtraction. Inside the loop P stays below 5M, so it is held in N+3 bits.
//
// Timing: go is sampled on a rising edge and loads the operands; the N+3
// iterations take the next N+3 edges, and rdy rises with the last one. rdy
// stays high, holding product, until the next go. rst is synchronous,
// active high. The algorithm and its iteration count follow the
// Montgomery multiplication given for this system; the go/rdy handshake is
// this design's own.
module mont_mult #(
  parameter int unsigned N = 128       // modulus width m in bits
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         go,
  input  logic [N:0]   mpand,          // A, < 2M
  input  logic [N:0]   mplier,         // B, < 2M
  input  logic [N-1:0] modulus,        // M, odd
  output logic [N:0]   product,        // A*B*2^-(N+2) mod M, < 2M
  output logic         rdy
);
  localparam int unsigned CW = $clog2(N + 4);

  logic [N+2:0]  p;                    // partial result, < 5M
  logic [N:0]    a_sr;                 // multiplicand, shifted right
  logic [N:0]    b;
  logic [N-1:0]  m;
  logic [CW-1:0] cnt;
  logic          busy;
  logic [N+3:0]  sum;
  logic [N+2:0]  p_next;

  always_comb begin
    sum    = {1'b0, p} + (p[0] ? {4'b0, m} : '0);
    p_next = sum[N+3:1] + (a_sr[0] ? {2'b0, b} : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      rdy  <= 1'b0;
      cnt  <= '0;
      p    <= '0;
    end else if (go) begin
      p    <= '0;
      a_sr <= mpand;
      b    <= mplier;
      m    <= modulus;
      cnt  <= '0;
      busy <= 1'b1;
      rdy  <= 1'b0;
    end else if (busy) begin
      p    <= p_next;
      a_sr <= a_sr >> 1;
      cnt  <= cnt + 1'b1;
      if (cnt == CW'(N + 2)) begin
        busy <= 1'b0;
        rdy  <= 1'b1;
      end
    end
  end

  assign product = p[N:0];

  // The result of a completed multiplication is below 2M.
  a_result_range: assert property (@(posedge clk) disable iff (rst)
    rdy |-> (p < {2'b0, m, 1'b0}));
endmodule
