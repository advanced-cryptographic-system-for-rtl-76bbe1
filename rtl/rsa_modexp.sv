// rsa_modexp: RSA modular exponentiation cypher = indata^inexp mod inmod.
//
// The exponent is scanned from its least significant bit (right-to-left
// binary method) on Montgomery products, with two mont_mult units working
// side by side: a multiplier that forms root*square and a squarer that forms
// square*square. R = 2^(N+2) is the Montgomery radix of mont_mult.
//     R2     = R^2 mod M                     (computed here, see below)
//     root   = MonMult(1, R2),  square = MonMult(X, R2)        (in parallel)
//     for i = 0 .. N-1:
//         temp = MonMult(root, square),  square = MonMult(square, square)
//         if e_i = 1: root = temp
//     cypher = MonMult(root, 1), reduced once more below M
// All N exponent bits are processed whatever their value, so the run time
// does not depend on the exponent. The same unit encrypts (inexp = E),
// decrypts or signs (inexp = D).
//
// R^2 mod M is an input of the algorithm as given; here it is produced on
// chip from inmod by 2*(N+2) shift-and-subtract steps (r = 2r, minus M if
// r >= M), so that only X, E and M have to be supplied. The final
// comparison against M, which brings the last product from [0, 2M) into
// [0, M), is also this design's addition.
//
// Interface: ds is a one-clock start pulse that latches indata (< inmod),
// inexp and inmod (odd, top bit set not required). ready rises with a valid
// cypher and stays high until the next ds. rst is synchronous, active high.
// Latency from ds to ready: the ds clock, 2N+4 clocks for R2, then N+2
// Montgomery products of N+5 clocks each (start, N+3 iterations, one clock
// to take the result): in total 2N + 5 + (N+2)(N+5) clocks
// (17,551 for N = 128).
module rsa_modexp #(
  parameter int unsigned N = 128       // modulus / key width in bits
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ds,
  input  logic [N-1:0] indata,         // X, message (< M)
  input  logic [N-1:0] inexp,          // exponent E or D
  input  logic [N-1:0] inmod,          // modulus M, odd
  output logic [N-1:0] cypher,         // X^E mod M
  output logic         ready
);
  typedef enum logic [2:0] {
    S_IDLE, S_R2, S_PRE_GO, S_LOOP_GO, S_POST_GO, S_WAIT
  } state_e;

  localparam int unsigned CW = $clog2(2*N + 5);

  state_e        st, after_wait;
  logic [N-1:0]  modreg;               // M
  logic [N-1:0]  expreg;               // exponent, shifted right
  logic [N-1:0]  xreg;                 // X
  logic [N:0]    r2;                   // R^2 mod M while computing, then fixed
  logic [N:0]    root;                 // running result P_i (Montgomery form)
  logic [N:0]    square;               // Z_i = X^(2^i) (Montgomery form)
  logic [CW-1:0] count;

  logic          multgo;
  logic [N:0]    mult_a, mult_b, sqr_a, sqr_b;
  logic [N:0]    tempout, sqrout;
  logic          multrdy, sqrrdy, bothrdy;
  logic [N+1:0]  r2_dbl;
  logic [N-1:0]  final_sub;

  mont_mult #(.N(N)) u_mult (
    .clk(clk), .rst(rst), .go(multgo), .mpand(mult_a), .mplier(mult_b),
    .modulus(modreg), .product(tempout), .rdy(multrdy)
  );
  mont_mult #(.N(N)) u_sqr (
    .clk(clk), .rst(rst), .go(multgo), .mpand(sqr_a), .mplier(sqr_b),
    .modulus(modreg), .product(sqrout), .rdy(sqrrdy)
  );

  assign bothrdy = multrdy & sqrrdy;

  // Operand selection for the two multipliers.
  always_comb begin
    mult_a = root;
    mult_b = square;
    sqr_a  = square;
    sqr_b  = square;
    multgo = 1'b0;
    unique case (st)
      S_PRE_GO: begin
        mult_a = (N+1)'(1);
        mult_b = r2;
        sqr_a  = {1'b0, xreg};
        sqr_b  = r2;
        multgo = 1'b1;
      end
      S_LOOP_GO: multgo = 1'b1;
      S_POST_GO: begin
        mult_a = root;
        mult_b = (N+1)'(1);
        multgo = 1'b1;
      end
      default: ;
    endcase
  end

  // One step of R^2 mod M: double, subtract M once if needed.
  always_comb begin
    r2_dbl    = {r2, 1'b0};
    if (r2_dbl >= {2'b0, modreg}) r2_dbl = r2_dbl - {2'b0, modreg};
    final_sub = (tempout >= {1'b0, modreg}) ? N'(tempout - {1'b0, modreg}) : tempout[N-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= S_IDLE;
      ready  <= 1'b0;
      count  <= '0;
      cypher <= '0;
    end else if (ds) begin
      st     <= S_R2;
      ready  <= 1'b0;
      modreg <= inmod;
      expreg <= inexp;
      xreg   <= indata;
      r2     <= (N+1)'(1);
      count  <= '0;
    end else begin
      unique case (st)
        S_IDLE: ;
        S_R2: begin
          r2    <= r2_dbl[N:0];
          count <= count + 1'b1;
          if (count == CW'(2*N + 3)) begin
            st    <= S_PRE_GO;
            count <= '0;
          end
        end
        S_PRE_GO: begin
          st         <= S_WAIT;
          after_wait <= S_PRE_GO;
        end
        S_LOOP_GO: begin
          st         <= S_WAIT;
          after_wait <= S_LOOP_GO;
        end
        S_POST_GO: begin
          st         <= S_WAIT;
          after_wait <= S_POST_GO;
        end
        S_WAIT: if (bothrdy) begin
          unique case (after_wait)
            S_PRE_GO: begin
              root   <= tempout;
              square <= sqrout;
              st     <= S_LOOP_GO;
            end
            S_LOOP_GO: begin
              if (expreg[0]) root <= tempout;
              square <= sqrout;
              expreg <= expreg >> 1;
              count  <= count + 1'b1;
              st     <= (count == CW'(N - 1)) ? S_POST_GO : S_LOOP_GO;
            end
            default: begin
              cypher <= final_sub;
              ready  <= 1'b1;
              st     <= S_IDLE;
            end
          endcase
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
