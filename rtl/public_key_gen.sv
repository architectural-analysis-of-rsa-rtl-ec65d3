// public_key_gen: modulus, totient and public exponent from p and q.
//
// Follows the data flow graph of public key generation: two subtractors form
// p-1 and q-1, one multiplier forms n = p*q and a second phi(n) = (p-1)(q-1).
// Then a public exponent e with gcd(phi(n), e) = 1 and 1 < e < phi(n) is
// sought with Euclid's algorithm: A = phi(n), B = e, and each clock cycle
// replaces (A, B) by (B, A mod B). When A mod B is 0, B is the gcd; if it is
// 1 the candidate e is accepted, otherwise the next candidate is tried.
// Candidates are 3, 5, 7, ... (phi(n) is even for odd primes, so even e can
// never qualify); the first one that qualifies is taken.
//
// Interface: start (pulse), p, q -> n, phi, e, busy, done (one-cycle pulse;
// outputs hold until the next start). If phi(n) is too small for any
// exponent (phi < 4), done still pulses, with e = 0. KEY_BITS is the width of n, phi and e;
// p and q are KEY_BITS/2 bits.
// Timing: one cycle to form n and phi, then per candidate one cycle per Euclid
// remainder step plus one cycle to move to the next candidate.
// The operators and the gcd test follow the source; the candidate order is
// this design's choice, since the source only requires 1 < e < phi(n).
module public_key_gen #(
  parameter int unsigned KEY_BITS = rsa_pkg::DEFAULT_KEY_BITS,
  localparam int unsigned PW = KEY_BITS / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [PW-1:0]       p,
  input  logic [PW-1:0]       q,
  output logic [KEY_BITS-1:0] n,
  output logic [KEY_BITS-1:0] phi,
  output logic [KEY_BITS-1:0] e,
  output logic                busy,
  output logic                done
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_EUCLID, S_NEXT} state_e;
  state_e state;

  logic [KEY_BITS-1:0] a_reg, b_reg;   // Euclid operands A, B
  logic [KEY_BITS-1:0] quo_unused, rem;
  logic [PW-1:0]       p_m1, q_m1;

  // SUB, SUB, MUL, MUL of the data flow graph
  assign p_m1 = p - PW'(1);
  assign q_m1 = q - PW'(1);

  divmod #(.NW(KEY_BITS), .DW(KEY_BITS)) u_mod (
    .num (a_reg),
    .den (b_reg),
    .quo (quo_unused),
    .rem (rem)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n     <= '0;
      phi   <= '0;
      e     <= '0;
      a_reg <= '0;
      b_reg <= '1;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n     <= KEY_BITS'(p) * KEY_BITS'(q);
          phi   <= KEY_BITS'(p_m1) * KEY_BITS'(q_m1);
          state <= S_SETUP;
        end
        S_SETUP: begin
          e     <= KEY_BITS'(3);
          a_reg <= phi;
          b_reg <= KEY_BITS'(3);
          state <= S_EUCLID;
        end
        S_EUCLID: begin
          if (rem == '0) begin
            if (b_reg == KEY_BITS'(1)) begin
              done  <= 1'b1;                 // gcd(phi, e) = 1: e accepted
              state <= S_IDLE;
            end else begin
              state <= S_NEXT;               // gcd > 1: next candidate
            end
          end else begin
            a_reg <= b_reg;                  // A' = B
            b_reg <= rem;                    // B' = A mod B
          end
        end
        S_NEXT: begin
          if (e + KEY_BITS'(2) >= phi) begin
            e     <= '0;                     // no exponent exists (phi < 4)
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            e     <= e + KEY_BITS'(2);
            a_reg <= phi;
            b_reg <= e + KEY_BITS'(2);
            state <= S_EUCLID;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
