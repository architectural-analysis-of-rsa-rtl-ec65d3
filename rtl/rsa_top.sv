// rsa_top: RSA transceiver - key generation, encryption and decryption.
//
// One 'start' runs a whole session:
//   1. prime_gen draws two distinct odd primes p, q from an LFSR seeded with
//      'seed'.
//   2. public_key_gen forms n = p*q, phi(n) = (p-1)(q-1) and the public
//      exponent e (Euclid's algorithm).
//   3. Encryption c = M^e mod n and private key generation d = e^-1 mod phi(n)
//      (extended Euclid) run at the same time, since neither needs the
//      other's result.
//   4. Decryption plain = c^d mod n, on the same exponentiation unit as
//      encryption.
// Then 'done' pulses for one cycle; all outputs hold until the next start.
//
// Two parameters pick the architecture (see rsa_pkg):
//   EXP_ALG  - EXP_SQUARE_MULTIPLY (modexp_sqm) or EXP_MONTGOMERY
//              (modexp_mont) for encryption and decryption.
//   EE_SCHED - EE_PARALLEL (three multipliers) or EE_SEQUENTIAL (one shared
//              multiplier) in the extended Euclid step.
// KEY_BITS is the width of n, phi, e, d, the message and the ciphertext; p, q
// are KEY_BITS/2 bits.
//
// Interface: start (pulse, ignored while busy), seed (LFSR seed; 0 acts as
// 1), message (taken at start). Outputs p, q, n, phi, e, d, cipher, plain,
// key_error, busy, done. The message must be below n to come back unchanged:
// since n is only known once the keys exist, a larger message is reduced mod n
// by the arithmetic, and plain = message mod n. key_error flags a session
// whose keys could not be formed (never the case for distinct odd primes).
// Timing: the session length depends on the primes and keys drawn: the sum
// of the prime search, the exponent search, the longer of encryption and
// private key generation, and decryption, plus a few sequencing cycles.
// The four units, the parallel run of encryption and private key generation
// and the sharing of one unit by encryption and decryption follow the source.
// The session sequencer and its handshakes are this design's own.
module rsa_top
  import rsa_pkg::*;
#(
  parameter int unsigned KEY_BITS = DEFAULT_KEY_BITS,
  parameter exp_alg_e    EXP_ALG  = EXP_SQUARE_MULTIPLY,
  parameter ee_sched_e   EE_SCHED = EE_PARALLEL,
  localparam int unsigned PW      = KEY_BITS / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [PW-1:0]       seed,
  input  logic [KEY_BITS-1:0] message,
  output logic [PW-1:0]       p,
  output logic [PW-1:0]       q,
  output logic [KEY_BITS-1:0] n,
  output logic [KEY_BITS-1:0] phi,
  output logic [KEY_BITS-1:0] e,
  output logic [KEY_BITS-1:0] d,
  output logic [KEY_BITS-1:0] cipher,
  output logic [KEY_BITS-1:0] plain,
  output logic                key_error,
  output logic                busy,
  output logic                done
);

  typedef enum logic [2:0] {
    S_IDLE, S_PRIMES, S_PUBKEY, S_ENC_PRIV, S_DEC
  } state_e;
  state_e state;

  logic [KEY_BITS-1:0] msg_r;
  logic go_prime, go_pub, go_enc_priv, go_dec;   // one-cycle launch pulses
  logic prime_done, pub_done, priv_done, exp_done;
  logic prime_busy, pub_busy, priv_busy, exp_busy;
  logic enc_finished, priv_finished;
  logic no_inverse;

  // ---- 1. primes -------------------------------------------------------
  prime_gen #(.PW(PW)) u_prime_gen (
    .clk (clk), .rst_n (rst_n), .start (go_prime), .seed (seed),
    .p (p), .q (q), .busy (prime_busy), .done (prime_done)
  );

  // ---- 2. public key ---------------------------------------------------
  public_key_gen #(.KEY_BITS(KEY_BITS)) u_public_key_gen (
    .clk (clk), .rst_n (rst_n), .start (go_pub), .p (p), .q (q),
    .n (n), .phi (phi), .e (e), .busy (pub_busy), .done (pub_done)
  );

  // ---- 3. private key --------------------------------------------------
  private_key_gen #(.KEY_BITS(KEY_BITS), .SCHED(EE_SCHED)) u_private_key_gen (
    .clk (clk), .rst_n (rst_n), .start (go_enc_priv), .e (e), .phi (phi),
    .d (d), .no_inverse (no_inverse), .busy (priv_busy), .done (priv_done)
  );

  // ---- 3./4. encryption and decryption on one exponentiation unit -------
  logic                exp_start;
  logic [KEY_BITS-1:0] exp_base, exp_exp, exp_result;

  assign exp_start = go_enc_priv || go_dec;
  assign exp_base  = (state == S_DEC) ? cipher : msg_r;
  assign exp_exp   = (state == S_DEC) ? d      : e;

  generate
    if (EXP_ALG == EXP_MONTGOMERY) begin : g_mont
      modexp_mont #(.KEY_BITS(KEY_BITS)) u_modexp (
        .clk (clk), .rst_n (rst_n), .start (exp_start), .base (exp_base),
        .exp (exp_exp), .modulus (n), .result (exp_result),
        .busy (exp_busy), .done (exp_done)
      );
    end else begin : g_sqm
      modexp_sqm #(.KEY_BITS(KEY_BITS)) u_modexp (
        .clk (clk), .rst_n (rst_n), .start (exp_start), .base (exp_base),
        .exp (exp_exp), .modulus (n), .result (exp_result),
        .busy (exp_busy), .done (exp_done)
      );
    end
  endgenerate

  // ---- session sequencer -------------------------------------------------
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      msg_r         <= '0;
      go_prime      <= 1'b0;
      go_pub        <= 1'b0;
      go_enc_priv   <= 1'b0;
      go_dec        <= 1'b0;
      enc_finished  <= 1'b0;
      priv_finished <= 1'b0;
      cipher        <= '0;
      plain         <= '0;
      key_error     <= 1'b0;
      done          <= 1'b0;
    end else begin
      go_prime    <= 1'b0;
      go_pub      <= 1'b0;
      go_enc_priv <= 1'b0;
      go_dec      <= 1'b0;
      done        <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          msg_r     <= message;
          key_error <= 1'b0;
          go_prime  <= 1'b1;
          state     <= S_PRIMES;
        end
        S_PRIMES: if (prime_done) begin
          go_pub <= 1'b1;
          state  <= S_PUBKEY;
        end
        S_PUBKEY: if (pub_done) begin
          if (e == '0) begin
            key_error <= 1'b1;
            done      <= 1'b1;
            state     <= S_IDLE;
          end else begin
            go_enc_priv   <= 1'b1;
            enc_finished  <= 1'b0;
            priv_finished <= 1'b0;
            state         <= S_ENC_PRIV;
          end
        end
        S_ENC_PRIV: begin
          if (exp_done) begin
            cipher       <= exp_result;
            enc_finished <= 1'b1;
          end
          if (priv_done) priv_finished <= 1'b1;
          if ((enc_finished || exp_done) && (priv_finished || priv_done)) begin
            if (no_inverse) begin
              key_error <= 1'b1;
              done      <= 1'b1;
              state     <= S_IDLE;
            end else begin
              go_dec <= 1'b1;
              state  <= S_DEC;
            end
          end
        end
        S_DEC: if (exp_done) begin
          plain <= exp_result;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A launch pulse must find its unit idle.
  a_prime_idle: assert property (@(posedge clk) disable iff (!rst_n)
    go_prime |-> !prime_busy);
  a_pub_idle: assert property (@(posedge clk) disable iff (!rst_n)
    go_pub |-> !pub_busy);
  a_exp_idle: assert property (@(posedge clk) disable iff (!rst_n)
    exp_start |-> !exp_busy);
  a_priv_idle: assert property (@(posedge clk) disable iff (!rst_n)
    go_enc_priv |-> !priv_busy);

endmodule
