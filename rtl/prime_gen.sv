// prime_gen: draws two distinct random odd primes p and q from an LFSR.
//
// On 'start' the LFSR is loaded with 'seed'. Each candidate is the LFSR state
// with its least significant bit forced to 1 (an odd number); the LFSR then
// steps once. Candidates below 3 are dropped at once. A candidate is tested
// by trial division with odd divisors 3, 5, 7, ... one divisor per clock
// cycle, using the shared combinational divider: it is prime when the
// divisor's square exceeds it before any divisor leaves remainder 0, and
// composite as soon as one does. The first prime found becomes p; the next
// prime different from p becomes q. Then 'done' pulses for one cycle and p, q
// hold until the next 'start'.
//
// Interface: start (pulse, ignored while busy), seed, p, q, busy, done.
// Timing: one cycle per candidate draw plus one cycle per trial divisor.
// That p and q come from an LFSR follows the source. The source does not say
// how primality is established: trial division, the odd-only candidates and
// the exclusion of 2 (needed for an odd modulus in Montgomery arithmetic)
// are this design's choices.
module prime_gen #(
  parameter int unsigned PW = 4   // width of each prime in bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [PW-1:0] seed,
  output logic [PW-1:0] p,
  output logic [PW-1:0] q,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {S_IDLE, S_DRAW, S_TEST} state_e;
  state_e state;

  logic [PW-1:0]   lfsr_state;
  logic            lfsr_load, lfsr_step;
  logic [PW-1:0]   cand;       // candidate under test
  logic [PW-1:0]   divisor;    // current trial divisor (odd)
  logic            have_p;     // p already found
  logic [PW-1:0]   quo_unused;
  logic [PW-1:0]   rem;
  logic [2*PW-1:0] div_sq;

  lfsr #(.WIDTH(PW)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (lfsr_load),
    .seed  (seed),
    .step  (lfsr_step),
    .state (lfsr_state)
  );

  divmod #(.NW(PW), .DW(PW)) u_div (
    .num (cand),
    .den (divisor),
    .quo (quo_unused),
    .rem (rem)
  );

  assign div_sq    = divisor * divisor;
  assign lfsr_load = (state == S_IDLE) && start;
  assign lfsr_step = (state == S_DRAW);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cand    <= '0;
      divisor <= PW'(3);
      have_p  <= 1'b0;
      p       <= '0;
      q       <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          have_p <= 1'b0;
          state  <= S_DRAW;
        end
        S_DRAW: begin
          cand    <= lfsr_state | PW'(1);
          divisor <= PW'(3);
          state   <= S_TEST;
        end
        S_TEST: begin
          if (cand < PW'(3)) begin
            state <= S_DRAW;                       // 1 is not a prime
          end else if (div_sq > {{PW{1'b0}}, cand}) begin
            // no divisor up to sqrt(cand): prime
            if (!have_p) begin
              p      <= cand;
              have_p <= 1'b1;
              state  <= S_DRAW;
            end else if (cand == p) begin
              state <= S_DRAW;                     // q must differ from p
            end else begin
              q     <= cand;
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end else if (rem == '0) begin
            state <= S_DRAW;                       // composite
          end else begin
            divisor <= divisor + PW'(2);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (PW >= 3) else $error("prime_gen: PW must be at least 3");
  end

endmodule
