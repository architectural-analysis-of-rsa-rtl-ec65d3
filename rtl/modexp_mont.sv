// modexp_mont: modular exponentiation base^exp mod modulus by Montgomery
// exponentiation, built on two bit-serial Montgomery product units.
//
// With R = 2^KEY_BITS and MP(x, y) = x*y*R^-1 mod n:
//   1. Nr = 2^(2*KEY_BITS) mod n = R^2 mod n, from the combinational divider.
//   2. In parallel: C_0 = MP(Nr, 1) = R mod n (Montgomery form of 1) on the
//      C unit, P_0 = MP(Nr, M) = M*R mod n (Montgomery form of the base) on
//      the P unit.
//   3. For i = 0 .. KEY_BITS-1: P_{i+1} = MP(P_i, P_i) on the P unit and, only
//      when exponent bit e_i is 1, C_{i+1} = MP(C_i, P_i) on the C unit in the
//      same round; otherwise C_{i+1} = C_i.
//   4. result = MP(1, C_n), which leaves Montgomery form.
// A round launches the units for one cycle, waits for their done pulse and
// takes their results into P and C.
// The modulus must be odd (n = p*q with odd primes p, q) and base < 2^KEY_BITS.
//
// Interface: start (pulse, ignored while busy) with base, exp and modulus,
// which are taken into registers; result, busy, done (one-cycle pulse; result
// holds until the next start).
// Timing: done is seen 1 + (KEY_BITS + 2) * (KEY_BITS + 3) clock edges after
// the edge that takes start: one cycle for Nr, then KEY_BITS + 2 rounds of
// KEY_BITS + 3 cycles each.
// The sequence of steps follows the source; running the P and C products on
// two units at once and the round handshake are this design's choices.
module modexp_mont #(
  parameter int unsigned KEY_BITS = rsa_pkg::DEFAULT_KEY_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [KEY_BITS-1:0] base,
  input  logic [KEY_BITS-1:0] exp,
  input  logic [KEY_BITS-1:0] modulus,
  output logic [KEY_BITS-1:0] result,
  output logic                busy,
  output logic                done
);

  localparam int unsigned IW = (KEY_BITS > 1) ? $clog2(KEY_BITS) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_NR, S_PRE_GO, S_PRE_WAIT, S_LOOP_GO, S_LOOP_WAIT,
    S_FIN_GO, S_FIN_WAIT
  } state_e;
  state_e state;

  logic [KEY_BITS-1:0] m_r, exp_r, n_r, nr, p_r, c_r;
  logic [IW-1:0]       i;

  // Nr = 2^(2k) mod n
  logic [2*KEY_BITS:0] r2;
  logic [2*KEY_BITS:0] r2_quo_unused;
  logic [KEY_BITS-1:0] r2_mod_n;
  assign r2 = {1'b1, {(2*KEY_BITS){1'b0}}};
  divmod #(.NW(2*KEY_BITS+1), .DW(KEY_BITS)) u_mod_r2 (
    .num (r2), .den (n_r), .quo (r2_quo_unused), .rem (r2_mod_n)
  );

  // The two Montgomery product units
  logic                start_p, start_c, done_p, done_c, busy_p, busy_c;
  logic [KEY_BITS-1:0] a_p, b_p, a_c, b_c, s_p, s_c;

  mont_prod #(.KEY_BITS(KEY_BITS)) u_mp_p (
    .clk (clk), .rst_n (rst_n), .start (start_p), .a (a_p), .b (b_p), .n (n_r),
    .s (s_p), .busy (busy_p), .done (done_p)
  );
  mont_prod #(.KEY_BITS(KEY_BITS)) u_mp_c (
    .clk (clk), .rst_n (rst_n), .start (start_c), .a (a_c), .b (b_c), .n (n_r),
    .s (s_c), .busy (busy_c), .done (done_c)
  );

  always_comb begin
    start_p = 1'b0;
    start_c = 1'b0;
    a_p = p_r;
    b_p = p_r;
    a_c = c_r;
    b_c = p_r;
    unique case (state)
      S_PRE_GO: begin
        start_p = 1'b1;  a_p = nr;  b_p = m_r;             // P_0 = MP(Nr, M)
        start_c = 1'b1;  a_c = nr;  b_c = KEY_BITS'(1);    // C_0 = MP(Nr, 1)
      end
      S_LOOP_GO: begin
        start_p = 1'b1;                                    // MP(P_i, P_i)
        start_c = exp_r[i];                                // MP(C_i, P_i)
      end
      S_FIN_GO: begin
        start_c = 1'b1;  a_c = KEY_BITS'(1);  b_c = c_r;   // MP(1, C_n)
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      m_r    <= '0;
      exp_r  <= '0;
      n_r    <= '1;
      nr     <= '0;
      p_r    <= '0;
      c_r    <= '0;
      i      <= '0;
      result <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          m_r   <= base;
          exp_r <= exp;
          n_r   <= modulus;
          state <= S_NR;
        end
        S_NR: begin
          nr    <= r2_mod_n;
          state <= S_PRE_GO;
        end
        S_PRE_GO:   state <= S_PRE_WAIT;
        S_PRE_WAIT: if (done_p) begin
          p_r   <= s_p;
          c_r   <= s_c;
          i     <= '0;
          state <= S_LOOP_GO;
        end
        S_LOOP_GO:  state <= S_LOOP_WAIT;
        S_LOOP_WAIT: if (done_p) begin
          p_r <= s_p;
          if (exp_r[i]) c_r <= s_c;
          i <= i + IW'(1);
          state <= (i == IW'(KEY_BITS - 1)) ? S_FIN_GO : S_LOOP_GO;
        end
        S_FIN_GO:   state <= S_FIN_WAIT;
        S_FIN_WAIT: if (done_c) begin
          result <= s_c;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Both units run the same number of cycles, so the C unit is never busy
  // when a round ends on the P unit's done pulse.
  a_rounds_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_LOOP_WAIT && done_p) |-> !busy_c);
  a_launch_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start_p |-> !busy_p);

endmodule
