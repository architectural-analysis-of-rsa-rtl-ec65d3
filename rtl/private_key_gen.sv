// private_key_gen: private exponent d = e^-1 mod phi(n) by the extended
// Euclidean algorithm.
//
// Three lanes hold the vectors A = (A1, A2, A3) and B = (B1, B2, B3), started
// as A = (1, 0, phi), B = (0, 1, e). Throughout, A3 = A1*phi + A2*e and
// B3 = B1*phi + B2*e. While B3 != 1 the divider forms Q = A3 / B3, each lane j
// forms T_j = A_j - Q*B_j (one multiplier and one subtractor), and then
// A <- B, B <- T. When B3 reaches 1, B2*e = 1 mod phi, so d is B2, brought
// into 0..phi-1 by adding phi when it is negative.
//
// SCHED selects the arithmetic-level schedule:
//   EE_PARALLEL   - three multipliers and three subtractors, one iteration per
//                   clock cycle.
//   EE_SEQUENTIAL - one multiplier and one subtractor shared by the three
//                   lanes in turn (lane index i mod 3); T1, T2 are parked in
//                   registers and the update is made with T3, so an iteration
//                   takes three cycles.
// The quotient comes from the combinational divider and stays valid over the
// three sequential cycles, since A3 and B3 only change at the update.
//
// Interface: start (pulse) with e and phi; d, no_inverse, busy, done (one-cycle
// pulse; outputs hold until the next start). If B3 reaches 0 first,
// gcd(e, phi) != 1: done pulses with no_inverse set and d = 0.
// Timing: from the clock edge that takes start, done is seen after
// iterations + 1 edges (parallel) or 3*iterations + 1 edges (sequential).
// The algorithm, its initial values and both schedules follow the source; the
// signed lane width (KEY_BITS+2), the final correction of a negative B2 and
// the no_inverse exit are this design's choices.
module private_key_gen
  import rsa_pkg::*;
#(
  parameter int unsigned KEY_BITS = DEFAULT_KEY_BITS,
  parameter ee_sched_e   SCHED    = EE_PARALLEL
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [KEY_BITS-1:0] e,
  input  logic [KEY_BITS-1:0] phi,
  output logic [KEY_BITS-1:0] d,
  output logic                no_inverse,
  output logic                busy,
  output logic                done
);

  localparam int unsigned W = KEY_BITS + 2;   // signed lane width
  typedef logic signed [W-1:0] lane_t;

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e state;

  lane_t               a [3];
  lane_t               b [3];
  lane_t               t_park [2];    // sequential schedule: T1, T2
  logic [1:0]          lane;          // sequential schedule: lane in use
  logic [KEY_BITS-1:0] quo, rem_unused;
  lane_t               q_s;
  lane_t               t_par [3];     // parallel schedule: T1..T3
  lane_t               t_seq;         // sequential schedule: T of one lane
  logic                iter_start;    // first cycle of an iteration

  // DIV: Q = A3 / B3
  divmod #(.NW(KEY_BITS), .DW(KEY_BITS)) u_div (
    .num (a[2][KEY_BITS-1:0]),
    .den (b[2][KEY_BITS-1:0]),
    .quo (quo),
    .rem (rem_unused)
  );
  assign q_s = lane_t'({2'b00, quo});

  function automatic lane_t mul_sub(lane_t aj, lane_t bj, lane_t qq);
    // MUL then SUB; |T| <= phi, so the low W bits of the product suffice.
    return aj - lane_t'(qq * bj);
  endfunction

  generate
    if (SCHED == EE_PARALLEL) begin : g_par
      always_comb begin
        for (int j = 0; j < 3; j++) t_par[j] = mul_sub(a[j], b[j], q_s);
      end
      assign t_seq = '0;
    end else begin : g_seq
      assign t_seq = mul_sub(a[lane], b[lane], q_s);
      always_comb begin
        for (int j = 0; j < 3; j++) t_par[j] = '0;
      end
    end
  endgenerate

  assign iter_start = (SCHED == EE_PARALLEL) || (lane == 2'd0);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      lane       <= '0;
      d          <= '0;
      no_inverse <= 1'b0;
      done       <= 1'b0;
      for (int j = 0; j < 3; j++) begin
        a[j] <= '0;
        b[j] <= '0;
      end
      t_park[0] <= '0;
      t_park[1] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a[0]       <= lane_t'(1);
          a[1]       <= lane_t'(0);
          a[2]       <= lane_t'({2'b00, phi});
          b[0]       <= lane_t'(0);
          b[1]       <= lane_t'(1);
          b[2]       <= lane_t'({2'b00, e});
          lane       <= '0;
          no_inverse <= 1'b0;
          state      <= S_RUN;
        end
        S_RUN: begin
          if (iter_start && b[2] == lane_t'(1)) begin
            d     <= (b[1] < 0) ? KEY_BITS'(b[1] + lane_t'({2'b00, phi}))
                                : KEY_BITS'(b[1]);
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (iter_start && b[2] == lane_t'(0)) begin
            d          <= '0;
            no_inverse <= 1'b1;
            done       <= 1'b1;
            state      <= S_IDLE;
          end else if (SCHED == EE_PARALLEL) begin
            for (int j = 0; j < 3; j++) begin
              a[j] <= b[j];
              b[j] <= t_par[j];
            end
          end else begin
            if (lane == 2'd2) begin
              for (int j = 0; j < 3; j++) a[j] <= b[j];
              b[0] <= t_park[0];
              b[1] <= t_park[1];
              b[2] <= t_seq;
              lane <= 2'd0;
            end else begin
              t_park[lane[0]] <= t_seq;
              lane            <= lane + 2'd1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
