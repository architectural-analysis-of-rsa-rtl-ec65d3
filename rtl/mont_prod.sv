// mont_prod: bit-serial Montgomery product S = A * B * 2^-KEY_BITS mod N.
//
// S starts at 0. Iteration i (i = 0 .. KEY_BITS-1) adds A*b_i to S (the
// "multiplication" by one bit of B is an AND), takes q_i = S mod 2 (the least
// significant bit), adds q_i*N so that the sum is even, and halves it
// (a right shift). One iteration per clock cycle. With A < N, B < 2^KEY_BITS
// and N odd, S stays below 2N; one closing cycle subtracts N when S >= N so
// the result lies in 0 .. N-1.
//
// Interface: start (pulse, ignored while busy) with a, b, n, which are taken
// into registers; s, busy, done (one-cycle pulse; s holds until the next
// start). n must be odd and a < n.
// Timing: done is seen KEY_BITS + 1 clock edges after the edge that takes
// start.
// The iteration follows the source; the closing conditional subtraction is
// this design's addition, needed for a fully reduced result.
module mont_prod #(
  parameter int unsigned KEY_BITS = rsa_pkg::DEFAULT_KEY_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [KEY_BITS-1:0] a,
  input  logic [KEY_BITS-1:0] b,
  input  logic [KEY_BITS-1:0] n,
  output logic [KEY_BITS-1:0] s,
  output logic                busy,
  output logic                done
);

  localparam int unsigned SW = KEY_BITS + 2;
  localparam int unsigned IW = $clog2(KEY_BITS + 1);

  logic [KEY_BITS-1:0] a_r, b_r, n_r;
  logic [SW-1:0]       acc;            // running S, below 2N
  logic [IW-1:0]       i;
  logic                closing;        // last cycle: conditional subtraction
  logic [SW-1:0]       sum_ab, sum_qn;
  logic                q_bit;

  assign sum_ab = acc + (b_r[i[$clog2(KEY_BITS)-1:0]] ? SW'(a_r) : '0);  // ADD A*b_i
  assign q_bit  = sum_ab[0];                                             // mod 2
  assign sum_qn = sum_ab + (q_bit ? SW'(n_r) : '0);                      // ADD q_i*N

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      closing <= 1'b0;
      acc     <= '0;
      a_r     <= '0;
      b_r     <= '0;
      n_r     <= '1;
      i       <= '0;
      s       <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_r     <= a;
          b_r     <= b;
          n_r     <= n;
          acc     <= '0;          // S_-1 = 0
          i       <= '0;
          closing <= 1'b0;
          busy    <= 1'b1;
        end
      end else if (!closing) begin
        acc <= sum_qn >> 1;       // DIV 2
        i   <= i + IW'(1);
        if (i == IW'(KEY_BITS - 1)) closing <= 1'b1;
      end else begin
        s       <= (acc >= SW'(n_r)) ? KEY_BITS'(acc - SW'(n_r)) : KEY_BITS'(acc);
        busy    <= 1'b0;
        closing <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

endmodule
