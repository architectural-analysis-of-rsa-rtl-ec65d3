// modexp_sqm: modular exponentiation base^exp mod modulus by the
// right-to-left square and multiply algorithm.
//
// Z starts as the base and C as 1. Iteration i (i = 0 .. KEY_BITS-1) squares
// Z and reduces it mod n (Z_{i+1} = Z_i^2 mod n) and, when exponent bit e_i is
// 1, also multiplies C by the old Z and reduces it (C_{i+1} = C_i*Z_i mod n);
// when e_i is 0, C keeps its value. Both products and both reductions are
// combinational (two multipliers, two dividers) and one iteration is done per
// clock cycle, so all KEY_BITS exponent bits are always processed.
// The same unit serves encryption (base = M, exp = e) and decryption
// (base = C, exp = d).
//
// Interface: start (pulse, ignored while busy) with base, exp and modulus,
// which are taken into registers; result, busy, done (one-cycle pulse; result
// holds until the next start). modulus must be at least 2.
// Timing: done is seen KEY_BITS clock edges after the edge that takes start.
// The algorithm follows the source; doing one whole iteration per cycle with
// combinational operators is this design's choice.
module modexp_sqm #(
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

  logic [KEY_BITS-1:0]   z, exp_r, n_r;
  logic [IW-1:0]         i;
  logic [2*KEY_BITS-1:0] z_sq, c_z;
  logic [2*KEY_BITS-1:0] q_unused0, q_unused1;
  logic [KEY_BITS-1:0]   z_next, c_next;

  assign z_sq = z * z;          // MUL: Z_i^2
  assign c_z  = result * z;     // MUL: C_i * Z_i

  divmod #(.NW(2*KEY_BITS), .DW(KEY_BITS)) u_mod_sq (
    .num (z_sq), .den (n_r), .quo (q_unused0), .rem (z_next)
  );
  divmod #(.NW(2*KEY_BITS), .DW(KEY_BITS)) u_mod_mul (
    .num (c_z), .den (n_r), .quo (q_unused1), .rem (c_next)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      z      <= '0;
      result <= '0;
      exp_r  <= '0;
      n_r    <= '1;
      i      <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          z      <= base;
          result <= KEY_BITS'(1);     // C_0 = 1
          exp_r  <= exp;
          n_r    <= modulus;
          i      <= '0;
          busy   <= 1'b1;
        end
      end else begin
        z <= z_next;
        if (exp_r[i]) result <= c_next;
        i <= i + IW'(1);
        if (i == IW'(KEY_BITS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
