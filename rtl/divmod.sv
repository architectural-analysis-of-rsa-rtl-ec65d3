// divmod: combinational unsigned divider giving quotient and remainder.
//
// This is the "mod" and "DIV" operator of the data flow graphs: Euclid's
// remainder steps, the quotient of the extended Euclid step, the reductions
// mod n of square-and-multiply and the 2^(2k) mod n constant of Montgomery
// exponentiation all use it. It is a restoring array divider: one
// compare-and-subtract row per numerator bit, most significant bit first,
// which is a plain chain of NW subtractors of DW+1 bits.
//
// Interface: num (NW bits) / den (DW bits) -> quo (NW bits), rem (DW bits).
// Purely combinational, no clock. A zero divisor gives an all-ones quotient
// and a meaningless remainder; every user guards against it.
// The restoring array is this design's choice; the source only names the
// operators.
module divmod #(
  parameter int unsigned NW = 16,
  parameter int unsigned DW = 8
) (
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic [NW-1:0] quo,
  output logic [DW-1:0] rem
);

  logic [DW:0] part;  // partial remainder, one bit wider than the divisor

  always_comb begin
    part = '0;
    quo  = '0;
    for (int i = int'(NW) - 1; i >= 0; i--) begin
      part = {part[DW-1:0], num[i]};
      if (part >= {1'b0, den}) begin
        part   = part - {1'b0, den};
        quo[i] = 1'b1;
      end
    end
    rem = part[DW-1:0];
  end

endmodule
