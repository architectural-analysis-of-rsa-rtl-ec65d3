// lfsr: Fibonacci linear feedback shift register of maximal length.
//
// The register shifts toward its most significant bit; the new least
// significant bit is the XOR of the tap stages of a primitive feedback
// polynomial, so a nonzero state walks through all 2^WIDTH - 1 nonzero
// values before repeating. The tap table covers WIDTH 3 to 32.
//
// Interface: 'load' copies 'seed' into the register (a zero seed is replaced
// by 1, since the all-zero state would lock up); 'step' advances it by one
// position; 'state' is the register itself. Both act on the rising clock edge;
// 'load' wins over 'step'. Synchronous active-low reset to state 1.
// Random prime generation from an LFSR follows the source; the polynomials are
// this design's choice.
module lfsr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             step,
  output logic [WIDTH-1:0] state
);

  // Tap mask: bit (t-1) set for every tap stage t of the polynomial.
  function automatic logic [31:0] tap_mask(input int unsigned w);
    logic [31:0] m;
    unique case (w)
      3:  m = (32'd1 << 2)  | (32'd1 << 1);
      4:  m = (32'd1 << 3)  | (32'd1 << 2);
      5:  m = (32'd1 << 4)  | (32'd1 << 2);
      6:  m = (32'd1 << 5)  | (32'd1 << 4);
      7:  m = (32'd1 << 6)  | (32'd1 << 5);
      8:  m = (32'd1 << 7)  | (32'd1 << 5)  | (32'd1 << 4)  | (32'd1 << 3);
      9:  m = (32'd1 << 8)  | (32'd1 << 4);
      10: m = (32'd1 << 9)  | (32'd1 << 6);
      11: m = (32'd1 << 10) | (32'd1 << 8);
      12: m = (32'd1 << 11) | (32'd1 << 5)  | (32'd1 << 3)  | (32'd1 << 0);
      13: m = (32'd1 << 12) | (32'd1 << 3)  | (32'd1 << 2)  | (32'd1 << 0);
      14: m = (32'd1 << 13) | (32'd1 << 4)  | (32'd1 << 2)  | (32'd1 << 0);
      15: m = (32'd1 << 14) | (32'd1 << 13);
      16: m = (32'd1 << 15) | (32'd1 << 14) | (32'd1 << 12) | (32'd1 << 3);
      17: m = (32'd1 << 16) | (32'd1 << 13);
      18: m = (32'd1 << 17) | (32'd1 << 10);
      19: m = (32'd1 << 18) | (32'd1 << 5)  | (32'd1 << 1)  | (32'd1 << 0);
      20: m = (32'd1 << 19) | (32'd1 << 16);
      21: m = (32'd1 << 20) | (32'd1 << 18);
      22: m = (32'd1 << 21) | (32'd1 << 20);
      23: m = (32'd1 << 22) | (32'd1 << 17);
      24: m = (32'd1 << 23) | (32'd1 << 22) | (32'd1 << 21) | (32'd1 << 16);
      25: m = (32'd1 << 24) | (32'd1 << 21);
      26: m = (32'd1 << 25) | (32'd1 << 5)  | (32'd1 << 1)  | (32'd1 << 0);
      27: m = (32'd1 << 26) | (32'd1 << 4)  | (32'd1 << 1)  | (32'd1 << 0);
      28: m = (32'd1 << 27) | (32'd1 << 24);
      29: m = (32'd1 << 28) | (32'd1 << 26);
      30: m = (32'd1 << 29) | (32'd1 << 5)  | (32'd1 << 3)  | (32'd1 << 0);
      31: m = (32'd1 << 30) | (32'd1 << 27);
      default: m = (32'd1 << 31) | (32'd1 << 21) | (32'd1 << 1) | (32'd1 << 0);
    endcase
    return m;
  endfunction

  localparam logic [WIDTH-1:0] TAPS = WIDTH'(tap_mask(WIDTH));

  logic feedback;
  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= WIDTH'(1);
    end else if (load) begin
      state <= (seed == '0) ? WIDTH'(1) : seed;
    end else if (step) begin
      state <= {state[WIDTH-2:0], feedback};
    end
  end

  initial begin
    assert (WIDTH >= 3 && WIDTH <= 32)
      else $error("lfsr: WIDTH %0d outside the tap table (3..32)", WIDTH);
  end

endmodule
