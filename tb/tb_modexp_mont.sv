// tb_modexp_mont: checks Montgomery exponentiation for 8- and 16-bit
// operands (odd modulus) against a software model, on corner cases
// (exponent 0, 1, all ones; base 0; base above the modulus) and random
// operands, and checks the cycle count 1 + (k+2)(k+3).
module tb_modexp_mont;
  import rsa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [7:0]  b8, x8, m8, r8;
  logic [15:0] b16, x16, m16, r16;
  logic busy8, done8, busy16, done16;

  modexp_mont #(.KEY_BITS(8))  u8  (.clk, .rst_n, .start, .base(b8),  .exp(x8),  .modulus(m8),  .result(r8),  .busy(busy8),  .done(done8));
  modexp_mont #(.KEY_BITS(16)) u16 (.clk, .rst_n, .start, .base(b16), .exp(x16), .modulus(m16), .result(r16), .busy(busy16), .done(done16));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int cyc;
    bit s8, s16;
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      m8 = 8'($urandom) | 8'd1;    if (m8 < 3) m8 = 3;
      m16 = 16'($urandom) | 16'd1; if (m16 < 3) m16 = 3;
      b8 = 8'($urandom) % m8;  b16 = 16'($urandom) % m16;
      x8 = 8'($urandom); x16 = 16'($urandom);
      case (t)
        0: begin x8 = 0; x16 = 0; end
        1: begin x8 = 1; x16 = 1; end
        2: begin x8 = 8'hFF; x16 = '1; end
        3: begin b8 = 0; b16 = 0; end
        4: begin b8 = 8'hFF; m8 = 8'd143; b16 = '1; m16 = 16'd3233; end
        default: ;
      endcase
      @(negedge clk);
      start = 1;
      @(posedge clk);
      #1 start = 0;
      cyc = 0; s8 = 0; s16 = 0;
      while (!(s8 && s16)) begin
        @(posedge clk);
        cyc++;
        #1;
        if (done8 && !s8) begin s8 = 1; chk(cyc == 1 + 10 * 11, $sformatf("8-bit latency %0d", cyc)); end
        if (done16 && !s16) begin s16 = 1; chk(cyc == 1 + 18 * 19, $sformatf("16-bit latency %0d", cyc)); end
      end
      chk(r8 == 8'(mod_pow(b8, x8, m8)), $sformatf("8-bit %0d^%0d mod %0d = %0d", b8, x8, m8, r8));
      chk(r16 == 16'(mod_pow(b16, x16, m16)), $sformatf("16-bit %0d^%0d mod %0d = %0d", b16, x16, m16, r16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
