// tb_modexp_sqm: checks square-and-multiply exponentiation for 8- and 32-bit
// operands against a software model, on corner cases (exponent 0, 1 and all
// ones, base 0 and base above the modulus) and random operands, and checks
// that every result takes exactly KEY_BITS cycles.
module tb_modexp_sqm;
  import rsa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [7:0]  b8, x8, m8, r8;
  logic [31:0] b32, x32, m32, r32;
  logic busy8, done8, busy32, done32;

  modexp_sqm #(.KEY_BITS(8))  u8  (.clk, .rst_n, .start, .base(b8),  .exp(x8),  .modulus(m8),  .result(r8),  .busy(busy8),  .done(done8));
  modexp_sqm #(.KEY_BITS(32)) u32 (.clk, .rst_n, .start, .base(b32), .exp(x32), .modulus(m32), .result(r32), .busy(busy32), .done(done32));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int cyc;
    bit s8, s32;
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      m8 = 8'($urandom);  if (m8 < 2) m8 = 2;
      m32 = $urandom;     if (m32 < 2) m32 = 2;
      b8 = 8'($urandom) % m8;  b32 = $urandom % m32;
      x8 = 8'($urandom); x32 = $urandom;
      case (t)
        0: begin x8 = 0; x32 = 0; end
        1: begin x8 = 1; x32 = 1; end
        2: begin x8 = 8'hFF; x32 = '1; end
        3: begin b8 = 0; b32 = 0; end
        4: begin b8 = 8'hFF; m8 = 8'd143; b32 = '1; m32 = 32'd3233; end
        default: ;
      endcase
      @(negedge clk);
      start = 1;
      @(posedge clk);
      #1 start = 0;
      cyc = 0; s8 = 0; s32 = 0;
      while (!(s8 && s32)) begin
        @(posedge clk);
        cyc++;
        #1;
        if (done8 && !s8) begin s8 = 1; chk(cyc == 8, $sformatf("8-bit latency %0d", cyc)); end
        if (done32 && !s32) begin s32 = 1; chk(cyc == 32, $sformatf("32-bit latency %0d", cyc)); end
      end
      // exponent 0 yields C_0 = 1 by construction
      chk(r8 == ((x8 == 0) ? 8'd1 : 8'(mod_pow(b8, x8, m8))),
          $sformatf("8-bit %0d^%0d mod %0d = %0d", b8, x8, m8, r8));
      chk(r32 == ((x32 == 0) ? 32'd1 : 32'(mod_pow(b32, x32, m32))),
          $sformatf("32-bit %0d^%0d mod %0d = %0d", b32, x32, m32, r32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
