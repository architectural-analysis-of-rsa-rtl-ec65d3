// tb_rsa_workloads: the key sizes of the architecture comparison - 8-, 16-
// and 32-bit keys - in each of the four cases (square-and-multiply or Montgomery
// exponentiation; parallel or sequential extended Euclid), a few complete
// sessions each, every one checked end to end. The session length of every
// case is printed.
module tb_rsa_workloads;
  import rsa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCASE = 12;  // 4 cases x 3 key sizes
  localparam int SESSIONS = 6;

  logic        go;
  logic [7:0]  seed16;
  logic [15:0] seed32;
  logic [3:0]  seed8;
  logic [7:0]  msg8;
  logic [15:0] msg16;
  logic [31:0] msg32;
  logic        fin [NCASE];
  int          cyc [NCASE], chks [NCASE], fails [NCASE];

  for (genvar g = 0; g < 4; g++) begin : g16
    rsa_case_runner #(.KEY_BITS(16), .EXP_ALG(exp_alg_e'(g / 2)), .EE_SCHED(ee_sched_e'(g % 2))) u (
      .clk, .rst_n, .go, .seed(seed16), .message(msg16), .finished(fin[g]), .cycles(cyc[g]),
      .checks(chks[g]), .failures(fails[g]));
  end
  for (genvar g = 0; g < 4; g++) begin : g8
    rsa_case_runner #(.KEY_BITS(8), .EXP_ALG(exp_alg_e'(g / 2)), .EE_SCHED(ee_sched_e'(g % 2))) u (
      .clk, .rst_n, .go, .seed(seed8), .message(msg8), .finished(fin[8 + g]), .cycles(cyc[8 + g]),
      .checks(chks[8 + g]), .failures(fails[8 + g]));
  end
  for (genvar g = 0; g < 4; g++) begin : g32
    rsa_case_runner #(.KEY_BITS(32), .EXP_ALG(exp_alg_e'(g / 2)), .EE_SCHED(ee_sched_e'(g % 2))) u (
      .clk, .rst_n, .go, .seed(seed32), .message(msg32), .finished(fin[4 + g]), .cycles(cyc[4 + g]),
      .checks(chks[4 + g]), .failures(fails[4 + g]));
  end

  initial begin
    bit all_fin;
    go = 0; seed8 = 0; msg8 = 0; seed16 = 0; seed32 = 0; msg16 = 0; msg32 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < SESSIONS; s++) begin
      seed8  = 4'($urandom);
      msg8   = 8'($urandom % 15);
      seed16 = 8'($urandom);
      seed32 = 16'($urandom);
      msg16  = 16'($urandom % 15);       // below the smallest possible n
      msg32  = $urandom % 15;
      if (s == 1) begin msg16 = 16'd12; msg32 = 32'd0; end
      if (s == 2) msg32 = $urandom;      // may exceed n: reduced mod n
      @(negedge clk);
      go = 1;
      @(negedge clk);
      go = 0;
      do begin
        @(posedge clk);
        #1;
        all_fin = 1;
        for (int k = 0; k < NCASE; k++) all_fin &= fin[k];
      end while (!all_fin);
      for (int k = 0; k < NCASE; k++)
        $display("session %0d  %0d-bit case %0d: %0d cycles", s, (k < 4) ? 16 : (k < 8) ? 32 : 8, k % 4 + 1, cyc[k]);
    end
    for (int k = 0; k < NCASE; k++) begin
      checks += chks[k];
      failures += fails[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
