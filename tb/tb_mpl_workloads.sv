// tb_mpl_workloads: the configurations evaluated for the coprocessor, each
// run as one complete exponentiation with a 1024-bit exponent (the 4096-bit
// one with a 256-bit exponent, to keep the simulation short; its cost per
// exponent bit is the same):
//   K = 16, 32, 64 with N = 1024        (digit-size comparison)
//   K = 16 with N = 2048 and N = 4096   (operand-size comparison)
//   K = 16 with N = 1040 and a full 1024-bit modulus (2**1023 <= p), the
//   size to use for moduli that fill 1024 bits, since the modulus must stay
//   below 2**(N-2).
// Each is checked for the right result and for its cycle count, and the
// throughput at the clock frequency reported for that configuration is
// printed. The configurations run one after the other.
module tb_mpl_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int C = 6;
  logic [C-1:0] go, fin;
  int ck [C], fl [C];
  int checks, failures;

  mpl_exp_check #(.K(16), .N(1024), .L(1024), .FMHZ(208.33)) w0 (.clk, .go(go[0]), .finished(fin[0]), .checks(ck[0]), .failures(fl[0]));
  mpl_exp_check #(.K(32), .N(1024), .L(1024), .FMHZ(109.20)) w1 (.clk, .go(go[1]), .finished(fin[1]), .checks(ck[1]), .failures(fl[1]));
  mpl_exp_check #(.K(64), .N(1024), .L(1024), .FMHZ(89.62))  w2 (.clk, .go(go[2]), .finished(fin[2]), .checks(ck[2]), .failures(fl[2]));
  mpl_exp_check #(.K(16), .N(2048), .L(1024), .FMHZ(207.38)) w3 (.clk, .go(go[3]), .finished(fin[3]), .checks(ck[3]), .failures(fl[3]));
  mpl_exp_check #(.K(16), .N(4096), .L(256),  .FMHZ(210.08)) w4 (.clk, .go(go[4]), .finished(fin[4]), .checks(ck[4]), .failures(fl[4]));
  mpl_exp_check #(.K(16), .N(1040), .L(1024), .PBITS(1024), .FMHZ(208.33)) w5 (.clk, .go(go[5]), .finished(fin[5]), .checks(ck[5]), .failures(fl[5]));

  initial begin
    // the runs add up to about 44 million cycles
    repeat (60_000_000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < C; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    go = '0;
    for (int i = 0; i < C; i++) begin
      go[i] = 1'b1;
      wait (fin[i]);
    end
    checks = 0; failures = 0;
    for (int i = 0; i < C; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
