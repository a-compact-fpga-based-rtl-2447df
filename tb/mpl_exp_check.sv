// mpl_exp_check: testbench helper that runs RUNS exponentiations on one
// coprocessor of a given size and checks them.
//
// For each run it draws an odd modulus of exactly PBITS bits (PBITS <= N-2),
// a base below it and an L-bit exponent, loads the memories through the host
// port, runs the ladder and compares R0 with m^e * 2**N mod p. The reference
// uses square-and-multiply with bit-serial shift-and-subtract modular
// multiplication, so it shares nothing with Montgomery arithmetic and needs no
// wide division. It also checks the run time,
// L*(n*(n+1)+10)+2 cycles from start to done, and prints the run time at the
// clock frequency FMHZ.
module mpl_exp_check
  import mpl_pkg::*;
#(
  parameter int unsigned K     = 16,
  parameter int unsigned N     = 128,
  parameter int unsigned L     = N,
  parameter int unsigned PBITS = N - 2,
  parameter int unsigned RUNS  = 1,
  parameter real         FMHZ  = 200.0
) (
  input  logic clk,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned ND = N / K;
  localparam int unsigned AW = $clog2(ND);
  localparam int unsigned EW = ((L + K - 1) / K) * K;

  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic          busy, done;
  logic [K-1:0]  p_prime = '0;
  host_sel_e     host_sel = HOST_R0;
  logic [AW-1:0] host_addr = '0;
  logic          host_we = 1'b0;
  logic [K-1:0]  host_wdata = '0;
  logic [K-1:0]  host_rdata;

  mpl_coproc #(.K(K), .N(N), .L(L)) dut (.*);

  task automatic host_write(host_sel_e sel, int unsigned addr, logic [K-1:0] d);
    @(negedge clk);
    host_sel = sel; host_addr = AW'(addr); host_wdata = d; host_we = 1'b1;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  function automatic logic [N-1:0] rand_n();
    logic [N-1:0] v;
    for (int i = 0; i < (N + 31) / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // a * b mod p, one bit of a at a time (a, b < p)
  function automatic logic [N+1:0] modmul(logic [N+1:0] a, logic [N+1:0] b, logic [N+1:0] p);
    logic [N+1:0] acc;
    acc = '0;
    for (int i = N - 1; i >= 0; i--) begin
      acc = acc << 1;
      if (acc >= p) acc -= p;
      if (a[i]) begin
        acc += b;
        if (acc >= p) acc -= p;
      end
    end
    return acc;
  endfunction

  // x * 2**N mod p (x < p)
  function automatic logic [N+1:0] mulr(logic [N+1:0] x, logic [N+1:0] p);
    for (int i = 0; i < N; i++) begin
      x = x << 1;
      if (x >= p) x -= p;
    end
    return x;
  endfunction

  initial begin
    logic [N-1:0]   p, m;
    logic [EW-1:0]  e;
    logic [N+1:0]   acc, rmod, r1, expect_v, pw, got;
    logic [K-1:0]   inv;
    longint unsigned cyc, want;
    finished = 1'b0;
    checks = 0;
    failures = 0;
    wait (go);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < RUNS; run++) begin
      p = rand_n() & ((N'(1) << PBITS) - 1);
      p[PBITS-1] = 1'b1; p[0] = 1'b1;
      m = rand_n();
      m[N-1:PBITS-1] = '0;
      e = '0;
      e[L-1:0] = L'(rand_n());
      inv = p[K-1:0];
      for (int i = 0; i < 7; i++) inv = K'(inv * (K'(2) - K'(p[K-1:0] * inv)));
      p_prime = K'(-inv);
      pw   = (N+2)'(p);
      acc  = 1;
      for (int b = L - 1; b >= 0; b--) begin
        acc = modmul(acc, acc, pw);
        if (e[b]) acc = modmul(acc, (N+2)'(m), pw);
      end
      expect_v = mulr(acc, pw);
      rmod     = mulr(1, pw);
      r1       = mulr((N+2)'(m), pw);
      for (int i = 0; i < ND; i++) begin
        host_write(HOST_P,  i, p[i*K +: K]);
        host_write(HOST_R0, i, rmod[i*K +: K]);
        host_write(HOST_R1, i, r1[i*K +: K]);
      end
      for (int i = 0; i < EW / K; i++) host_write(HOST_E, i, e[i*K +: K]);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      want = longint'(L) * (longint'(ND) * (ND + 1) + 10) + 2;
      checks++;
      if (cyc != want) begin
        failures++;
        $display("K=%0d N=%0d: %0d cycles, expected %0d", K, N, cyc, want);
      end
      got = '0;
      for (int i = 0; i < ND; i++) begin
        @(negedge clk);
        host_sel = HOST_R0; host_addr = AW'(i);
        @(negedge clk);
        got[i*K +: K] = host_rdata;
      end
      checks++;
      if (got >= 2 * pw || (got >= pw ? got - pw : got) != expect_v) begin
        failures++;
        $display("K=%0d N=%0d: wrong result", K, N);
      end
      $display("K=%0d N=%0d L=%0d modulus %0d bits: %0d cycles, %0d per exponent bit, %0.2f ms at %0.2f MHz",
               K, N, L, PBITS, cyc, (cyc - 2) / L, real'(cyc) / (FMHZ * 1000.0), FMHZ);
    end
    finished = 1'b1;
  end
endmodule
