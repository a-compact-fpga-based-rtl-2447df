// tb_mpl_coproc: end-to-end test of the exponentiation coprocessor at a
// reduced operand size (N = 128, K = 16, so n = 8 digits, 128-bit exponent).
//
// For each run it draws an odd modulus p with 2**(N-3) <= p < 2**(N-2), a
// base m < p and an exponent, loads p, the exponent and the Montgomery forms
// R mod p and m*R mod p through the host port, starts the ladder and reads R0
// back. The expected value m^e * R mod p is computed here with plain
// square-and-multiply and the % operator, independently of Montgomery
// arithmetic. It also checks the run time, L*(n*(n+1)+10)+2 cycles from start
// to done, and counts the mechanisms of the design: ladder steps with bit 0
// and bit 1, both ping-pong phases, loading q_i, writing the top digit c_n,
// and a non-zero top digit.
module tb_mpl_coproc;
  import mpl_pkg::*;

  localparam int unsigned K  = 16;
  localparam int unsigned N  = 128;
  localparam int unsigned L  = N;
  localparam int unsigned ND = N / K;
  localparam int unsigned AW = $clog2(ND);
  localparam int unsigned RUNS = 6;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic          busy, done;
  logic [K-1:0]  p_prime = '0;
  host_sel_e     host_sel = HOST_R0;
  logic [AW-1:0] host_addr = '0;
  logic          host_we = 1'b0;
  logic [K-1:0]  host_wdata = '0;
  logic [K-1:0]  host_rdata;

  int checks = 0, failures = 0;
  int n_bit0 = 0, n_bit1 = 0, n_phase0 = 0, n_phase1 = 0;
  int n_loadq = 0, n_cn = 0, n_cn_nz = 0;

  mpl_coproc #(.K(K), .N(N), .L(L)) dut (.*);

  always #5 clk = ~clk;

  // mechanism counters, sampled away from the active edge
  always @(negedge clk) begin
    if (dut.mult_start) begin
      if (dut.ebit) n_bit1++; else n_bit0++;
      if (dut.phase) n_phase1++; else n_phase0++;
    end
    if (dut.load_qi) n_loadq++;
    if (dut.wr_a && dut.mux_cj) begin
      n_cn++;
      if (dut.wdata0 != '0 || dut.wdata1 != '0) n_cn_nz++;
    end
  end

  initial begin
    repeat (L * (ND * (ND + 1) + 10) * RUNS + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(host_sel_e sel, int unsigned addr, logic [K-1:0] d);
    @(negedge clk);
    host_sel = sel; host_addr = AW'(addr); host_wdata = d; host_we = 1'b1;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic host_read(host_sel_e sel, int unsigned addr, output logic [K-1:0] d);
    @(negedge clk);
    host_sel = sel; host_addr = AW'(addr); host_we = 1'b0;
    @(negedge clk);
    d = host_rdata;
  endtask

  function automatic logic [N-1:0] rand_n();
    logic [N-1:0] v;
    for (int i = 0; i < N / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic run_one(logic [N-1:0] p, logic [N-1:0] m, logic [L-1:0] e);
    logic [2*N-1:0] acc, base, rmod, r1, expect_v, got;
    logic [K-1:0]   inv, d;
    int unsigned    cyc;

    // p' = -p^-1 mod 2**K by Newton iteration
    inv = p[K-1:0];
    for (int i = 0; i < 6; i++) inv = K'(inv * (K'(2) - K'(p[K-1:0] * inv)));
    p_prime = K'(-inv);

    // reference m^e mod p, then its Montgomery form
    acc  = 1;
    base = (2*N)'(m) % (2*N)'(p);
    for (int b = L - 1; b >= 0; b--) begin
      acc = (acc * acc) % (2*N)'(p);
      if (e[b]) acc = (acc * base) % (2*N)'(p);
    end
    expect_v = (acc << N) % (2*N)'(p);
    rmod     = ((2*N)'(1) << N) % (2*N)'(p);
    r1       = ((2*N)'(m) << N) % (2*N)'(p);

    for (int i = 0; i < ND; i++) begin
      host_write(HOST_P,  i, p[i*K +: K]);
      host_write(HOST_R0, i, rmod[i*K +: K]);
      host_write(HOST_R1, i, r1[i*K +: K]);
    end
    for (int i = 0; i < L / K; i++) host_write(HOST_E, i, e[i*K +: K]);

    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != L * (ND * (ND + 1) + 10) + 2) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, L * (ND * (ND + 1) + 10) + 2);
    end

    got = '0;
    for (int i = 0; i < ND; i++) begin
      host_read(HOST_R0, i, d);
      got[i*K +: K] = d;
    end
    checks++;
    if (got >= 2 * (2*N)'(p) || got % (2*N)'(p) != expect_v) begin
      failures++;
      $display("wrong result:\n got %h\n exp %h", got, expect_v);
    end
  endtask

  initial begin
    logic [N-1:0] p, m;
    logic [L-1:0] e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < RUNS; r++) begin
      p = rand_n();
      p[N-1] = 1'b0; p[N-2] = 1'b0; p[N-3] = 1'b1; p[0] = 1'b1;
      m = rand_n() % p;
      e = L'(rand_n());
      if (r == 0) e = '1;          // only bit-1 steps
      if (r == 1) e = L'(1);       // mostly bit-0 steps
      if (r == 2) m = 1;
      run_one(p, m, e);
    end
    checks++; if (n_bit0 == 0) begin failures++; $display("no bit-0 step"); end
    checks++; if (n_bit1 == 0) begin failures++; $display("no bit-1 step"); end
    checks++; if (n_phase0 == 0 || n_phase1 == 0) begin failures++; $display("phase not swapped"); end
    checks++; if (n_loadq == 0) begin failures++; $display("q_i never loaded"); end
    checks++; if (n_cn == 0) begin failures++; $display("c_n never written"); end
    checks++; if (n_cn_nz == 0) begin failures++; $display("c_n always zero"); end
    $display("steps: bit0=%0d bit1=%0d phase0=%0d phase1=%0d loadq=%0d cn=%0d cn_nonzero=%0d",
             n_bit0, n_bit1, n_phase0, n_phase1, n_loadq, n_cn, n_cn_nz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
