// tb_mpl_ctrl: checks the ladder control on its own with L = 40 exponent bits
// and K = 16. An exponent memory model answers reads with one cycle of
// latency and a multiplier model answers each mult_start with mult_done
// after a random delay. The exponent bits presented with each mult_start must
// be e_{L-1} .. e_0 in order, phase must flip after every multiplication,
// exactly L multiplications must be started and done must pulse once, two
// cycles after the last mult_done.
module tb_mpl_ctrl;
  localparam int unsigned K = 16, N = 64, L = 40, ND = N / K, AW = $clog2(ND);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, ebit, phase, mult_start, mult_done = 1'b0;
  logic [AW-1:0] e_addr;
  logic [K-1:0] e_rdata;
  logic [K-1:0] emem [ND];
  logic [L-1:0] e;
  int checks = 0, failures = 0;
  int nstart = 0, ndone = 0, bitpos;
  logic last_phase;
  int last_done_cyc = 0, cyc = 0;

  mpl_ctrl #(.K(K), .N(N), .L(L)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) e_rdata <= emem[e_addr];

  // multiplier model
  initial begin
    forever begin
      @(negedge clk);
      if (mult_start) begin
        nstart++;
        checks++;
        if (ebit != e[bitpos]) begin failures++; $display("bit %0d: ebit=%b", bitpos, ebit); end
        checks++;
        if (nstart > 1 && phase == last_phase) begin failures++; $display("phase did not flip"); end
        last_phase = phase;
        bitpos--;
        repeat ($urandom_range(1, 20)) @(negedge clk);
        mult_done = 1'b1;
        last_done_cyc = cyc + 1;
        @(negedge clk);
        mult_done = 1'b0;
      end
    end
  end

  always @(negedge clk) begin
    cyc++;
    if (done) begin
      ndone++;
      checks++;
      if (cyc - last_done_cyc != 2) begin failures++; $display("done %0d cycles after mult_done", cyc - last_done_cyc); end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < ND; i++) emem[i] = K'($urandom);
    for (int b = 0; b < L; b++) e[b] = emem[b / K][b % K];
    bitpos = L - 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    repeat (5) @(negedge clk);
    checks += 3;
    if (nstart != L) begin failures++; $display("%0d multiplications", nstart); end
    if (ndone != 1) begin failures++; $display("%0d done pulses", ndone); end
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
