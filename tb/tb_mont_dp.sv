// tb_mont_dp: one digit-serial Montgomery multiplier (the datapath with its
// microcoded control, program memory and operand memories) computing
// A = X * Y * R^-1 mod p, R = 2**N, at N = 256, K = 16 (n = 16 digits).
//
// Operands are random below 2p, including the largest allowed values, and
// every fourth product is a squaring that reads X and Y from the same memory
// through its two ports. The result must be congruent to X*Y*R^-1 mod p,
// checked as A*R == X*Y (mod p) with the % operator, and below 2p.
// The multiplication must end n*(n+1)+7 cycles after start.
module tb_mont_dp;
  localparam int unsigned K = 16, N = 256, ND = N / K, AW = $clog2(ND);
  localparam int unsigned UW = 3 * AW + 4, MW = (K > UW) ? K : UW, PAW = AW + 2;
  localparam int unsigned RUNS = 40;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic [PAW-1:0] uc_addr;
  logic [MW-1:0] uc_word, p_rdata;
  logic [AW-1:0] addr_x, addr_y, addr_p, addr_a;
  logic wr_a, rst_cj, load_qi, mux_cj, a_clr;
  logic [K-1:0] x_d, y_d, ya_d, a_d, wdata, p_prime;
  logic square = 1'b0;
  // host side of the memories
  logic ld = 1'b0;
  logic [AW-1:0] ld_addr = '0;
  logic [K-1:0] ld_x = '0, ld_y = '0;
  logic [PAW-1:0] ld_paddr = '0;
  logic [K-1:0] ld_p = '0;
  logic [K-1:0] xb_d, a_b_d;
  int checks = 0, failures = 0;

  mont_ctrl #(.K(K), .N(N)) ctrl (.*);
  pmem #(.K(K), .N(N)) pm (.clk, .a_addr(busy ? PAW'(addr_p) : ld_paddr), .a_we(ld),
                           .a_wdata(MW'(ld_p)), .a_rdata(p_rdata),
                           .b_addr(uc_addr), .b_rdata(uc_word));
  dpram #(.W(K), .AW(AW)) xm (.clk, .a_addr(addr_x), .a_rdata(x_d),
                              .b_addr(busy ? addr_y : ld_addr), .b_we(ld), .b_wdata(ld_x),
                              .b_rdata(xb_d));
  dpram #(.W(K), .AW(AW)) ym (.clk, .a_addr(addr_x), .a_rdata(),
                              .b_addr(busy ? addr_y : ld_addr), .b_we(ld), .b_wdata(ld_y),
                              .b_rdata(ya_d));
  dpram #(.W(K), .AW(AW)) am (.clk, .a_addr(addr_x), .a_rdata(a_d),
                              .b_addr(busy ? addr_a : ld_addr), .b_we(busy && wr_a),
                              .b_wdata(wdata), .b_rdata(a_b_d));
  assign y_d = square ? xb_d : ya_d;

  mont_dp #(.K(K)) dut (.clk, .x_d, .y_d, .a_d, .a_clr, .p_d(p_rdata[K-1:0]), .p_prime,
                        .rst_cj, .load_qi, .mux_cj, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (RUNS * (ND * (ND + 1) + 200) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_n();
    logic [N-1:0] v;
    for (int i = 0; i < N / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    logic [N-1:0] p, x, y;
    logic [2*N-1:0] lhs, rhs, got;
    logic [K-1:0] inv;
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < RUNS; run++) begin
      p = rand_n();
      p[N-1] = 1'b0; p[N-2] = 1'b0; p[N-3] = 1'b1; p[0] = 1'b1;
      x = N'(((2*N)'(rand_n()) % (2 * (2*N)'(p))));
      y = N'(((2*N)'(rand_n()) % (2 * (2*N)'(p))));
      if (run == 1) begin x = 2 * p - 1; y = 2 * p - 1; end
      square = (run % 4 == 3);
      if (square) y = x;
      inv = p[K-1:0];
      for (int i = 0; i < 6; i++) inv = K'(inv * (K'(2) - K'(p[K-1:0] * inv)));
      p_prime = K'(-inv);
      for (int i = 0; i < ND; i++) begin
        @(negedge clk);
        ld = 1'b1; ld_addr = AW'(i); ld_paddr = PAW'(i);
        ld_x = x[i*K +: K]; ld_y = y[i*K +: K]; ld_p = p[i*K +: K];
      end
      @(negedge clk);
      ld = 1'b0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 100000) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != ND * (ND + 1) + 7) begin failures++; $display("latency %0d", cyc); end
      got = '0;
      for (int i = 0; i < ND; i++) begin
        @(negedge clk);
        ld_addr = AW'(i);
        @(negedge clk);
        got[i*K +: K] = a_b_d;
      end
      lhs = ((got % (2*N)'(p)) << N) % (2*N)'(p);
      rhs = ((2*N)'(x) * (2*N)'(y)) % (2*N)'(p);
      checks++;
      if (lhs != rhs || got >= 2 * (2*N)'(p)) begin
        failures++;
        $display("run %0d wrong: A=%h", run, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
