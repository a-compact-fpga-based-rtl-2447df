// tb_mont_ctrl: checks the microcoded multiplier control with its program
// memory at the default size (n = 64 digits).
//
// One multiplication is started and every executed microword is compared
// with the expected sequence: the n+1 rows of the published table repeated
// for the n outer steps, then rows 0..4 once more. Expected values come from
// the row pattern of the table written out here, not from the package.
// Also checked: the Y address equals the outer step, writes of rows 0..4 of
// the first step are suppressed, a_clr marks exactly the reads of the first
// step, and done pulses n*(n+1)+7 cycles after start, so the program itself
// spans n*(n+1)+4 cycles from first to last row.
module tb_mont_ctrl;
  localparam int unsigned K = 16, N = 1024, ND = N / K, AW = 6;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic [7:0] uc_addr;
  logic [21:0] uc_word;
  logic [AW-1:0] addr_x, addr_y, addr_p, addr_a;
  logic wr_a, rst_cj, load_qi, mux_cj, a_clr;
  int checks = 0, failures = 0;

  mont_ctrl ctrl (.*);
  pmem mem (.clk, .a_addr(8'd0), .a_we(1'b0), .a_wdata('0), .a_rdata(),
            .b_addr(uc_addr), .b_rdata(uc_word));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {int x; int p; int a; bit wr; bit rst; bit ld; bit mx;} row_t;

  function automatic row_t exp_row(int r);
    row_t e;
    e = '{x: r - 1, p: r - 2, a: r - 6, wr: 1, rst: 0, ld: 0, mx: 0};
    if (r == 0) e = '{0, 63, 59, 1, 0, 0, 0};
    if (r == 1) e = '{0, 0, 60, 1, 0, 0, 0};
    if (r == 2) e = '{1, 0, 61, 1, 0, 0, 0};
    if (r == 3) e = '{2, 1, 62, 1, 1, 1, 0};
    if (r == 4) e = '{3, 2, 63, 1, 1, 0, 1};
    if (r == 5) e = '{4, 3, 63, 0, 0, 0, 0};
    return e;
  endfunction

  initial begin
    int cyc, exec, step, r, n_clr, exp_clr;
    bit first_clr;
    row_t e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1; exec = 0; n_clr = 0;
    while (!done && cyc < 10000) begin
      // a microword executes in the second cycle after start and on
      if (cyc >= 2 && exec < ND * (ND + 1) + 5) begin
        step = exec / (ND + 1);
        r = exec % (ND + 1);
        e = exp_row(r);
        checks++;
        if (addr_x != AW'(e.x) || addr_p != AW'(e.p) || rst_cj != e.rst || load_qi != e.ld
            || (wr_a && mux_cj) != (e.wr && e.mx && !(step == 0))
            || wr_a != (e.wr && !(step == 0 && r < 5))
            || (wr_a && addr_a != AW'(e.a))) begin
          failures++;
          $display("step %0d row %0d: x=%0d p=%0d a=%0d wr=%b rst=%b ld=%b mux=%b", step, r,
                   addr_x, addr_p, addr_a, wr_a, rst_cj, load_qi, mux_cj);
        end
        if (step < ND) begin
          checks++;
          if (addr_y != AW'(step)) begin failures++; $display("addr_y %0d at step %0d", addr_y, step); end
        end
        exec++;
      end
      @(negedge clk);
      cyc++;
      if (a_clr) n_clr++;
    end
    checks++;
    if (cyc != ND * (ND + 1) + 7) begin failures++; $display("done after %0d cycles", cyc); end
    checks++;
    exp_clr = ND + 1;
    if (n_clr != exp_clr) begin failures++; $display("a_clr for %0d cycles", n_clr); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
