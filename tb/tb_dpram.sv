// tb_dpram: random test of the dual-port digit memory against an array model:
// port B writes and reads (read-first), port A reads concurrently, both with
// one cycle of read latency.
module tb_dpram;
  localparam int unsigned W = 16, AW = 5;
  logic clk = 1'b0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic b_we = 1'b0;
  logic [W-1:0] b_wdata = '0, a_rdata, b_rdata;
  logic [W-1:0] model [2**AW];
  logic [W-1:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  dpram #(.W(W), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      b_addr = AW'(i); b_we = 1'b1; b_wdata = W'($urandom); model[i] = b_wdata;
    end
    @(negedge clk);
    b_we = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      a_addr = AW'($urandom); b_addr = AW'($urandom); b_we = 1'($urandom);
      b_wdata = W'($urandom);
      exp_a = model[a_addr];
      exp_b = model[b_addr];
      if (b_we) model[b_addr] = b_wdata;
      @(posedge clk);
      #1;
      checks += 2;
      if (a_rdata != exp_a) begin failures++; $display("port A %h exp %h", a_rdata, exp_a); end
      if (b_rdata != exp_b) begin failures++; $display("port B %h exp %h", b_rdata, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
