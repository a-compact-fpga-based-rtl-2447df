// tb_pmem: checks the modulus/microprogram memory at its default size
// (n = 64 digits). The microprogram words are compared with the 22-bit
// values of the published microcode table (rows 0 to 6 and the last two
// rows), and the other rows with the field pattern of the table. Port A
// writes and reads back modulus digits while port B reads the program.
module tb_pmem;
  localparam int unsigned K = 16, N = 1024, ND = N / K, AW = 6, UW = 22, MW = 22, PAW = 8;
  logic clk = 1'b0;
  logic [PAW-1:0] a_addr = '0, b_addr = '0;
  logic a_we = 1'b0;
  logic [MW-1:0] a_wdata = '0, a_rdata, b_rdata;
  logic [K-1:0] pd [ND];
  int checks = 0, failures = 0;

  // published microwords of rows 0..6, 63, 64
  logic [21:0] table_words [9] = '{22'h00ffb8, 22'h003c8, 22'h103d8, 22'h207ee, 22'h30bfd,
                                   22'h40ff0, 22'h51008, 22'h3ef798, 22'h3ffba8};
  int unsigned table_rows [9] = '{0, 1, 2, 3, 4, 5, 6, 63, 64};

  pmem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [21:0] pattern_word(int unsigned r);
    return {6'(r - 1), 6'(r - 2), 6'(r - 6), 4'b1000};
  endfunction

  initial begin
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      b_addr = PAW'(ND + table_rows[i]);
      @(negedge clk);
      checks++;
      if (b_rdata != table_words[i]) begin
        failures++; $display("row %0d: %h, table %h", table_rows[i], b_rdata, table_words[i]);
      end
    end
    for (int r = 7; r < 63; r++) begin
      @(negedge clk);
      b_addr = PAW'(ND + r);
      @(negedge clk);
      checks++;
      if (b_rdata != pattern_word(r)) begin
        failures++; $display("row %0d: %h, expected %h", r, b_rdata, pattern_word(r));
      end
    end
    for (int i = 0; i < ND; i++) begin
      @(negedge clk);
      pd[i] = K'($urandom); a_addr = PAW'(i); a_we = 1'b1; a_wdata = MW'(pd[i]);
      b_addr = PAW'(ND + (i % (ND + 1)));
    end
    @(negedge clk);
    a_we = 1'b0;
    for (int i = 0; i < ND; i++) begin
      @(negedge clk);
      a_addr = PAW'(i);
      @(negedge clk);
      checks++;
      if (a_rdata != MW'(pd[i])) begin failures++; $display("p[%0d] %h exp %h", i, a_rdata, pd[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
