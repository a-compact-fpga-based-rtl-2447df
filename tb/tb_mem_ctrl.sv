// tb_mem_ctrl: checks the memory routing with random inputs in every
// combination of run, phase and exponent bit. Expected routing, written out
// here: bank 0 = R0, 1 = R1, 2 = R00, 3 = R11; with phase 0 the operands are
// in banks 0 and 1 and results go to banks 2 and 3, with phase 1 the other way
// round; Y is R1 for bit 1 and R0 for bit 0; when idle the host port reaches
// the operand banks, the modulus memory and the exponent memory.
module tb_mem_ctrl;
  import mpl_pkg::*;
  localparam int unsigned K = 16, AW = 6, PAW = 8, MW = 22;
  logic clk = 1'b0;
  logic run, phase, ebit, wr_a, host_we;
  logic [AW-1:0] addr_x, addr_y, addr_p, addr_a, e_addr, host_addr;
  logic [K-1:0] wdata0, wdata1, x0_d, x1_d, y_d, a0_d, a1_d, p_d, e_d, host_wdata, host_rdata;
  host_sel_e host_sel;
  logic [3:0][AW-1:0] bk_a_addr, bk_b_addr;
  logic [3:0][K-1:0] bk_a_rdata, bk_b_rdata, bk_b_wdata;
  logic [3:0] bk_b_we;
  logic [PAW-1:0] pm_addr;
  logic pm_we, em_we;
  logic [MW-1:0] pm_wdata, pm_rdata;
  logic [AW-1:0] em_a_addr, em_b_addr;
  logic [K-1:0] em_wdata, em_a_rdata, em_b_rdata;
  int checks = 0, failures = 0;

  mem_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("%s (run=%b phase=%b ebit=%b)", what, run, phase, ebit); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int o0, o1, n0, n1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      {run, phase, ebit} = 3'(t % 8);
      wr_a = 1'($urandom); host_we = 1'($urandom);
      host_sel = host_sel_e'($urandom_range(0, 3));
      addr_x = AW'($urandom); addr_y = AW'($urandom); addr_p = AW'($urandom);
      addr_a = AW'($urandom); e_addr = AW'($urandom); host_addr = AW'($urandom);
      wdata0 = K'($urandom); wdata1 = K'($urandom); host_wdata = K'($urandom);
      for (int b = 0; b < 4; b++) begin bk_a_rdata[b] = K'($urandom); bk_b_rdata[b] = K'($urandom); end
      pm_rdata = MW'($urandom); em_a_rdata = K'($urandom); em_b_rdata = K'($urandom);
      #1;
      o0 = phase ? 2 : 0; o1 = phase ? 3 : 1; n0 = phase ? 0 : 2; n1 = phase ? 1 : 3;
      chk(x0_d == bk_a_rdata[o0] && x1_d == bk_a_rdata[o1], "X routing");
      chk(a0_d == bk_a_rdata[n0] && a1_d == bk_a_rdata[n1], "A routing");
      chk(y_d == (ebit ? bk_b_rdata[o1] : bk_b_rdata[o0]), "Y routing");
      chk(p_d == pm_rdata[K-1:0] && e_d == em_a_rdata && em_a_addr == e_addr, "p/e data");
      for (int b = 0; b < 4; b++) chk(bk_a_addr[b] == addr_x, "port A address");
      if (run) begin
        chk(bk_b_addr[o0] == addr_y && bk_b_addr[o1] == addr_y && !bk_b_we[o0] && !bk_b_we[o1],
            "operand port B");
        chk(bk_b_addr[n0] == addr_a && bk_b_addr[n1] == addr_a && bk_b_we[n0] == wr_a
            && bk_b_we[n1] == wr_a && bk_b_wdata[n0] == wdata0 && bk_b_wdata[n1] == wdata1,
            "result port B");
        chk(pm_addr == PAW'(addr_p) && !pm_we && !em_we, "p/e addresses");
      end else begin
        chk(bk_b_we[o0] == (host_we && host_sel == HOST_R0)
            && bk_b_we[o1] == (host_we && host_sel == HOST_R1)
            && !bk_b_we[n0] && !bk_b_we[n1], "host write enables");
        chk(bk_b_addr[o0] == host_addr && bk_b_wdata[o0] == host_wdata, "host bank access");
        chk(pm_we == (host_we && host_sel == HOST_P) && pm_addr == PAW'(host_addr)
            && pm_wdata[K-1:0] == host_wdata, "host p access");
        chk(em_we == (host_we && host_sel == HOST_E) && em_b_addr == host_addr
            && em_wdata == host_wdata, "host e access");
      end
      // host read data follows the select of the previous cycle
      @(posedge clk);
      #1;
      case (host_sel)
        HOST_R0: chk(host_rdata == bk_b_rdata[o0], "host read R0");
        HOST_R1: chk(host_rdata == bk_b_rdata[o1], "host read R1");
        HOST_P:  chk(host_rdata == pm_rdata[K-1:0], "host read p");
        HOST_E:  chk(host_rdata == em_b_rdata, "host read e");
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
