// mpl_coproc: compact digit-serial modular exponentiation coprocessor.
//
// It computes the Montgomery powering ladder over an L-bit exponent with
// N-bit operands split into n = N/K digits of K bits. Two Montgomery
// datapaths (mont_dp) work side by side, one producing the new R0 and one the
// new R1 of each ladder step; one microcoded control (mont_ctrl) drives both,
// since their addresses and control bits are the same. A ladder control
// (mpl_ctrl) steps through the exponent bits, and the memory routing
// (mem_ctrl) connects the banks R0, R1, R00, R11 (dpram), the modulus memory
// that also holds the microprogram (pmem) and the exponent memory (dpram).
//
// Use: with start low, the host writes the modulus p (digits, least
// significant first, host_sel = HOST_P), the exponent (HOST_E, bit b in digit
// b/K), R0 = R mod p and R1 = m*R mod p (R = 2**N, the Montgomery forms of 1
// and of the base m), and holds p' = -p^-1 mod 2**K on p_prime. A start
// pulse runs the ladder; done pulses at the end and R0 (HOST_R0) then holds
// m^e * R mod p, possibly plus p (it is below 2p). Conversions into and out
// of the Montgomery domain are left to the host. The modulus must be odd and
// below R/4 so that every intermediate result fits n digits; this bound is
// this implementation's own requirement.
// Timing: each exponent bit takes n*(n+1)+10 cycles, n*(n+1)+4 of them the
// microprogram of one Montgomery multiplication.
module mpl_coproc
  import mpl_pkg::*;
#(
  parameter int unsigned K  = 16,     // digit width
  parameter int unsigned N  = 1024,   // operand width
  parameter int unsigned L  = N,      // exponent width
  parameter int unsigned ND = N / K,
  parameter int unsigned AW = $clog2(ND)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  input  logic [K-1:0]  p_prime,
  input  host_sel_e     host_sel,
  input  logic [AW-1:0] host_addr,
  input  logic          host_we,
  input  logic [K-1:0]  host_wdata,
  output logic [K-1:0]  host_rdata
);

  localparam int unsigned UW  = 3 * AW + 4;
  localparam int unsigned MW  = (K > UW) ? K : UW;
  localparam int unsigned PAW = AW + 2;

  logic            mult_start, mult_busy, mult_done;
  logic            ebit, phase;
  logic [AW-1:0]   addr_x, addr_y, addr_p, addr_a, e_addr;
  logic            wr_a, rst_cj, load_qi, mux_cj, a_clr;
  logic [PAW-1:0]  uc_addr;
  logic [MW-1:0]   uc_word;
  logic [K-1:0]    wdata0, wdata1, x0_d, x1_d, y_d, a0_d, a1_d, p_d, e_d;

  logic [3:0][AW-1:0] bk_a_addr, bk_b_addr;
  logic [3:0][K-1:0]  bk_a_rdata, bk_b_rdata, bk_b_wdata;
  logic [3:0]         bk_b_we;
  logic [PAW-1:0]     pm_addr;
  logic               pm_we;
  logic [MW-1:0]      pm_wdata, pm_rdata;
  logic [AW-1:0]      em_a_addr, em_b_addr;
  logic               em_we;
  logic [K-1:0]       em_wdata, em_a_rdata, em_b_rdata;

  mpl_ctrl #(.K(K), .N(N), .L(L), .ND(ND), .AW(AW)) u_mpl_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .e_addr, .e_rdata(e_d),
    .ebit, .phase, .mult_start, .mult_done
  );

  mont_ctrl #(.K(K), .N(N), .ND(ND), .AW(AW), .UW(UW), .MW(MW), .PAW(PAW)) u_mont_ctrl (
    .clk, .rst_n, .start(mult_start), .busy(mult_busy), .done(mult_done),
    .uc_addr, .uc_word,
    .addr_x, .addr_y, .addr_p, .addr_a, .wr_a, .rst_cj, .load_qi, .mux_cj, .a_clr
  );

  mont_dp #(.K(K)) u_dp0 (
    .clk, .x_d(x0_d), .y_d, .a_d(a0_d), .a_clr, .p_d, .p_prime,
    .rst_cj, .load_qi, .mux_cj, .wdata(wdata0)
  );

  mont_dp #(.K(K)) u_dp1 (
    .clk, .x_d(x1_d), .y_d, .a_d(a1_d), .a_clr, .p_d, .p_prime,
    .rst_cj, .load_qi, .mux_cj, .wdata(wdata1)
  );

  mem_ctrl #(.K(K), .AW(AW), .PAW(PAW), .MW(MW)) u_mem_ctrl (
    .clk, .run(busy), .phase, .ebit,
    .addr_x, .addr_y, .addr_p, .addr_a, .wr_a, .e_addr,
    .wdata0, .wdata1, .x0_d, .x1_d, .y_d, .a0_d, .a1_d, .p_d, .e_d,
    .host_sel, .host_addr, .host_we, .host_wdata, .host_rdata,
    .bk_a_addr, .bk_a_rdata, .bk_b_addr, .bk_b_we, .bk_b_wdata, .bk_b_rdata,
    .pm_addr, .pm_we, .pm_wdata, .pm_rdata,
    .em_a_addr, .em_a_rdata, .em_b_addr, .em_we, .em_wdata, .em_b_rdata
  );

  for (genvar b = 0; b < 4; b++) begin : g_bank
    dpram #(.W(K), .AW(AW)) u_bank (
      .clk,
      .a_addr(bk_a_addr[b]), .a_rdata(bk_a_rdata[b]),
      .b_addr(bk_b_addr[b]), .b_we(bk_b_we[b]),
      .b_wdata(bk_b_wdata[b]), .b_rdata(bk_b_rdata[b])
    );
  end

  dpram #(.W(K), .AW(AW)) u_emem (
    .clk,
    .a_addr(em_a_addr), .a_rdata(em_a_rdata),
    .b_addr(em_b_addr), .b_we(em_we), .b_wdata(em_wdata), .b_rdata(em_b_rdata)
  );

  pmem #(.K(K), .N(N), .ND(ND), .AW(AW), .UW(UW), .MW(MW), .PAW(PAW)) u_pmem (
    .clk,
    .a_addr(pm_addr), .a_we(pm_we), .a_wdata(pm_wdata), .a_rdata(pm_rdata),
    .b_addr(uc_addr), .b_rdata(uc_word)
  );

  // Handshake rules: the multiplier control is only started when idle, and
  // the ladder control does not run while the host could be writing.
  a_mult_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                      mult_start |-> !mult_busy);
  a_mult_in_ladder: assert property (@(posedge clk) disable iff (!rst_n)
                                     mult_busy |-> busy);

endmodule
