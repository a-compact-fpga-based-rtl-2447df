// mem_ctrl: routing between the memories, the datapaths and the host.
//
// The ladder keeps R0 and R1 in two of four physical banks and writes the
// new R0 and R1 into the other two (R00 and R11); phase says which pair holds
// the operands. While a ladder runs (run = 1):
//   - port A of every bank reads at addr_x: X_j from the operand banks and
//     A_j from the result banks;
//   - port B of the operand banks reads at addr_y, and the Y operand is taken
//     from R1 when the exponent bit is one and from R0 when it is zero;
//   - port B of the result banks writes the datapath outputs at addr_a;
//   - the modulus memory reads p_j at addr_p; the ladder control reads the
//     exponent memory through its port A.
// When idle, the host reaches R0, R1 (through phase, so it always sees the
// ladder's R0 and R1), the modulus and the exponent through one port; its
// read data comes one cycle after the address.
// Which bank pairs feed which multiplier follows the coprocessor's design;
// the bank numbering (0: R0, 1: R1, 2: R00, 3: R11) and the host port are
// this implementation's. Purely combinational except for the registered
// host read select.
module mem_ctrl
  import mpl_pkg::*;
#(
  parameter int unsigned K   = 16,
  parameter int unsigned AW  = 6,
  parameter int unsigned PAW = AW + 2,
  parameter int unsigned MW  = 22
) (
  input  logic                clk,
  input  logic                run,
  input  logic                phase,
  input  logic                ebit,
  // multiplier control
  input  logic [AW-1:0]       addr_x,
  input  logic [AW-1:0]       addr_y,
  input  logic [AW-1:0]       addr_p,
  input  logic [AW-1:0]       addr_a,
  input  logic                wr_a,
  input  logic [AW-1:0]       e_addr,
  // datapaths
  input  logic [K-1:0]        wdata0,
  input  logic [K-1:0]        wdata1,
  output logic [K-1:0]        x0_d,
  output logic [K-1:0]        x1_d,
  output logic [K-1:0]        y_d,
  output logic [K-1:0]        a0_d,
  output logic [K-1:0]        a1_d,
  output logic [K-1:0]        p_d,
  output logic [K-1:0]        e_d,
  // host
  input  host_sel_e           host_sel,
  input  logic [AW-1:0]       host_addr,
  input  logic                host_we,
  input  logic [K-1:0]        host_wdata,
  output logic [K-1:0]        host_rdata,
  // the four banks
  output logic [3:0][AW-1:0]  bk_a_addr,
  input  logic [3:0][K-1:0]   bk_a_rdata,
  output logic [3:0][AW-1:0]  bk_b_addr,
  output logic [3:0]          bk_b_we,
  output logic [3:0][K-1:0]   bk_b_wdata,
  input  logic [3:0][K-1:0]   bk_b_rdata,
  // modulus memory, port A
  output logic [PAW-1:0]      pm_addr,
  output logic                pm_we,
  output logic [MW-1:0]       pm_wdata,
  input  logic [MW-1:0]       pm_rdata,
  // exponent memory: port A for the ladder control, port B for the host
  output logic [AW-1:0]       em_a_addr,
  input  logic [K-1:0]        em_a_rdata,
  output logic [AW-1:0]       em_b_addr,
  output logic                em_we,
  output logic [K-1:0]        em_wdata,
  input  logic [K-1:0]        em_b_rdata
);

  logic [1:0] r0c, r1c, r0n, r1n;   // operand and result banks of R0 and R1
  host_sel_e  host_sel_q;

  assign r0c = phase ? 2'd2 : 2'd0;
  assign r1c = phase ? 2'd3 : 2'd1;
  assign r0n = phase ? 2'd0 : 2'd2;
  assign r1n = phase ? 2'd1 : 2'd3;

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      bk_a_addr[b]  = addr_x;
      bk_b_addr[b]  = run ? addr_y : host_addr;
      bk_b_we[b]    = 1'b0;
      bk_b_wdata[b] = host_wdata;
    end
    if (run) begin
      bk_b_addr[r0n]  = addr_a;
      bk_b_addr[r1n]  = addr_a;
      bk_b_we[r0n]    = wr_a;
      bk_b_we[r1n]    = wr_a;
      bk_b_wdata[r0n] = wdata0;
      bk_b_wdata[r1n] = wdata1;
    end else begin
      bk_b_we[r0c] = host_we && (host_sel == HOST_R0);
      bk_b_we[r1c] = host_we && (host_sel == HOST_R1);
    end

    pm_addr  = run ? PAW'(addr_p) : PAW'(host_addr);
    pm_we    = !run && host_we && (host_sel == HOST_P);
    pm_wdata = MW'(host_wdata);
    em_a_addr = e_addr;
    em_b_addr = host_addr;
    em_we    = !run && host_we && (host_sel == HOST_E);
    em_wdata = host_wdata;

    x0_d = bk_a_rdata[r0c];
    x1_d = bk_a_rdata[r1c];
    a0_d = bk_a_rdata[r0n];
    a1_d = bk_a_rdata[r1n];
    y_d  = ebit ? bk_b_rdata[r1c] : bk_b_rdata[r0c];
    p_d  = pm_rdata[K-1:0];
    e_d  = em_a_rdata;

    unique case (host_sel_q)
      HOST_R0: host_rdata = bk_b_rdata[r0c];
      HOST_R1: host_rdata = bk_b_rdata[r1c];
      HOST_P:  host_rdata = pm_rdata[K-1:0];
      HOST_E:  host_rdata = em_b_rdata;
      default: host_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    host_sel_q <= host_sel;
  end

endmodule
