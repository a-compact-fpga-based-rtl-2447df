// pmem: the modulus memory, which also holds the microprogram.
//
// One block RAM serves two purposes: its first n words hold the digits p_0 ..
// p_{n-1} of the modulus, read by the datapaths through port A, and the n+1
// words from address n on hold the microprogram of the multiplier control,
// read through port B. Sharing the modulus memory with the microprogram this
// way follows the coprocessor's design; the layout (modulus first, program
// after it) and the word width (the wider of a digit and a microword, digits
// in the low bits) are this implementation's choice.
//
// The microprogram is the memory's initial content, computed by
// mpl_pkg::ucode_row(), as an FPGA block RAM is initialised with the
// bitstream. Port A can also write (the host loads the modulus and could
// replace the program). Reads are synchronous, one cycle of latency, and
// read-first on port A.
module pmem
  import mpl_pkg::*;
#(
  parameter int unsigned K  = 16,             // digit width
  parameter int unsigned N  = 1024,           // operand width
  parameter int unsigned ND = N / K,          // digits per operand
  parameter int unsigned AW = $clog2(ND),     // digit address width
  parameter int unsigned UW = 3 * AW + 4,     // microword width
  parameter int unsigned MW = (K > UW) ? K : UW,  // memory word width
  parameter int unsigned PAW = AW + 2         // memory address width
) (
  input  logic           clk,
  // port A: modulus digits (and host writes)
  input  logic [PAW-1:0] a_addr,
  input  logic           a_we,
  input  logic [MW-1:0]  a_wdata,
  output logic [MW-1:0]  a_rdata,
  // port B: microprogram
  input  logic [PAW-1:0] b_addr,
  output logic [MW-1:0]  b_rdata
);

  localparam int unsigned DEPTH = 2 * ND + 1;

  logic [MW-1:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      mem[i] = '0;
    end
    for (int unsigned r = 0; r <= ND; r++) begin
      ucode_row_t u;
      u = ucode_row(r, ND);
      mem[ND + r] = MW'({u.x[AW-1:0], u.p[AW-1:0], u.a[AW-1:0], u.f});
    end
  end

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    if (a_we) mem[a_addr] <= a_wdata;
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[b_addr];
  end

endmodule
