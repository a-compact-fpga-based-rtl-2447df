// dpram: dual-port digit memory, one operand digit per word, as held in a
// block RAM (the R0, R1, R00 and R11 memories and the exponent memory).
//
// Port A is read-only and port B reads and writes. Both read synchronously:
// the word addressed in one cycle appears on the read data output in the next.
// Port B is read-first: a write returns the old word. The digit-serial
// multiplier reads the X operand and the running result A through port A and
// either the Y operand or the result write-back through port B; that two ports
// are needed (a squaring reads one operand at two addresses) follows the
// coprocessor's design, the port roles and read-first behaviour are this
// implementation's choice. The memory is not reset.
module dpram #(
  parameter int unsigned W  = 16,  // word (digit) width in bits
  parameter int unsigned AW = 6    // address width, 2**AW words
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  output logic [W-1:0]  a_rdata,
  input  logic [AW-1:0] b_addr,
  input  logic          b_we,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[b_addr];
    if (b_we) mem[b_addr] <= b_wdata;
  end

endmodule
