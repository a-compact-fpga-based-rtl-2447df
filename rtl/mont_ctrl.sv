// mont_ctrl: microcoded control of the two Montgomery datapaths.
//
// Every cycle of a multiplication is driven by one microword read from the
// microprogram region of the modulus memory (see mpl_pkg). The control only
// counts: a row counter walks through the n+1 rows of the program and an
// iteration counter, which is also the address of the Y operand digit Y_i,
// counts the n outer steps. After the last outer step rows 0 to 4 are
// replayed once more to write the last five result digits, which the
// pipeline delivers during the first rows of the next pass. Both datapaths of
// the ladder receive the same addresses and control bits. Replaying the
// program of one outer step n times and using the Y address as the repeat
// counter follows the coprocessor's design; the start/busy/done handshake is
// this implementation's.
//
// Timing: start is sampled in an idle cycle; the row address goes to the
// program memory one cycle later and the microword is executed (its fields
// drive the outputs) the cycle after that. The program runs n*(n+1)+5 rows,
// so the last row executes n*(n+1)+4 cycles after the first, and done pulses
// for one cycle n*(n+1)+7 cycles after the start cycle, when the last result
// digit has been written. Writes of rows 0 to 4 in the first outer step
// belong to no earlier step and are suppressed. a_clr is aligned with the
// memory read data, one cycle after the read address.
module mont_ctrl
  import mpl_pkg::*;
#(
  parameter int unsigned K   = 16,
  parameter int unsigned N   = 1024,
  parameter int unsigned ND  = N / K,
  parameter int unsigned AW  = $clog2(ND),
  parameter int unsigned UW  = 3 * AW + 4,
  parameter int unsigned MW  = (K > UW) ? K : UW,
  parameter int unsigned PAW = AW + 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // microprogram memory
  output logic [PAW-1:0] uc_addr,
  input  logic [MW-1:0]  uc_word,
  // to the memories and datapaths
  output logic [AW-1:0]  addr_x,
  output logic [AW-1:0]  addr_y,
  output logic [AW-1:0]  addr_p,
  output logic [AW-1:0]  addr_a,
  output logic           wr_a,
  output logic           rst_cj,
  output logic           load_qi,
  output logic           mux_cj,
  output logic           a_clr
);

  localparam int unsigned RW = $clog2(ND + 1);

  // issue stage
  logic          run;
  logic [RW-1:0] row;
  logic [AW-1:0] iter;
  logic          flush;
  // execute stage
  logic          ex_valid;
  logic [RW-1:0] ex_row;
  logic [AW-1:0] ex_iter;
  logic          ex_flush;
  logic          ex_last;

  mc_flags_t     f;

  assign uc_addr = PAW'(ND) + PAW'(row);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= 1'b0;
      row   <= '0;
      iter  <= '0;
      flush <= 1'b0;
    end else if (!run) begin
      if (start && !busy) begin
        run   <= 1'b1;
        row   <= '0;
        iter  <= '0;
        flush <= 1'b0;
      end
    end else if (flush) begin
      if (row == RW'(4)) run <= 1'b0;
      else               row <= row + 1'b1;
    end else if (row == RW'(ND)) begin
      row <= '0;
      if (iter == AW'(ND - 1)) flush <= 1'b1;
      else                     iter  <= iter + 1'b1;
    end else begin
      row <= row + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      ex_row   <= '0;
      ex_iter  <= '0;
      ex_flush <= 1'b0;
      a_clr    <= 1'b0;
      done     <= 1'b0;
    end else begin
      ex_valid <= run;
      ex_row   <= row;
      ex_iter  <= iter;
      ex_flush <= flush;
      a_clr    <= ex_valid && !ex_flush && (ex_iter == '0);
      done     <= ex_last;
    end
  end

  assign ex_last = ex_valid && ex_flush && (ex_row == RW'(4));
  assign busy    = run || ex_valid || done;

  // microword fields: {addr_x, addr_p, addr_a, wr_a, rst_cj, load_qi, mux_cj}
  assign f       = uc_word[3:0];
  assign addr_x  = uc_word[3*AW+3 -: AW];
  assign addr_p  = uc_word[2*AW+3 -: AW];
  assign addr_a  = uc_word[AW+3 -: AW];
  assign addr_y  = ex_iter;
  assign wr_a    = ex_valid && f.wr_a
                   && !(!ex_flush && ex_iter == '0 && ex_row < RW'(5));
  assign rst_cj  = ex_valid && f.rst_cj;
  assign load_qi = ex_valid && f.load_qi;
  assign mux_cj  = f.mux_cj;

endmodule
