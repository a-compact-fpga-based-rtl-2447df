// mpl_pkg: types and the microprogram shared by the Montgomery powering-ladder
// coprocessor.
//
// The multiplier control is microcoded. One microword drives one clock cycle of
// both Montgomery datapaths and holds, from the most significant bit down:
//   addr_x (AW bits)  read address of the X operand and of the running result A
//   addr_p (AW bits)  read address of the modulus digit p_j
//   addr_a (AW bits)  write address of the result digit
//   wr_a              write enable of the result memory
//   rst_cj            feed a zero carry into the final adder (c_0 = 0)
//   load_qi           load q_i = s_0 * p' mod beta
//   mux_cj            write the carry register instead of t_j (A_{n-1} <- c_n)
// With n = 64 digits (AW = 6) this is the 22-bit word of the published table,
// e.g. row 0 = 0x0ffb8 and row 4 = 0x30bfd. The program has n+1 rows and is
// replayed n times, once per outer iteration i; the iteration number is the
// address of the Y operand. ucode_row() below gives every row as a formula of
// the row number r and the digit count n; the rows listed in the table follow
// it exactly. The formula for rows the table elides (r = 7 .. n-2) is the
// pattern of the printed rows: x = r-1, p = r-2, a = r-6.
package mpl_pkg;

  // Which memory a host access goes to (R0 and R1 are the ladder registers as
  // the algorithm sees them, whichever physical bank holds them).
  typedef enum logic [1:0] {
    HOST_R0 = 2'd0,
    HOST_R1 = 2'd1,
    HOST_P  = 2'd2,
    HOST_E  = 2'd3
  } host_sel_e;

  // Control bits of a microword (its four least significant bits).
  typedef struct packed {
    logic wr_a;
    logic rst_cj;
    logic load_qi;
    logic mux_cj;
  } mc_flags_t;

  // One row of the microprogram, addresses wide enough for any digit count.
  typedef struct packed {
    logic [15:0] x;
    logic [15:0] p;
    logic [15:0] a;
    mc_flags_t   f;
  } ucode_row_t;

  // Row r (0 .. n) of the microprogram for n digits (n >= 6).
  function automatic ucode_row_t ucode_row(int unsigned r, int unsigned n);
    ucode_row_t u;
    u.f = '0;
    u.f.wr_a = 1'b1;
    case (r)
      0: begin u.x = 16'(0); u.p = 16'(n - 1); u.a = 16'(n - 5); end
      1: begin u.x = 16'(0); u.p = 16'(0);     u.a = 16'(n - 4); end
      2: begin u.x = 16'(1); u.p = 16'(0);     u.a = 16'(n - 3); end
      3: begin u.x = 16'(2); u.p = 16'(1);     u.a = 16'(n - 2);
               u.f.rst_cj = 1'b1; u.f.load_qi = 1'b1; end
      4: begin u.x = 16'(3); u.p = 16'(2);     u.a = 16'(n - 1);
               u.f.rst_cj = 1'b1; u.f.mux_cj = 1'b1; end
      5: begin u.x = 16'(4); u.p = 16'(3);     u.a = 16'(n - 1);
               u.f.wr_a = 1'b0; end
      default: begin u.x = 16'(r - 1); u.p = 16'(r - 2); u.a = 16'(r - 6); end
    endcase
    return u;
  endfunction

endpackage
