// mont_dp: datapath of the digit-serial Montgomery multiplier.
//
// It computes A = X * Y * beta^-n mod p (beta = 2**K) one digit pair per
// cycle, following the digit-by-digit Montgomery algorithm: for every outer
// step i and digit j,
//   s_j = A_j + X_j * Y_i                 (2K+1-bit register s)
//   q_i = s_0 * p' mod beta               (K-bit register q, once per i)
//   {c_{j+1}, t_j} = s_j + q_i * p_j + c_j (K-bit register t, K+1-bit c)
// and writes t_j back as A_{j-1}, and c_n as A_{n-1}. The operands come from
// the memories digit by digit; the datapath holds no operand. The three
// multipliers, the two adders, the registers s, q, t, c and the write-back
// multiplexer are those of the published datapath.
//
// Timing, in cycles after the memories see the address of X_j (cycle 0):
//   1  X_j, A_j and Y_i arrive; s_j is computed and registered
//   2  s_j in s; with load_qi, q_i = s_0 * p' is registered; p_j arrives;
//      s_j and p_j are copied into the pipeline registers s_d and p_d
//   3  t_j and c_{j+1} are computed from s_d, q_i * p_d and c_j and registered
//   4  wdata carries t_j (or, with mux_cj, c_n) to the result memory
// The extra registers s_d and p_d are this implementation's; they let q_i,
// which depends on s_0, be ready for q_i * p_0. The control bits act in the
// cycle they are presented: rst_cj feeds a zero carry in place of c, and
// during load_qi (the one cycle per outer step with no digit in the final
// adder) c keeps c_n so that the next cycle can write it with mux_cj; that
// hold is this implementation's reading of the microprogram. a_clr (aligned
// with the read data) replaces A_j by zero in the first outer step (A = 0).
module mont_dp #(
  parameter int unsigned K = 16   // digit width
) (
  input  logic         clk,
  input  logic [K-1:0] x_d,      // X_j from the X memory
  input  logic [K-1:0] y_d,      // Y_i from the Y memory
  input  logic [K-1:0] a_d,      // A_j from the result memory
  input  logic         a_clr,    // treat A_j as zero (first outer step)
  input  logic [K-1:0] p_d,      // p_j from the modulus memory
  input  logic [K-1:0] p_prime,  // p' = -p^-1 mod 2**K
  input  logic         rst_cj,
  input  logic         load_qi,
  input  logic         mux_cj,
  output logic [K-1:0] wdata     // digit to write to the result memory
);

  logic [2*K:0]   s_q, s_d;
  logic [K-1:0]   p_dq;
  logic [K-1:0]   q_q;
  logic [K-1:0]   t_q;
  logic [K:0]     c_q;

  logic [2*K-1:0] xy;
  logic [K-1:0]   qs;
  logic [2*K-1:0] qp;
  logic [K:0]     c_in;
  logic [2*K:0]   sum;   // s_j + q*p_j + c_j < 2**(2K+1)

  always_comb begin
    xy   = x_d * y_d;
    qs   = K'(s_q[K-1:0] * p_prime);
    qp   = q_q * p_dq;
    c_in = rst_cj ? '0 : c_q;
    sum  = s_d + (2*K+1)'(qp) + (2*K+1)'(c_in);
  end

  always_ff @(posedge clk) begin
    s_q  <= (2*K+1)'(xy) + (2*K+1)'(a_clr ? '0 : a_d);
    s_d  <= s_q;
    p_dq <= p_d;
    if (load_qi) q_q <= qs;
    t_q  <= sum[K-1:0];
    if (!load_qi) c_q <= sum[2*K:K];
  end

  assign wdata = mux_cj ? c_q[K-1:0] : t_q;

endmodule
