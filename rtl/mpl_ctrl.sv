// mpl_ctrl: control of the Montgomery powering ladder.
//
// It runs the ladder R0 <- R0*R1, R1 <- R1*R1 (exponent bit 1) or
// R0 <- R0*R0, R1 <- R1*R0 (bit 0) over the exponent bits e_{L-1} .. e_0.
// Each step is one pair of Montgomery multiplications done side by side by
// the two datapaths under the shared multiplier control. For each bit it
// reads the exponent digit that holds it, presents the bit as ebit (it
// selects the Y operand: R1 for a one, R0 for a zero), pulses mult_start and
// waits for mult_done; then it flips phase, which swaps the roles of the
// operand banks (R0, R1) and the result banks (R00, R11). The ladder itself
// follows the coprocessor's design; the exponent memory, its bit order (bit
// b in digit b / K, bit b mod K) and the handshake are this
// implementation's choices.
//
// Timing: per exponent bit, two cycles (digit read, bit latch) plus the
// multiplication; done pulses one cycle after the last multiplication ends.
// phase is not reset by start: the host addresses R0 and R1 through it, so it
// stays valid across runs.
module mpl_ctrl #(
  parameter int unsigned K  = 16,
  parameter int unsigned N  = 1024,
  parameter int unsigned L  = N,          // exponent bits
  parameter int unsigned ND = N / K,
  parameter int unsigned AW = $clog2(ND),
  parameter int unsigned BW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // exponent memory
  output logic [AW-1:0] e_addr,
  input  logic [K-1:0]  e_rdata,
  // ladder step
  output logic          ebit,
  output logic          phase,
  output logic          mult_start,
  input  logic          mult_done
);

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_LATCH, S_MULT, S_DONE
  } state_e;

  state_e        state;
  logic [BW-1:0] bidx;

  assign e_addr = AW'(32'(bidx) / K);
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      bidx       <= '0;
      ebit       <= 1'b0;
      phase      <= 1'b0;
      mult_start <= 1'b0;
      done       <= 1'b0;
    end else begin
      mult_start <= 1'b0;
      done       <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          bidx  <= BW'(L - 1);
          state <= S_FETCH;
        end
        S_FETCH: state <= S_LATCH;
        S_LATCH: begin
          ebit       <= e_rdata[32'(bidx) % K];
          mult_start <= 1'b1;
          state      <= S_MULT;
        end
        S_MULT: if (mult_done) begin
          phase <= ~phase;
          if (bidx == '0) state <= S_DONE;
          else begin
            bidx  <= bidx - 1'b1;
            state <= S_FETCH;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
