// div_normalize: divisor normalization and initial partial remainder.
//
// The SRT stages need the divisor in [0.5, 1). For the fan-beam geometry
// with D > 512 the divisor U lies in (0.2910, 1.707), so at most one shift
// either way normalizes it, and the hardware reduces to a three-way choice
// made from the two leading bits of U:
//     U >= 1          : d = U / 2     (s = 0)
//     0.5 <= U < 1    : d = U         (s = 1)
//     0.25 <= U < 0.5 : d = 2U        (s = 2)
// The dividend is shifted by the same amount, so the quotient is unchanged.
// With U as UQ1.17 and the numerator as Q12.24, both are shifted left by s
// and read as d = U*2^s / 2^18 and w0 = num*2^s / 2^37, which gives
// w0/d = s'/4096, always inside the convergence bound |w0| <= (2/3)d, and an
// 18-bit quotient that reads directly as s' with 6 fractional bits.
// range_err flags a divisor below 0.25 (or zero), which one shift cannot
// normalize; that never happens for D > 512. Such an operand pair is replaced
// by 0 / 0.5 so that the stages stay within their residual bound and the
// quotient comes out as 0 with the flag set. The range check and the binary
// point placement are this implementation's choices.
//
// Timing: one register stage; inputs sampled on a rising edge appear at the
// outputs after it. Reset (synchronous, active low) clears valid_out.
module div_normalize
  import sprime_pkg::*;
#(
  parameter int unsigned TAG_W = 18
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         valid_in,
  input  logic signed [DIVIDEND_W-1:0] dividend,   // numerator, Q12.24
  input  logic        [DIVISOR_W-1:0]  divisor,    // U, UQ1.17
  input  logic        [TAG_W-1:0]      tag_in,
  output logic                         valid_out,
  output prem_t                        pr_out,     // w0
  output logic        [DIVISOR_W-1:0]  div_out,    // d in [0.5, 1)
  output logic        [PR_W-1:0]       ndiv_out,   // -d
  output logic                         range_err,
  output logic        [TAG_W-1:0]      tag_out
);

  localparam int unsigned W0_W = PR_W + TAIL_W;   // 40

  logic [1:0]            shamt;
  logic                  bad;
  logic [DIVISOR_W-1:0]  d_n;
  logic signed [W0_W-1:0] w0;

  always_comb begin
    if (divisor[DIVISOR_W-1])       shamt = 2'd0;
    else if (divisor[DIVISOR_W-2])  shamt = 2'd1;
    else                            shamt = 2'd2;
    bad = (divisor[DIVISOR_W-1 -: 3] == 3'b000);
    d_n = divisor << shamt;
    w0  = W0_W'(dividend) <<< shamt;
    if (bad) begin
      d_n = DIVISOR_W'(1) << (DIVISOR_W - 1);
      w0  = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid_out <= 1'b0;
    else        valid_out <= valid_in;
    pr_out.active <= w0[W0_W-1 -: PR_W];
    pr_out.tail   <= w0[TAIL_W-1:0];
    div_out       <= d_n;
    ndiv_out      <= -PR_W'(d_n);
    range_err     <= bad;
    tag_out       <= tag_in;
  end

endmodule
