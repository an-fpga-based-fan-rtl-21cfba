// srt_divider: pipelined radix-4 SRT divider, 36-bit dividend by 18-bit
// divisor to an 18-bit quotient.
//
// The divider is replicated hardware: a normalization stage, N_ST copies of
// the two-cycle radix-4 stage (srt_stage, 9 in the design, two quotient bits
// each, 18 bits in all) and a result register. A new division can enter on
// every clock cycle. The quotient digits are converted to two's complement
// on the fly as they are produced, so the last stage already delivers the
// conventional quotient. No final remainder correction is made: the result
// is within 2/3 of a unit in its last place of the exact quotient.
//
// Operand formats (see sprime_pkg): dividend Q12.24 signed, divisor UQ1.17
// in (0.25, 2); quotient = dividend/divisor as signed with 6 fractional bits.
//
// Timing: latency 2*N_ST + 2 cycles (20 for N_ST = 9): one for
// normalization, two per stage, one for the result register. Throughput one
// division per cycle. The tag travels with its operands.
module srt_divider
  import sprime_pkg::*;
#(
  parameter int unsigned N_ST  = N_STAGES,
  parameter int unsigned TAG_W = 18
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic signed [DIVIDEND_W-1:0] dividend,
  input  logic        [DIVISOR_W-1:0]  divisor,
  input  logic        [TAG_W-1:0]      in_tag,
  output logic                         out_valid,
  output logic signed [QUOT_W-1:0]     quotient,
  output logic                         out_range_err,
  output logic        [TAG_W-1:0]      out_tag
);

  localparam int unsigned MW = TAG_W + 1;   // tag plus range error flag

  // stage boundary signals, index 0 = normalizer output
  logic                 v   [N_ST+1];
  prem_t                pr  [N_ST+1];
  logic [DIVISOR_W-1:0] dv  [N_ST+1];
  logic [PR_W-1:0]      ndv [N_ST+1];
  logic [QUOT_W-1:0]    qq  [N_ST+1];
  logic [QUOT_W-1:0]    qm  [N_ST+1];
  logic [MW-1:0]        mt  [N_ST+1];

  logic                 n_err;
  logic [TAG_W-1:0]     n_tag;

  div_normalize #(.TAG_W(TAG_W)) u_norm (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (in_valid),
    .dividend  (dividend),
    .divisor   (divisor),
    .tag_in    (in_tag),
    .valid_out (v[0]),
    .pr_out    (pr[0]),
    .div_out   (dv[0]),
    .ndiv_out  (ndv[0]),
    .range_err (n_err),
    .tag_out   (n_tag)
  );

  assign mt[0] = {n_err, n_tag};
  assign qq[0] = '0;    // on-the-fly conversion starts from Q = 0 ...
  assign qm[0] = '1;    // ... and QM = -1

  for (genvar i = 0; i < N_ST; i++) begin : g_stage
    qdigit_t dg;
    logic    dg_v;
    srt_stage #(.TAG_W(MW)) u_stage (
      .clk         (clk),
      .rst_n       (rst_n),
      .valid_in    (v[i]),
      .pr_in       (pr[i]),
      .div_in      (dv[i]),
      .ndiv_in     (ndv[i]),
      .q_in        (qq[i]),
      .qm_in       (qm[i]),
      .tag_in      (mt[i]),
      .valid_out   (v[i+1]),
      .pr_out      (pr[i+1]),
      .div_out     (dv[i+1]),
      .ndiv_out    (ndv[i+1]),
      .q_out       (qq[i+1]),
      .qm_out      (qm[i+1]),
      .tag_out     (mt[i+1]),
      .digit       (dg),
      .digit_valid (dg_v)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v[N_ST];
    quotient      <= qq[N_ST];
    out_range_err <= mt[N_ST][MW-1];
    out_tag       <= mt[N_ST][TAG_W-1:0];
  end

endmodule
