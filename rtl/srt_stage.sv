// srt_stage: one radix-4 SRT division stage, two clock cycles deep.
//
// Each stage retires one quotient digit q in {-2..2} (two quotient bits) by
// the recurrence w' = 4w - q d, with the divisor d normalized to [0.5, 1) and
// the residual kept within |w| <= (2/3) d, so that 4w lies in (-8/3, 8/3).
// The structure follows the stage diagram of the design:
//   cycle A: the quotient selection table (a registered 512 x 4 ROM) is
//            addressed by the 6 leading bits of 4w and the 3 divisor bits
//            after the leading one; in parallel the partial remainder, DIV
//            and -DIV are registered.
//   cycle B: the digit steers a multiplexer-shifter that forms 0, +-d or
//            +-2d from the DIV and -DIV copies; one adder forms the new
//            partial remainder, registered with DIV and -DIV for the next
//            stage.
// Only the 21 leading bits of the remainder (3 integer, 18 fractional) pass
// through the adder; the dividend bits below them ride along in a tail and
// enter two at a time. The digit also advances the on-the-fly converted
// quotient (Q, QM) in cycle B. A valid bit and a tag (pixel address) travel
// with the data; they, the tail and the on-the-fly registers are this
// implementation's additions to the diagram.
//
// Interface: all *_in are sampled on a rising edge, all *_out appear two
// edges later; digit/digit_valid appear one edge later (the q_{k+1} output
// of the diagram). Reset (active low, synchronous) clears only the valid
// bits.
module srt_stage
  import sprime_pkg::*;
#(
  parameter int unsigned TAG_W = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid_in,
  input  prem_t                pr_in,      // partial remainder w
  input  logic [DIVISOR_W-1:0] div_in,     // DIV: d, 0.1xxx (18 frac bits)
  input  logic [PR_W-1:0]      ndiv_in,    // -DIV: -d, two's complement
  input  logic [QUOT_W-1:0]    q_in,       // on-the-fly Q
  input  logic [QUOT_W-1:0]    qm_in,      // on-the-fly QM
  input  logic [TAG_W-1:0]     tag_in,
  output logic                 valid_out,
  output prem_t                pr_out,
  output logic [DIVISOR_W-1:0] div_out,
  output logic [PR_W-1:0]      ndiv_out,
  output logic [QUOT_W-1:0]    q_out,
  output logic [QUOT_W-1:0]    qm_out,
  output logic [TAG_W-1:0]     tag_out,
  output qdigit_t              digit,      // q_{k+1}
  output logic                 digit_valid
);

  // ---------------- cycle A ----------------
  prem_t                pr_a;
  logic [DIVISOR_W-1:0] div_a;
  logic [PR_W-1:0]      ndiv_a;
  logic [QUOT_W-1:0]    q_a, qm_a;
  logic [TAG_W-1:0]     tag_a;
  logic                 valid_a;
  logic [Y_EST_W-1:0]   y_est;     // leading bits of 4w: 3 int + 3 frac

  // 4w drops the two leading (sign extension) bits of w
  assign y_est = pr_in.active[PR_W-3 -: Y_EST_W];

  qst_rom u_qst (
    .clk  (clk),
    .addr ({y_est, div_in[DIVISOR_W-2 -: D_EST_W]}),
    .q    (digit)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) valid_a <= 1'b0;
    else        valid_a <= valid_in;
    pr_a   <= pr_in;
    div_a  <= div_in;
    ndiv_a <= ndiv_in;
    q_a    <= q_in;
    qm_a   <= qm_in;
    tag_a  <= tag_in;
  end

  assign digit_valid = valid_a;

  // ---------------- cycle B ----------------
  logic [PR_W-1:0]   y_a;      // 4w of the delayed remainder
  logic [PR_W-1:0]   mult;     // -q*d from the mux-shifter
  logic [PR_W-1:0]   d_ext;
  logic [QUOT_W-1:0] q_nx, qm_nx;

  assign y_a   = {pr_a.active[PR_W-3:0], pr_a.tail[TAIL_W-1 -: 2]};
  assign d_ext = PR_W'(div_a);

  always_comb begin
    if (digit.zero)     mult = '0;                               // q = 0
    else if (digit.neg) mult = digit.two ? d_ext << 1 : d_ext;   // q = -2, -1: +2d, +d
    else                mult = digit.two ? ndiv_a << 1 : ndiv_a; // q = +2, +1: -2d, -d
  end

  otf_step #(.W(QUOT_W)) u_otf (
    .q_in   (q_a),
    .qm_in  (qm_a),
    .digit  (digit),
    .q_out  (q_nx),
    .qm_out (qm_nx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) valid_out <= 1'b0;
    else        valid_out <= valid_a;
    pr_out.active <= y_a + mult;
    pr_out.tail   <= pr_a.tail << 2;
    div_out       <= div_a;
    ndiv_out      <= ndiv_a;
    q_out         <= q_nx;
    qm_out        <= qm_nx;
    tag_out       <= tag_a;
  end

  // The new residual stays within |w| <= (2/3)d < 1: its three integer bits
  // are all equal (value 0 or -1 in the integer part).
  a_residual_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    valid_out |-> (pr_out.active[PR_W-1 -: 3] == 3'b000 ||
                   pr_out.active[PR_W-1 -: 3] == 3'b111));

endmodule
