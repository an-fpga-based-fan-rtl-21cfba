// otf_step: one step of on-the-fly conversion of radix-4 quotient digits.
//
// The divider produces its quotient as signed-digit radix-4 digits in
// {-2..2}. On-the-fly conversion keeps two conventional two's complement
// forms of the quotient developed so far, Q and QM = Q - 1 (in units of the
// last digit), and appends each new digit to one of them by concatenation
// only, so no carry ever propagates:
//     Q'  = 4Q + q       = q >= 0 ? {Q, q}      : {QM, 4 + q}
//     QM' = 4Q + q - 1   = q >  0 ? {Q, q - 1}  : {QM, 3 + q}
// Starting from Q = 0 and QM = all ones (-1), after the last digit Q holds
// the quotient in two's complement (modulo 2^W). Purely combinational; the
// stage that uses it registers the result.
module otf_step
  import sprime_pkg::*;
#(
  parameter int unsigned W = QUOT_W
) (
  input  logic [W-1:0] q_in,     // Q so far
  input  logic [W-1:0] qm_in,    // QM so far
  input  qdigit_t      digit,    // new digit
  output logic [W-1:0] q_out,
  output logic [W-1:0] qm_out
);

  logic [1:0] lo_q, lo_qm;

  always_comb begin
    // low two bits appended to Q and to QM, from the digit value
    unique case ({digit.neg, digit.two, digit.one})
      3'b010:  begin lo_q = 2'd2; lo_qm = 2'd1; end   // +2
      3'b001:  begin lo_q = 2'd1; lo_qm = 2'd0; end   // +1
      3'b101:  begin lo_q = 2'd3; lo_qm = 2'd2; end   // -1
      3'b110:  begin lo_q = 2'd2; lo_qm = 2'd1; end   // -2
      default: begin lo_q = 2'd0; lo_qm = 2'd3; end   //  0
    endcase
    if (!digit.neg) q_out = {q_in[W-3:0], lo_q};
    else            q_out = {qm_in[W-3:0], lo_q};
    if (!digit.neg && !digit.zero) qm_out = {q_in[W-3:0], lo_qm};
    else                           qm_out = {qm_in[W-3:0], lo_qm};
  end

endmodule
