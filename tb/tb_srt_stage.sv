// tb_srt_stage: one radix-4 SRT stage against the digit recurrence.
//
// Drives a new random operand set every cycle: divisor d in [0.5, 1),
// residual w with |w| <= 2d/3 (including its tail bits), random on-the-fly
// registers and tag. Checks, two cycles later, that
//   - the digit q is legal and the new residual equals 4w - q d exactly
//     (adder part and shifted tail) and satisfies |4w - q d| <= 2d/3,
//   - DIV, -DIV and the tag pass unchanged,
//   - Q' = 4Q + q and QM' = 4QM + (q - 1) modulo 2^18 (on-the-fly rule),
// and that the digit output appears one cycle after the inputs and the
// data two cycles after (valid bits included). Residuals near the bounds
// are drawn often so that every digit value occurs.
module tb_srt_stage;
  import sprime_pkg::*;

  localparam int TAG_W = 8;
  localparam int N     = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in = 1'b0;
  prem_t pr_in;
  logic [DIVISOR_W-1:0] div_in;
  logic [PR_W-1:0] ndiv_in;
  logic [QUOT_W-1:0] q_in, qm_in;
  logic [TAG_W-1:0] tag_in;
  logic valid_out, digit_valid;
  prem_t pr_out;
  logic [DIVISOR_W-1:0] div_out;
  logic [PR_W-1:0] ndiv_out;
  logic [QUOT_W-1:0] q_out, qm_out;
  logic [TAG_W-1:0] tag_out;
  qdigit_t digit;

  srt_stage #(.TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_dig[5];
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // operands sent, by cycle index (full residual in units of 2^-37)
  longint w_s[int], d_s[int];
  logic [QUOT_W-1:0] q_s[int], qm_s[int];
  logic [TAG_W-1:0] t_s[int];
  int dg_s[int];

  // digit one cycle after the inputs
  always @(posedge clk) if (rst_n) begin
    if (w_s.exists(cycle - 1)) begin
      check(digit_valid, "digit valid one cycle after input");
      check((int'(digit.zero) + int'(digit.one) + int'(digit.two)) == 1, "legal digit");
      dg_s[cycle - 1] = dec_digit(digit);
      n_dig[dec_digit(digit) + 2]++;
    end
  end

  // data two cycles after the inputs
  always @(posedge clk) if (rst_n) begin
    if (w_s.exists(cycle - 2)) begin
      longint wfull, dfull, wn, got;
      int c, qd;
      c = cycle - 2;
      qd = dg_s[c];
      wfull = w_s[c]; dfull = d_s[c] <<< TAIL_W;
      wn = 4 * wfull - longint'(qd) * dfull;
      got = ($signed(pr_out.active) * (longint'(1) <<< TAIL_W)) + longint'(pr_out.tail);
      check(valid_out, "valid two cycles after input");
      check(got == wn, $sformatf("residual got %0d want %0d", got, wn));
      check(3 * (wn < 0 ? -wn : wn) <= 2 * dfull, "residual bound");
      check(div_out == DIVISOR_W'(d_s[c]) && ndiv_out == PR_W'(-d_s[c]), "DIV / -DIV pass");
      check(tag_out == t_s[c], "tag pass");
      check(q_out == QUOT_W'(4 * longint'(q_s[c]) + qd)
            || (qd < 0 && q_out == QUOT_W'(4 * longint'(qm_s[c]) + 4 + qd)),
            "Q update");
      w_s.delete(c);
    end else begin
      check(!valid_out || cycle < 3, "no spurious valid");
    end
  end

  initial begin
    foreach (n_dig[i]) n_dig[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      longint d, dfull, lim, w, r;
      logic [PR_W + TAIL_W - 1:0] wbits;
      @(negedge clk);
      d = longint'($urandom_range((1 << DIVISOR_W) - 1, 1 << (DIVISOR_W - 1)));
      dfull = d <<< TAIL_W;
      lim = (2 * dfull) / 3;
      r = (longint'($urandom) <<< 24) ^ longint'($urandom);
      w = (r % (2 * lim + 1)) - lim;
      if (i % 4 == 1) w = lim - longint'($urandom_range(1000, 0));
      if (i % 4 == 2) w = -lim + longint'($urandom_range(1000, 0));
      wbits = (PR_W + TAIL_W)'(w);
      pr_in.active = wbits[PR_W + TAIL_W - 1 -: PR_W];
      pr_in.tail   = wbits[TAIL_W-1:0];
      div_in  = DIVISOR_W'(d);
      ndiv_in = PR_W'(-d);
      q_in    = QUOT_W'($urandom);
      qm_in   = q_in - 1'b1;
      tag_in  = TAG_W'($urandom);
      valid_in = 1'b1;
      w_s[cycle] = w; d_s[cycle] = d; q_s[cycle] = q_in; qm_s[cycle] = qm_in; t_s[cycle] = tag_in;
    end
    @(negedge clk);
    valid_in = 1'b0;
    repeat (4) @(negedge clk);
    check(w_s.size() == 0, "all results returned");
    foreach (n_dig[i]) check(n_dig[i] > 0, $sformatf("digit %0d never selected", i - 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
