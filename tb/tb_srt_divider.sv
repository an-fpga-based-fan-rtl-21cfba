// tb_srt_divider: self-checking test of the pipelined radix-4 SRT divider.
//
// Feeds one division per cycle: random dividends and divisors drawn from the
// whole normalization range (0.25 .. 2) with |quotient| below 2048, plus
// corner operands (zero dividend, divisor at 0.25, 0.5, 1 and just below 2,
// dividend at its extremes). Each quotient is checked against the exact
// integer bound of radix-4 SRT with residual |w| <= (2/3)d,
//     |num/(2U) - Q| <= 2/3   (num Q12.24, U UQ1.17, Q with 6 frac bits),
// the tag must come back with it after exactly 20 cycles, and divisors below
// 0.25 must raise the range error flag.
module tb_srt_divider;
  import sprime_pkg::*;

  localparam int TAG_W   = 18;
  localparam int LATENCY = 2 * N_STAGES + 2;
  localparam int N_RAND  = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DIVIDEND_W-1:0] dividend = '0;
  logic [DIVISOR_W-1:0] divisor = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_valid, out_range_err;
  logic signed [QUOT_W-1:0] quotient;
  logic [TAG_W-1:0] out_tag;

  srt_divider dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected operands, indexed by tag
  longint n_q[int], u_q[int];
  int     t_q[int];
  int     n_sent = 0, n_recv = 0, n_err = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    longint num, ui, q, diff;
    int t;
    t = int'(out_tag);
    n_recv++;
    check(n_q.exists(t), "unknown tag");
    if (n_q.exists(t)) begin
      num = n_q[t]; ui = u_q[t];
      check(cycle - t_q[t] == LATENCY, $sformatf("latency %0d", cycle - t_q[t]));
      if (ui < (1 << (U_FRAC - 2))) begin
        check(out_range_err, "range error flag missing");
        n_err++;
      end else begin
        q = longint'(quotient);
        diff = num - 2 * ui * q;
        if (diff < 0) diff = -diff;
        check(!out_range_err, "spurious range error");
        check(3 * diff <= 4 * ui,
              $sformatf("bound num=%0d u=%0d q=%0d", num, ui, q));
      end
      n_q.delete(t);
    end
  end

  task automatic send(input longint num, input longint ui);
    // drive on the falling edge, sampled on the next rising edge
    @(negedge clk);
    dividend = DIVIDEND_W'(num);
    divisor  = DIVISOR_W'(ui);
    in_tag   = TAG_W'(n_sent);
    in_valid = 1'b1;
    n_q[n_sent % (1 << TAG_W)] = num;
    u_q[n_sent % (1 << TAG_W)] = ui;
    t_q[n_sent % (1 << TAG_W)] = cycle;
    n_sent++;
  endtask

  // random operand pair with |num/U| < 1900 and |num| < 1024
  task automatic send_random();
    longint ui, num, lim;
    ui  = longint'($urandom_range((1 << (U_FRAC + 1)) - 1, 1 << (U_FRAC - 2)));
    lim = (1900 * ui) <<< (NUM_FRAC - U_FRAC);
    if (lim > (longint'(1) <<< (DIVIDEND_W - 2))) lim = longint'(1) <<< (DIVIDEND_W - 2);
    num = (longint'($urandom) <<< 16) ^ longint'($urandom);
    num = (num % (2 * lim + 1)) - lim;
    send(num, ui);
  endtask

  initial begin
    longint ONE_N;
    ONE_N = longint'(1) <<< NUM_FRAC;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // corners
    send(0, 1 << U_FRAC);
    send(ONE_N, 1 << U_FRAC);                 // 1/1
    send(-ONE_N, 1 << U_FRAC);                // -1/1
    send(ONE_N, 1 << (U_FRAC - 1));           // 1/0.5
    send(ONE_N, 1 << (U_FRAC - 2));           // 1/0.25
    send(362 * ONE_N, 38400);                 // 362/0.293
    send(-362 * ONE_N, 38400);
    send(362 * ONE_N, (1 << (U_FRAC + 1)) - 1);
    send(-(ONE_N / 3), 1 << U_FRAC);
    send(ONE_N, (1 << (U_FRAC - 2)) - 1);     // below 0.25: range error
    send(ONE_N, 0);                           // zero divisor: range error
    // back-to-back random operands
    for (int i = 0; i < N_RAND; i++) send_random();
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    check(n_recv == n_sent, $sformatf("received %0d of %0d", n_recv, n_sent));
    check(n_err == 2, "range errors seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_RAND + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
