// tb_sprime_unit: end-to-end test of the s' pipeline at a reduced image size.
//
// Runs several projection angles through sprime_unit with a 32 x 32 image
// and D = 33, which gives the same relative geometry as a 512 x 512 image
// with D just above 512 (U spans about 0.3 .. 1.7). Each angle is started as
// soon as ready returns. For every result the testbench
//   - recomputes numerator and U in closed form (x*cos + y*sin etc. with the
//     same integer inputs, no recursion) and checks the quotient against the
//     SRT bound |num/(2U) - Q| <= 2/3 (exact integer arithmetic),
//   - compares s' with a real-valued evaluation of the geometry,
//   - checks pixel order, the last-pixel flag and that no range error occurs,
//   - checks the 23-cycle latency from start to the first result.
// It counts how often each mechanism occurred: the three divisor
// normalization shifts, each quotient digit value in the stages, negative and
// positive s', row changes and back-to-back angles; one that never occurs
// is a failure.
module tb_sprime_unit;
  import sprime_pkg::*;

  localparam int unsigned IMG_N   = 32;
  localparam int unsigned XW      = $clog2(IMG_N);
  localparam real         DIST    = 33.0;
  localparam int          N_ANG   = 6;
  localparam int          LATENCY = 23;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic signed [TRIG_W-1:0]  sin_t = '0, cos_t = '0;
  logic signed [TRIGD_W-1:0] sin_d = '0, cos_d = '0;
  logic ready, sp_valid, sp_last, sp_range_err;
  logic signed [QUOT_W-1:0] sprime;
  logic [XW-1:0] sp_x, sp_y;

  sprime_unit #(.IMG_N(IMG_N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // per-angle integer inputs, kept for the reference model
  longint S_a[N_ANG], C_a[N_ANG], SD_a[N_ANG], CD_a[N_ANG];
  real    s_a[N_ANG], c_a[N_ANG];
  int     start_a[N_ANG];
  int     exp_x, exp_y, ang_done;
  int     n_shift[3];
  int     n_digit[5];
  int     n_neg, n_pos, n_rows, n_b2b;
  real    max_err;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // reference result check on every output
  always @(posedge clk) if (rst_n && sp_valid) begin
    longint num, uacc, ui, q, diff;
    longint S_i, C_i, SD_i, CD_i;
    real    x, y, sref, err, s_r, c_r;
    longint half;
    half = longint'(IMG_N) / 2;
    S_i = S_a[ang_done]; C_i = C_a[ang_done]; SD_i = SD_a[ang_done]; CD_i = CD_a[ang_done];
    s_r = s_a[ang_done]; c_r = c_a[ang_done];
    num  = -half * C_i - half * S_i + (longint'(sp_x) + 1) * C_i + (longint'(sp_y) + 1) * S_i;
    uacc = (longint'(1) <<< UACC_FRAC) - half * SD_i + half * CD_i
           + (longint'(sp_x) + 1) * SD_i - (longint'(sp_y) + 1) * CD_i;
    ui   = uacc >>> (UACC_FRAC - U_FRAC);
    q    = longint'(sprime);
    diff = num - 2 * ui * q;
    if (diff < 0) diff = -diff;
    check(3 * diff <= 4 * ui, $sformatf("SRT bound x=%0d y=%0d q=%0d", sp_x, sp_y, q));
    x = real'(sp_x) + 1.0 - real'(half);
    y = real'(sp_y) + 1.0 - real'(half);
    sref = (x * c_r + y * s_r) / (1.0 + (x * s_r - y * c_r) / DIST);
    err  = real'(q) / 64.0 - sref;
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    check(err < 0.1, $sformatf("s' value x=%0d y=%0d got %f want %f", sp_x, sp_y, real'(q)/64.0, sref));
    check(int'(sp_x) == exp_x && int'(sp_y) == exp_y, "pixel order");
    check(!sp_range_err, "range error");
    check(sp_last == (exp_x == IMG_N - 1 && exp_y == IMG_N - 1), "last flag");
    if (ui >= (1 << U_FRAC))            n_shift[0]++;
    else if (ui >= (1 << (U_FRAC - 1))) n_shift[1]++;
    else                                n_shift[2]++;
    if (q < 0) n_neg++; else n_pos++;
    if (exp_x == 0 && exp_y == 0)
      check(cycle - start_a[ang_done] == LATENCY,
            $sformatf("latency %0d", cycle - start_a[ang_done]));
    if (exp_y == IMG_N - 1) begin exp_y = 0; exp_x++; n_rows++; end
    else exp_y++;
    if (sp_last) begin ang_done++; exp_x = 0; exp_y = 0; end
  end

  // digit statistics from inside the divider stages
  for (genvar i = 0; i < N_STAGES; i++) begin : g_mon
    always @(posedge clk) if (rst_n && dut.u_div.g_stage[i].dg_v)
      n_digit[dec_digit(dut.u_div.g_stage[i].dg) + 2]++;
  end

  initial begin
    real th;
    max_err = 0.0;
    n_neg = 0; n_pos = 0; n_rows = 0; n_b2b = 0; ang_done = 0;
    foreach (n_shift[i]) n_shift[i] = 0;
    foreach (n_digit[i]) n_digit[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < N_ANG; a++) begin
      th = 2.0 * 3.14159265358979 * real'(a) / real'(N_ANG) + 0.3;
      s_a[a]  = $sin(th);
      c_a[a]  = $cos(th);
      S_a[a]  = longint'($rtoi(s_a[a] * 16777216.0));
      C_a[a]  = longint'($rtoi(c_a[a] * 16777216.0));
      SD_a[a] = longint'($rtoi(s_a[a] / DIST * 17179869184.0));
      CD_a[a] = longint'($rtoi(c_a[a] / DIST * 17179869184.0));
    end
    exp_x = 0; exp_y = 0;
    for (int a = 0; a < N_ANG; a++) begin
      // drive on the falling edge, sampled on the next rising edge
      @(negedge clk);
      while (!ready) @(negedge clk);
      // started while the previous angle still has results in flight
      if (ang_done < a) n_b2b++;
      sin_t = TRIG_W'(S_a[a]);
      cos_t = TRIG_W'(C_a[a]);
      sin_d = TRIGD_W'(SD_a[a]);
      cos_d = TRIGD_W'(CD_a[a]);
      start = 1'b1;
      start_a[a] = cycle;
      @(negedge clk);
      start = 1'b0;
    end
    while (ang_done < N_ANG) @(posedge clk);
    repeat (5) @(posedge clk);
    check(ang_done == N_ANG, "all angles done");
    foreach (n_shift[i]) check(n_shift[i] > 0, $sformatf("normalization shift %0d never used", i));
    foreach (n_digit[i]) check(n_digit[i] > 0, $sformatf("digit %0d never selected", i - 2));
    check(n_neg > 0 && n_pos > 0, "both signs of s'");
    check(n_rows >= N_ANG * IMG_N, "row changes");
    check(n_b2b > 0, "back-to-back angles");
    $display("shifts %0d/%0d/%0d digits %0d/%0d/%0d/%0d/%0d neg %0d pos %0d rows %0d b2b %0d max err %f",
             n_shift[0], n_shift[1], n_shift[2], n_digit[0], n_digit[1], n_digit[2],
             n_digit[3], n_digit[4], n_neg, n_pos, n_rows, n_b2b, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_ANG * (IMG_N * IMG_N + 100) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
