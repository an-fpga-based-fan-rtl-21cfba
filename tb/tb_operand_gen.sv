// tb_operand_gen: recursive operand generation against closed forms.
//
// A 16 x 16 grid, three angles with random sin, cos, sin/D and cos/D values.
// For every pixel output the numerator must equal
//     -8(cos + sin) + (i+1) cos + (j+1) sin        (i = out_x, j = out_y)
// and the 36-bit U accumulator truncated to 18 bits
//     1 - 8 sin/D + 8 cos/D + (i+1) sin/D - (j+1) cos/D,
// computed here by multiplication, not by accumulation. Also checked: the
// first pixel three cycles after start, pixels in x-outer / y-inner order on
// consecutive cycles, out_last on the final one, ready low while busy and
// high again afterwards, and that start is ignored while busy.
module tb_operand_gen;
  import sprime_pkg::*;

  localparam int unsigned IMG_N = 16;
  localparam int unsigned XW = $clog2(IMG_N);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [TRIG_W-1:0]  sin_t = '0, cos_t = '0;
  logic signed [TRIGD_W-1:0] sin_d = '0, cos_d = '0;
  logic ready, out_valid, out_last;
  logic signed [DIVIDEND_W-1:0] num;
  logic [DIVISOR_W-1:0] u;
  logic [XW-1:0] out_x, out_y;

  operand_gen #(.IMG_N(IMG_N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  longint S, C, SD, CD;
  int start_cyc, npix, exp_x, exp_y, nlast;

  always @(posedge clk) if (rst_n && out_valid) begin
    longint en, eu, half;
    half = longint'(IMG_N) / 2;
    en = -half * C - half * S + (longint'(out_x) + 1) * C + (longint'(out_y) + 1) * S;
    eu = (longint'(1) <<< UACC_FRAC) - half * SD + half * CD
         + (longint'(out_x) + 1) * SD - (longint'(out_y) + 1) * CD;
    check(num == DIVIDEND_W'(en), $sformatf("numerator x=%0d y=%0d", out_x, out_y));
    check(u == DIVISOR_W'(eu >>> (UACC_FRAC - U_FRAC)), $sformatf("U x=%0d y=%0d", out_x, out_y));
    check(int'(out_x) == exp_x && int'(out_y) == exp_y, "pixel order");
    check(out_last == (npix == IMG_N * IMG_N - 1), "last flag");
    if (npix == 0) check(cycle - start_cyc == 3, $sformatf("first pixel after %0d cycles", cycle - start_cyc));
    check(!ready || out_last, "ready low while busy");
    npix++;
    if (out_last) nlast++;
    if (exp_y == IMG_N - 1) begin exp_y = 0; exp_x++; end else exp_y++;
  end

  initial begin
    nlast = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int a = 0; a < 3; a++) begin
      S  = longint'($urandom_range(1 << 25, 0)) - (1 << 24);
      C  = longint'($urandom_range(1 << 25, 0)) - (1 << 24);
      SD = longint'($urandom_range(1 << 30, 0)) - (1 << 29);
      CD = longint'($urandom_range(1 << 30, 0)) - (1 << 29);
      check(ready, "ready when idle");
      sin_t = TRIG_W'(S); cos_t = TRIG_W'(C); sin_d = TRIGD_W'(SD); cos_d = TRIGD_W'(CD);
      start = 1'b1;
      npix = 0; exp_x = 0; exp_y = 0;
      start_cyc = cycle;
      @(negedge clk);
      // a second start while busy must be ignored (inputs changed)
      sin_t = '0; cos_t = '0; sin_d = '0; cos_d = '0;
      @(negedge clk);
      start = 1'b0;
      sin_t = TRIG_W'(S); cos_t = TRIG_W'(C); sin_d = TRIGD_W'(SD); cos_d = TRIGD_W'(CD);
      while (nlast <= a) @(negedge clk);
      check(npix == IMG_N * IMG_N, "pixel count");
      @(negedge clk);
      check(ready, "ready after last pixel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (IMG_N * IMG_N + 20) + 50) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
