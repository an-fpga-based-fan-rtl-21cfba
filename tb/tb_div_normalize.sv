// tb_div_normalize: divisor normalization and initial remainder.
//
// Random divisors from each of the three normalization ranges (U >= 1,
// 0.5 <= U < 1, 0.25 <= U < 0.5), some exactly on a range boundary, and
// divisors below 0.25, with random signed dividends. One cycle later the
// outputs must satisfy, with s the shift chosen by the testbench from U:
//   d = U * 2^s in [0.5, 1), -DIV = -d, initial remainder = num * 2^s,
//   tag unchanged, range_err only for U < 0.25 (remainder 0, d = 0.5).
module tb_div_normalize;
  import sprime_pkg::*;

  localparam int TAG_W = 8;

  logic clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0;
  logic signed [DIVIDEND_W-1:0] dividend = '0;
  logic [DIVISOR_W-1:0] divisor = '0;
  logic [TAG_W-1:0] tag_in = '0;
  logic valid_out, range_err;
  prem_t pr_out;
  logic [DIVISOR_W-1:0] div_out;
  logic [PR_W-1:0] ndiv_out;
  logic [TAG_W-1:0] tag_out;

  div_normalize #(.TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_case[4];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    foreach (n_case[i]) n_case[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      longint u, num, expd, expw, got;
      int s, rng;
      rng = i % 4;
      case (rng)
        0: u = longint'($urandom_range((1 << 18) - 1, 1 << 17));
        1: u = longint'($urandom_range((1 << 17) - 1, 1 << 16));
        2: u = longint'($urandom_range((1 << 16) - 1, 1 << 15));
        default: u = longint'($urandom_range((1 << 15) - 1, 0));
      endcase
      if (i == 4) u = 1 << 17;
      if (i == 5) u = 1 << 16;
      if (i == 6) u = 1 << 15;
      num = (longint'($urandom) <<< 4) ^ longint'($urandom);
      if (num[35]) num = num - (longint'(1) <<< 36);
      num = num >>> 1;   // keep |num| < 2^34 (|num/2^24| < 1024)
      @(negedge clk);
      dividend = DIVIDEND_W'(num);
      divisor  = DIVISOR_W'(u);
      tag_in   = TAG_W'(i);
      valid_in = 1'b1;
      @(posedge clk);
      #1;
      s = (u >= (1 << 17)) ? 0 : (u >= (1 << 16)) ? 1 : 2;
      check(valid_out && tag_out == TAG_W'(i), "valid / tag");
      got = ($signed(pr_out.active) * (longint'(1) <<< TAIL_W)) + longint'(pr_out.tail);
      if (u < (1 << 15)) begin
        check(range_err, "range error flag");
        check(got == 0 && div_out == DIVISOR_W'(1 << 17), "range error operands");
        n_case[3]++;
      end else begin
        expd = u <<< s;
        expw = num <<< s;
        check(!range_err, "spurious range error");
        check(div_out == DIVISOR_W'(expd) && div_out[DIVISOR_W-1], $sformatf("divisor u=%0d", u));
        check(ndiv_out == PR_W'(-expd), "negated divisor");
        check(got == expw, $sformatf("initial remainder num=%0d s=%0d", num, s));
        n_case[s]++;
      end
    end
    foreach (n_case[i]) check(n_case[i] > 0, "every range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
