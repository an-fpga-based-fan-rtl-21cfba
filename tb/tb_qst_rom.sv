// tb_qst_rom: exhaustive check of the radix-4 quotient selection table.
//
// Reads all 512 entries through the synchronous port (one cycle after the
// address). For every entry it checks that the word is a legal digit code
// (exactly one magnitude bit, no negative zero) and, on a 24 x 24 grid of
// points spread over the entry's rectangle (4w in [Y/8, (Y+1)/8), divisor d
// in [(8+k)/16, (9+k)/16)), that every reachable point (|4w| <= 8d/3) gives
// a next residual 4w - q d within the bound |w'| <= 2d/3. The reference is
// real arithmetic, independent of the integer rule that builds the table.
module tb_qst_rom;
  import sprime_pkg::*;

  logic clk = 1'b0;
  logic [QST_ADDR_W-1:0] addr = '0;
  qdigit_t q;

  qst_rom dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_val[5];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    foreach (n_val[i]) n_val[i] = 0;
    for (int a = 0; a < (1 << QST_ADDR_W); a++) begin
      int yi, k, qv;
      bit ok;
      @(negedge clk);
      addr = QST_ADDR_W'(a);
      @(posedge clk);
      #1;
      yi = a >> D_EST_W;
      if (yi >= 32) yi -= 64;
      k  = a % 8;
      check((int'(q.zero) + int'(q.one) + int'(q.two)) == 1 && !(q.zero && q.neg),
            $sformatf("illegal code %b at %0d", q, a));
      qv = dec_digit(q);
      n_val[qv + 2]++;
      ok = 1'b1;
      for (int i = 0; i < 24; i++) begin
        for (int j = 0; j < 24; j++) begin
          real y, d, w;
          y = (real'(yi) + (real'(i) + 0.5) / 24.0) / 8.0;
          d = (8.0 + real'(k) + (real'(j) + 0.5) / 24.0) / 16.0;
          if (y <= 8.0 * d / 3.0 && y >= -8.0 * d / 3.0) begin
            w = y - real'(qv) * d;
            if (w > 2.0 * d / 3.0 + 1e-12 || w < -2.0 * d / 3.0 - 1e-12) ok = 1'b0;
          end
        end
      end
      check(ok, $sformatf("digit %0d at Y=%0d k=%0d leaves the bound", qv, yi, k));
    end
    foreach (n_val[i]) check(n_val[i] > 0, $sformatf("digit %0d absent", i - 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
