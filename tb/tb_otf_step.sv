// tb_otf_step: on-the-fly conversion against integer accumulation.
//
// Applies random sequences of nine radix-4 digits in {-2..2}, one step at a
// time, feeding Q and QM back, from Q = 0 and QM = -1. After every step Q
// must equal sum(q_j 4^(n-j)) and QM must equal Q - 1, both modulo 2^18.
module tb_otf_step;
  import sprime_pkg::*;

  localparam int W = QUOT_W;

  logic [W-1:0] q_in, qm_in, q_out, qm_out;
  qdigit_t digit;

  otf_step dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint acc;
      acc = 0;
      q_in  = '0;
      qm_in = '1;
      for (int j = 0; j < N_STAGES; j++) begin
        int dv;
        dv = int'($urandom_range(4, 0)) - 2;
        digit = enc_digit(dv);
        #1;
        acc = 4 * acc + longint'(dv);
        check(q_out == W'(acc), $sformatf("Q after %0d digits", j + 1));
        check(qm_out == W'(acc - 1), $sformatf("QM after %0d digits", j + 1));
        q_in  = q_out;
        qm_in = qm_out;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
