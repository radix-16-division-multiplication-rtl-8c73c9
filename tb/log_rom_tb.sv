// log_rom_tb: compares every ROM word with the double-precision value of the
// constant it stands for: ln(1 + S 16^-k) for k = 1..K1-1 and S = -10..10,
// ln 2, 1.0, the exponential start factors {1, e^-1/4, e^-17/32} and their
// logarithms. Tolerance: 2^-50 (a few units in the last of 52 fraction bits).
//
// No ports; combinational reads one delay step apart, a watchdog and a TB_RESULT
// line at the end. The constants are those the original method's algorithms need;
// the comparison tolerance is this bench's choice.
module log_rom_tb;
  import cp_pkg::*;
  localparam int M = 12, FW = 4 * M + 4, W = 8 + FW, K1 = 7;
  rom_kind_e kind;
  logic [3:0] k;
  sdigit_t s;
  logic [W-1:0] word;
  int checks = 0, failures = 0;

  log_rom #(.M(M)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input real ev);
    real got;
    #1;
    got = real'(longint'(signed'(word))) / (2.0 ** FW);
    checks++;
    if (got - ev > 2.0 ** -50 || ev - got > 2.0 ** -50) begin
      failures++;
      $display("FAIL %s k=%0d s=%0d: got %.17f expected %.17f", what, k, s.neg ? -int'(s.mag) : int'(s.mag), got, ev);
    end
  endtask

  initial begin
    kind = ROM_LN;
    for (int kk = 1; kk < K1; kk++)
      for (int ss = -10; ss <= 10; ss++) begin
        k = 4'(kk); s = '{neg: ss < 0, mag: 4'((ss < 0) ? -ss : ss)};
        chk("ln", $ln(1.0 + ss * (16.0 ** (-kk))));
      end
    k = 4'd0; s = DIGIT_ONE;  chk("ln k=0", 0.69314718055994530942);
    s = DIGIT_ZERO;           chk("ln k=0", 0.0);
    kind = ROM_LN2;           chk("ln2", 0.69314718055994530942);
    kind = ROM_ONE;           chk("one", 1.0);
    kind = ROM_M0;
    s = '{neg: 1'b0, mag: 4'd0}; chk("M0", 1.0);
    s = '{neg: 1'b0, mag: 4'd1}; chk("M0", $exp(-0.25));
    s = '{neg: 1'b0, mag: 4'd2}; chk("M0", $exp(-17.0 / 32.0));
    kind = ROM_LNM0;
    s = '{neg: 1'b0, mag: 4'd0}; chk("ln M0", 0.0);
    s = '{neg: 1'b0, mag: 4'd1}; chk("ln M0", -0.25);
    s = '{neg: 1'b0, mag: 4'd2}; chk("ln M0", -17.0 / 32.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
