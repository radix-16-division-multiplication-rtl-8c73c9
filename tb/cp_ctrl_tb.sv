// cp_ctrl_tb: checks the sequencer step by step for each operation: the
// number of busy cycles (M+1, M+4 for the logarithm), the done pulse, the
// step counter, and per step the operand routing the algorithms call for
// (first step without the x16 main operand, the simplified remainder
// recursion from step ceil((M+3)/2), the ROM words of the logarithm and of
// the exponential before and after step K1, left shifts of the exponential
// constants, the reload of the exponent at the last step of the logarithm and
// the three Ex * ln 2 steps). The digit register is driven with a fixed
// nonzero digit.
//
// No ports; clocked, with a watchdog and a TB_RESULT line at the end. Step
// counts and the routing follow the original method's algorithms; the exact control
// encoding checked is this design's.
module cp_ctrl_tb;
  import cp_pkg::*;
  localparam int M = 12, KS = 8, K1 = 7;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, adv = 1'b1;
  op_e op = OP_DIV, op_q;
  sdigit_t s = '{neg: 1'b1, mag: 4'd3};
  logic load, load_ex, step, au2_aux_y, busy, done, exl;
  au_ctl_t au1, au2;
  rom_kind_e rom_kind;
  logic [3:0] rom_k, k;
  sel_mode_e sel_mode;
  logic [1:0] sel_k;
  int checks = 0, failures = 0;

  cp_ctrl #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what, input int kk);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s op=%s k=%0d", what, op.name(), kk); end
  endtask

  task automatic run(input op_e o);
    int cyc, kk;
    @(negedge clk);
    op = o; start = 1'b1;
    #1 chk(load && !busy, "load on start", 0);
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      kk = int'(k);
      chk(step && busy, "step while busy", kk);
      if (!exl) begin
        chk(kk == cyc, "step counter", kk);
        chk(load_ex == (o == OP_LOG && kk == M), "exponent reload", kk);
        unique case (o)
          OP_DIV, OP_LOG: begin
            chk(au1.x16 == (kk != 0), "x16", kk);
            chk((au1.digit == DIGIT_ZERO) == (kk >= KS), "simplified recursion", kk);
            chk(sel_mode == SEL_MULT, "mode", kk);
            if (o == OP_DIV) chk(au2.shamt == 6'(kk) && au2.digit == s && !au2.aux, "quotient step", kk);
            else chk(au2.aux && rom_kind == ((kk < K1) ? ROM_LN : ROM_ONE), "log ROM word", kk);
          end
          OP_MUL: chk(au2_aux_y && au2.shamt == 6'(kk) && au1.intc == 6'sd3, "multiplication step", kk);
          default: begin
            if (kk == 0) chk(rom_kind == ROM_LNM0 && au2.digit == DIGIT_ZERO, "exp start", kk);
            else if (kk < K1) chk(rom_kind == ROM_LN && au1.aux && au1.shamt == -6'(kk), "exp ROM step", kk);
            else chk(!au1.aux && au1.intc == 6'sd3, "exp additive step", kk);
          end
        endcase
      end else begin
        chk(o == OP_LOG && rom_kind == ROM_LN2 && au2.shamt == 6'(kk - 2) && kk == cyc - M - 1, "Ex ln 2 step", kk);
      end
      cyc++;
      @(negedge clk);
    end
    chk(cyc == ((o == OP_LOG) ? M + 4 : M + 1), "cycle count", cyc);
    chk(!busy && op_q == o, "idle after done", 0);
    @(negedge clk);
    chk(!done, "done is one pulse", 0);
  endtask

  // Serial use: adv only every second cycle, so every step lasts two cycles.
  task automatic run_half(input op_e o);
    int cyc;
    @(negedge clk);
    op = o; start = 1'b1; adv = 1'b0;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      adv = cyc[0];
      #1;
      if (!exl) chk(int'(k) == cyc / 2, "step counter, serial", int'(k));
      cyc++;
      @(negedge clk);
    end
    adv = 1'b1;
    chk(cyc == 2 * ((o == OP_LOG) ? M + 4 : M + 1), "cycle count, serial", cyc);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(OP_DIV); run(OP_MUL); run(OP_LOG); run(OP_EXP); run(OP_LOG);
    run_half(OP_DIV); run_half(OP_LOG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
