// sel_cmpl_tb: checks both levels of the select-complement network. The
// output plus the carry-in must equal +-{0,1,2} times the input on level 1
// and +-{0,4,8} times it on level 2, modulo 2^W.
//
// No ports; random inputs for every control value, one delay step apart, with a
// watchdog and a TB_RESULT line. The sets of multiples are the original method's.
module sel_cmpl_tb;
  import cp_pkg::*;
  localparam int W = 60;
  logic [W-1:0] din, d1, d2;
  sc_ctl_t ctl;
  logic c1, c2;
  int checks = 0, failures = 0;

  sel_cmpl #(.W(W), .LEVEL(1)) dut1 (.din, .ctl, .dout(d1), .cin(c1));
  sel_cmpl #(.W(W), .LEVEL(2)) dut2 (.din, .ctl, .dout(d2), .cin(c2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, f1, f2;
    for (int i = 0; i < 3000; i++) begin
      v = longint'({$urandom, $urandom}) >>> 8;
      din = W'(v);
      ctl.sel = 2'($urandom_range(2));
      ctl.neg = 1'($urandom);
      #1;
      f1 = v * ((ctl.sel == 2) ? 2 : int'(ctl.sel));
      f2 = v * ((ctl.sel == 2) ? 8 : (ctl.sel == 1) ? 4 : 0);
      if (ctl.neg) begin f1 = -f1; f2 = -f2; end
      checks += 2;
      if (d1 + W'(c1) !== W'(f1)) begin failures++; $display("FAIL level 1 sel=%0d neg=%0d", ctl.sel, ctl.neg); end
      if (d2 + W'(c2) !== W'(f2)) begin failures++; $display("FAIL level 2 sel=%0d neg=%0d", ctl.sel, ctl.neg); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
