// cp_au_dp_tb: checks the combinational datapath of an arithmetic unit. For
// random register words, auxiliary words and step controls it compares the
// adder output with main + S * shift(src, n) + c * 2^FW worked out here with
// 64-bit integer arithmetic (modulo 2^W). Covers every digit -10..10, both
// main operands, both shift sources and shifts in both directions.
//
// No ports; purely combinational stimulus with a #1 settle per vector, a
// watchdog and a TB_RESULT line at the end. The expected values are plain
// integer arithmetic of this bench; the operation is the original method's
// unit step.
module cp_au_dp_tb;
  import cp_pkg::*;
  localparam int IW = 8, FW = 52, W = IW + FW;

  logic [W-1:0] q = '0, aux = '0, nxt;
  au_ctl_t ctl = '0;
  int checks = 0, failures = 0;

  cp_au_dp #(.IW(IW), .FW(FW)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx(logic [W-1:0] v);
    return longint'(signed'(v));
  endfunction

  initial begin
    longint m, src, sh, e;
    int d, c, n;
    for (int i = 0; i < 5000; i++) begin
      q     = W'(longint'({$urandom, $urandom}) >>> 8);
      aux   = W'(longint'({$urandom, $urandom}) >>> 12);
      d     = (i < 21) ? i - 10 : int'($urandom_range(20)) - 10;
      c     = int'($urandom_range(20)) - 10;
      n     = int'($urandom_range(24)) - 12;
      ctl.x16   = 1'($urandom);
      ctl.aux   = 1'($urandom);
      ctl.shamt = 6'(n);
      ctl.digit = '{neg: d < 0, mag: 4'((d < 0) ? -d : d)};
      ctl.intc  = 6'(c);
      #1;
      m   = ctl.x16 ? (sx(q) <<< 4) : sx(q);
      src = ctl.aux ? sx(aux) : sx(q);
      sh  = (n >= 0) ? (src >>> (4 * n)) : (src <<< (-4 * n));
      e   = m + longint'(d) * sh + (longint'(c) <<< FW);
      checks++;
      if (nxt !== W'(e)) begin
        failures++;
        $display("FAIL d=%0d c=%0d n=%0d x16=%0d aux=%0d got %h expected %h", d, c, n, ctl.x16, ctl.aux, nxt, W'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
