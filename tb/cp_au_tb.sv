// cp_au_tb: checks one arithmetic unit. After loading a random register value
// it applies random step controls and compares the adder output and the new
// register with main + S * shift(src, n) + c * 2^FW worked out here with
// 64-bit integer arithmetic (modulo 2^W). Covers every digit -10..10, both
// main operands, both shift sources and shifts in both directions.
//
// No ports; drives the unit with a free-running clock and finishes with a
// TB_RESULT line (watchdog included). The expected values are plain integer
// arithmetic of this bench; the operation itself is the original method's unit step.
module cp_au_tb;
  import cp_pkg::*;
  localparam int IW = 8, FW = 52, W = IW + FW;

  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0, step = 1'b0;
  logic [W-1:0] load_val = '0, aux = '0, q, nxt;
  au_ctl_t ctl;
  int checks = 0, failures = 0;

  cp_au #(.IW(IW), .FW(FW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx(logic [W-1:0] v);
    return longint'(signed'(v));
  endfunction

  initial begin
    longint m, src, sh, e;
    int d, c, n;
    ctl = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      if (i % 8 == 0) begin
        load_val = W'(longint'({$urandom, $urandom}) >>> 8);
        load = 1'b1;
        @(negedge clk);
        load = 1'b0;
        checks++;
        if (q !== load_val) begin failures++; $display("FAIL load"); end
      end
      aux   = W'(longint'({$urandom, $urandom}) >>> 12);
      d     = int'($urandom_range(20)) - 10;
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
      step = 1'b1;
      @(negedge clk);
      step = 1'b0;
      checks++;
      if (q !== W'(e)) begin failures++; $display("FAIL register update"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
