// shift_net_tb: random check of the barrel switch. For every signed digit
// count in -12..12 the output must equal the input divided by 16^count
// (arithmetic right shift) or multiplied by 16^-count (left shift, modulo
// 2^W), computed here with plain shift operators on a 64-bit integer.
//
// No ports; random words and counts one delay step apart, with a watchdog and a
// TB_RESULT line. The signed count convention (negative = left) is the
// document's; the check itself is plain shifting.
module shift_net_tb;
  localparam int W = 60;
  logic [W-1:0] din, dout;
  logic signed [5:0] shamt;
  int checks = 0, failures = 0;

  shift_net #(.W(W), .SHW(6)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, e;
    for (int i = 0; i < 4000; i++) begin
      v = longint'({$urandom, $urandom}) >>> 4;   // 60-bit signed value
      din = W'(v);
      shamt = 6'(int'($urandom_range(24)) - 12);
      #1;
      e = (shamt >= 0) ? (v >>> (4 * shamt)) : (v <<< (-4 * shamt));
      checks++;
      if (dout !== W'(e)) begin
        failures++;
        $display("FAIL din=%h shamt=%0d got %h expected %h", din, shamt, dout, W'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
