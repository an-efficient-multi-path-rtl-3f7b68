// tb_r2_butterfly: random and corner-case test of the radix-2 butterfly.
// The expected sum and difference are formed in 32-bit integers, so they
// cannot wrap, and compared with the 17-bit outputs.
module tb_r2_butterfly;
  localparam int W = 16;
  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  logic signed [W:0]   s_re, s_im, d_re, d_im;
  int checks = 0, failures = 0;

  r2_butterfly #(.W(W)) dut (.*);

  task automatic check_one(int ar, int ai, int br, int bi);
    a_re = W'(ar); a_im = W'(ai); b_re = W'(br); b_im = W'(bi);
    #1;
    checks++;
    if (int'(s_re) != ar + br || int'(s_im) != ai + bi ||
        int'(d_re) != ar - br || int'(d_im) != ai - bi) begin
      failures++;
      $display("FAIL a=(%0d,%0d) b=(%0d,%0d): s=(%0d,%0d) d=(%0d,%0d)",
               ar, ai, br, bi, s_re, s_im, d_re, d_im);
    end
  endtask

  initial begin
    check_one(-32768, -32768, -32768, -32768);
    check_one(32767, 32767, 32767, 32767);
    check_one(32767, -32768, -32768, 32767);
    check_one(0, 0, 0, 0);
    repeat (2000)
      check_one($signed(16'($urandom)), $signed(16'($urandom)),
                $signed(16'($urandom)), $signed(16'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
