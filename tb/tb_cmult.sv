// tb_cmult: test of the complex multiplier. Random full-scale samples are
// multiplied by random unit-magnitude coefficients; the exact product is
// formed in floating point, divided by 2^14 and compared with the output,
// which must be within one LSB (the rounding). Exact cases: w = 1 must return
// the sample, w = -j must swap and negate.
module tb_cmult;
  localparam int W  = 18;
  localparam int TW = 16;
  localparam real PI = 3.14159265358979323846;
  logic signed [W-1:0]  z_re, z_im;
  logic signed [TW-1:0] w_re, w_im;
  logic signed [W:0]    p_re, p_im;
  int checks = 0, failures = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  cmult #(.W(W), .TW(TW)) dut (.*);

  task automatic check_one(int zr, int zi, int wr, int wi);
    real er, ei;
    z_re = W'(zr); z_im = W'(zi); w_re = TW'(wr); w_im = TW'(wi);
    #1;
    er = (real'(zr) * wr - real'(zi) * wi) / 16384.0;
    ei = (real'(zr) * wi + real'(zi) * wr) / 16384.0;
    checks++;
    if (rabs(real'(p_re) - er) > 0.51 || rabs(real'(p_im) - ei) > 0.51) begin
      failures++;
      $display("FAIL z=(%0d,%0d) w=(%0d,%0d): p=(%0d,%0d) expected (%0.2f,%0.2f)",
               zr, zi, wr, wi, p_re, p_im, er, ei);
    end
  endtask

  initial begin
    check_one(131071, -131072, 16384, 0);
    check_one(131071, 131071, 11585, -11585);
    check_one(-131072, -131072, 11585, 11585);
    check_one(1000, -7, 0, -16384);
    repeat (3000) begin
      real a;
      a = 2.0 * PI * real'($urandom % 10000) / 10000.0;
      check_one(int'($urandom % 262144) - 131072, int'($urandom % 262144) - 131072,
                $rtoi($floor($cos(a) * 16384.0 + 0.5)),
                $rtoi($floor($sin(a) * 16384.0 + 0.5)));
    end
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
