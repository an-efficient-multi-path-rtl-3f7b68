// tb_twiddle_rom: compares every entry of the 16-entry twiddle table with
// cos(2 pi m / 16) and -sin(2 pi m / 16) scaled by 2^14, and checks a few
// entries against exact constants (1, -j, -1, j and the 45-degree values).
module tb_twiddle_rom;
  localparam int N  = 16;
  localparam int TW = 16;
  localparam real PI = 3.14159265358979323846;
  logic [3:0]           m;
  logic signed [TW-1:0] w_re, w_im;
  int checks = 0, failures = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  twiddle_rom #(.N(N), .TW(TW)) dut (.*);

  task automatic exact(int k, int er, int ei);
    m = 4'(k);
    #1;
    checks++;
    if (int'(w_re) != er || int'(w_im) != ei) begin
      failures++;
      $display("FAIL m=%0d: (%0d,%0d) expected (%0d,%0d)", k, w_re, w_im, er, ei);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      real c, s;
      m = 4'(k);
      #1;
      c = $cos(2.0 * PI * k / N) * 16384.0;
      s = -$sin(2.0 * PI * k / N) * 16384.0;
      checks++;
      if (rabs(real'(w_re) - c) > 0.5 || rabs(real'(w_im) - s) > 0.5) begin
        failures++;
        $display("FAIL m=%0d: (%0d,%0d) expected (%0.2f,%0.2f)", k, w_re, w_im, c, s);
      end
    end
    exact(0, 16384, 0);
    exact(4, 0, -16384);
    exact(8, -16384, 0);
    exact(12, 0, 16384);
    exact(2, 11585, -11585);
    exact(1, 15137, -6270);
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
