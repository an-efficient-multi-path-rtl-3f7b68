// tb_rot_minus_j: test of the trivial rotator. With en high the output must
// equal (re + j im) * (-j) = im - j re, with en low the input unchanged.
module tb_rot_minus_j;
  localparam int W = 17;
  logic                en;
  logic signed [W-1:0] i_re, i_im, o_re, o_im;
  int checks = 0, failures = 0;

  rot_minus_j #(.W(W)) dut (.*);

  task automatic check_one(bit e, int r, int i);
    int xr, xi;
    en = e; i_re = W'(r); i_im = W'(i);
    #1;
    // multiply (r + j i) by (0 - j) written out as a complex product
    xr = e ? (r * 0 - i * (-1)) : r;
    xi = e ? (r * (-1) + i * 0) : i;
    checks++;
    if (int'(o_re) != xr || int'(o_im) != xi) begin
      failures++;
      $display("FAIL en=%0d in=(%0d,%0d) out=(%0d,%0d) expected (%0d,%0d)",
               e, r, i, o_re, o_im, xr, xi);
    end
  endtask

  initial begin
    check_one(1'b1, 65535, -65535);
    check_one(1'b0, -65535, 12);
    repeat (1000)
      check_one(1'($urandom), int'($urandom % 131071) - 65535,
                int'($urandom % 131071) - 65535);
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
