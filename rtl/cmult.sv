// cmult: complex multiplier of the general rotator, z * w with a data sample
// z and a twiddle coefficient w.
//
// Four real products form re = zr*wr - zi*wi and im = zr*wi + zi*wr; the sums
// are rounded (add half an LSB, arithmetic shift) by TW-2 bits, the fraction
// bits of the coefficient. The output keeps one bit more than the input,
// because rotating a sample can raise one part by up to sqrt(2). Purely
// combinational; the enclosing stage registers it. The four-multiplier form
// follows the document's use of hardware multipliers for the complex product;
// rounding and widths are this design's choice.
module cmult #(
  parameter int W  = 18,                    // data width of each part
  parameter int TW = 16                     // coefficient width
) (
  input  logic signed [W-1:0]  z_re, z_im,
  input  logic signed [TW-1:0] w_re, w_im,
  output logic signed [W:0]    p_re, p_im
);
  localparam int PW = W + TW + 1;
  logic signed [PW-1:0] acc_re, acc_im;

  always_comb begin
    acc_re = PW'(z_re) * PW'(w_re) - PW'(z_im) * PW'(w_im) + PW'(1 <<< (TW - 3));
    acc_im = PW'(z_re) * PW'(w_im) + PW'(z_im) * PW'(w_re) + PW'(1 <<< (TW - 3));
    p_re   = (W+1)'(acc_re >>> (TW - 2));
    p_im   = (W+1)'(acc_im >>> (TW - 2));
  end
endmodule
