// rot_minus_j: trivial rotator of the radix-2^2 FFT, a multiplication by
// W_N^(N/4) = -j that needs no multiplier.
//
// When en is high the output is (re + j im) * (-j) = im - j re, i.e. the two
// parts are swapped and the new imaginary part is negated; when en is low the
// sample passes unchanged. Combinational. The caller only enables it on the
// difference output of a butterfly, whose range is symmetric, so the
// negation cannot overflow at width W.
module rot_minus_j #(
  parameter int W = 17
) (
  input  logic                en,
  input  logic signed [W-1:0] i_re, i_im,
  output logic signed [W-1:0] o_re, o_im
);
  always_comb begin
    if (en) begin
      o_re = i_im;
      o_im = -i_re;
    end else begin
      o_re = i_re;
      o_im = i_im;
    end
  end
endmodule
