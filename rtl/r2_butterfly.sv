// r2_butterfly: radix-2 decimation-in-frequency butterfly on two complex
// samples, the basic node of the FFT flow graph.
//
// sum = a + b, dif = a - b, computed on real and imaginary parts separately.
// Purely combinational; the enclosing stage registers the result. The output
// is one bit wider than the input so no sum can overflow (full bit growth).
// The add/subtract node follows the flow graph; the widths are this design's
// choice.
module r2_butterfly #(
  parameter int W = 16                       // input width of each part
) (
  input  logic signed [W-1:0] a_re, a_im,    // upper input
  input  logic signed [W-1:0] b_re, b_im,    // lower input
  output logic signed [W:0]   s_re, s_im,    // a + b (upper output)
  output logic signed [W:0]   d_re, d_im     // a - b (lower output)
);
  always_comb begin
    s_re = (W+1)'(a_re) + (W+1)'(b_re);
    s_im = (W+1)'(a_im) + (W+1)'(b_im);
    d_re = (W+1)'(a_re) - (W+1)'(b_re);
    d_im = (W+1)'(a_im) - (W+1)'(b_im);
  end
endmodule
