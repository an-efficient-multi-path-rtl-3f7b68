// twiddle_rom: table of the twiddle factors W_N^m = cos(2*pi*m/N) -
// j*sin(2*pi*m/N) for m = 0..N-1, used by the general rotator.
//
// The table is computed at elaboration from $cos/$sin and rounded to signed
// TW-bit coefficients with TW-2 fraction bits, so 1.0 is 2^(TW-2) and both
// +1 and -1 are exact. The read is combinational. The coefficient format is
// this design's choice.
module twiddle_rom #(
  parameter int N  = 16,
  parameter int TW = 16
) (
  input  logic [$clog2(N)-1:0]  m,
  output logic signed [TW-1:0]  w_re,   // cos(2 pi m / N)
  output logic signed [TW-1:0]  w_im    // -sin(2 pi m / N)
);
  typedef logic signed [TW-1:0] coef_t;
  typedef coef_t tab_t [N];

  localparam real PI = 3.14159265358979323846;

  function automatic tab_t gen_tab(bit imag);
    tab_t t;
    real a, v;
    for (int k = 0; k < N; k++) begin
      a = 2.0 * PI * k / N;
      v = imag ? -$sin(a) : $cos(a);
      t[k] = coef_t'($rtoi($floor(v * (2.0 ** (TW - 2)) + 0.5)));
    end
    return t;
  endfunction

  localparam tab_t COS_TAB  = gen_tab(1'b0);
  localparam tab_t NSIN_TAB = gen_tab(1'b1);

  assign w_re = COS_TAB[m];
  assign w_im = NSIN_TAB[m];
endmodule
