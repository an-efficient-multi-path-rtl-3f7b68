// tb_mdc_fft: end-to-end test of the mdc_fft pipeline, 16 points, 4 samples per cycle (the default configuration).
//
// mdc_fft_chk sends frames (impulses, a constant, full-scale random data,
// with and without idle cycles between frames) and checks every output bin
// against a floating-point DFT, the bin order and the latency of 10 cycles
// (commutator buffers plus one register per butterfly and rotator).
// The testbench also counts how often each mechanism of the pipeline was
// used: commutator crossings, -j rotations, non-trivial twiddle products,
// frames after idle cycles and back-to-back frames. One never used is a
// failure.
module tb_mdc_fft;
  localparam int N  = 16;
  localparam int P  = 4;
  localparam int IW = 16;
  localparam int OW = 21;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n, in_valid, out_valid;
  logic signed [IW-1:0] in_re [P], in_im [P];
  logic signed [OW-1:0] out_re [P], out_im [P];
  logic [3:0]           out_index [P];
  int checks, failures, n_gap, n_b2b;
  bit done;

  mdc_fft  dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_re(out_re), .out_im(out_im), .out_index(out_index));

  mdc_fft_chk #(.N(N), .P(P), .IW(IW), .OW(OW), .LAT(10), .NF(24)) chk (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_re(out_re), .out_im(out_im), .out_index(out_index),
    .checks(checks), .failures(failures), .n_gap_frames(n_gap),
    .n_b2b_frames(n_b2b), .done(done));

  // mechanism counters
  int n_cross, n_mj, n_tw;
  initial begin n_cross = 0; n_mj = 0; n_tw = 0; end
  always @(posedge clk) begin
    if (dut.g_stage[4].u_stage.g_shuffle.g_pair[0].u_dc.swap) n_cross++;
    if (dut.g_stage[1].u_stage.g_rot[P-1].g_rotate.g_trivial.en &&
        dut.g_stage[1].u_stage.b_vld[P-1]) n_mj++;
    if (dut.g_stage[2].u_stage.g_rot[P-1].g_rotate.g_general.m != 0 &&
        dut.g_stage[2].u_stage.b_vld[P-1]) n_tw++;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never used: %s", what);
    end else $display("mechanism %s: %0d", what, n);
  endtask

  initial begin
    wait (done);
    repeat (5) @(posedge clk);
    need("commutator crossing", n_cross);
    need("-j rotation", n_mj);
    need("general twiddle", n_tw);
    need("frame after idle cycles", n_gap);
    need("back-to-back frame", n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
