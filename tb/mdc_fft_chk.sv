// mdc_fft_chk: stimulus generator and checker for the mdc_fft pipeline,
// shared by its testbenches.
//
// It sends NF frames: an impulse at x[0], an impulse at a random position, a
// constant, then full-scale random complex samples. Frames are sent back to
// back or separated by 1-3 idle cycles, at random. For each frame it works
// out the expected spectrum by evaluating the DFT sum directly in floating
// point, then compares every output bin, identified by out_index, with it
// within TOL LSBs per part. It also checks that every bin of a frame appears
// exactly once, that a frame's outputs occupy FL consecutive cycles and that
// its first outputs appear exactly LAT cycles after its first inputs.
module mdc_fft_chk #(
  parameter int N   = 16,
  parameter int P   = 4,
  parameter int IW  = 16,
  parameter int OW  = 21,
  parameter int LAT = 10,
  parameter int NF  = 24,
  parameter int TOL = 16
) (
  input  logic                 clk,
  output logic                 rst_n,
  output logic                 in_valid,
  output logic signed [IW-1:0] in_re     [P],
  output logic signed [IW-1:0] in_im     [P],
  input  logic                 out_valid,
  input  logic signed [OW-1:0] out_re    [P],
  input  logic signed [OW-1:0] out_im    [P],
  input  logic [$clog2(N)-1:0] out_index [P],
  output int                   checks,
  output int                   failures,
  output int                   n_gap_frames,
  output int                   n_b2b_frames,
  output bit                   done
);
  localparam int  FL = N / P;
  localparam real PI = 3.14159265358979323846;

  real    xr [NF][N], xi [NF][N];
  real    er [NF][N], ei [NF][N];
  longint start_cyc [NF];
  longint cyc;
  int     sent;

  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic real rnd_full();
    return real'($signed(16'($urandom))) / real'(1 << (16 - IW));
  endfunction

  task automatic make_frame(int f);
    int pos;
    pos = $urandom % N;
    for (int n = 0; n < N; n++) begin
      case (f)
        0:       begin xr[f][n] = (n == 0)   ? 20000.0 : 0.0; xi[f][n] = 0.0; end
        1:       begin xr[f][n] = (n == pos) ? -12345.0 : 0.0; xi[f][n] = (n == pos) ? 777.0 : 0.0; end
        2:       begin xr[f][n] = 1000.0; xi[f][n] = -2000.0; end
        default: begin xr[f][n] = $floor(rnd_full()); xi[f][n] = $floor(rnd_full()); end
      endcase
    end
    for (int k = 0; k < N; k++) begin
      er[f][k] = 0.0;
      ei[f][k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a = -2.0 * PI * real'((k * n) % N) / N;
        er[f][k] += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
        ei[f][k] += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
      end
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    cyc = 0;
    checks = 0;
    failures = 0;
    n_gap_frames = 0;
    n_b2b_frames = 0;
    done = 0;
    sent = 0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int l = 0; l < P; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      int gap;
      make_frame(f);
      gap = (f == 0) ? 2 : ((f % 3 == 1) ? 0 : int'($urandom % 4));
      if (f > 0) begin
        if (gap == 0) n_b2b_frames++;
        else          n_gap_frames++;
      end
      repeat (gap) begin
        in_valid <= 1'b0;
        for (int l = 0; l < P; l++) begin
          in_re[l] <= IW'($urandom);      // junk on idle cycles
          in_im[l] <= IW'($urandom);
        end
        @(posedge clk);
      end
      for (int t = 0; t < FL; t++) begin
        if (t == 0) start_cyc[f] = cyc;
        in_valid <= 1'b1;
        for (int l = 0; l < P; l++) begin
          in_re[l] <= IW'($rtoi(xr[f][l * FL + t]));
          in_im[l] <= IW'($rtoi(xi[f][l * FL + t]));
        end
        @(posedge clk);
      end
      sent = f + 1;
    end
    in_valid <= 1'b0;
  end

  // ---------------- checker ----------------
  int  of, ot;                 // output frame and cycle within it
  bit  seen [N];
  longint last_cyc;

  initial begin
    of = 0;
    ot = 0;
    last_cyc = 0;
    forever begin
      @(posedge clk);
      if (rst_n && out_valid && of < NF) begin
        if (ot == 0) begin
          for (int k = 0; k < N; k++) seen[k] = 0;
          checks++;
          if (cyc - 1 != start_cyc[of] + LAT) begin
            failures++;
            $display("FAIL frame %0d: latency %0d, expected %0d", of,
                     cyc - 1 - start_cyc[of], LAT);
          end
        end else begin
          checks++;
          if (cyc - 1 != last_cyc + 1) begin
            failures++;
            $display("FAIL frame %0d: output cycle %0d not contiguous", of, ot);
          end
        end
        last_cyc = cyc - 1;
        for (int l = 0; l < P; l++) begin
          int  k;
          real dr, di;
          k = int'(out_index[l]);
          checks++;
          if (seen[k]) begin
            failures++;
            $display("FAIL frame %0d: bin %0d delivered twice", of, k);
          end
          seen[k] = 1;
          dr = real'(out_re[l]) - er[of][k];
          di = real'(out_im[l]) - ei[of][k];
          checks++;
          if (dr > TOL || dr < -TOL || di > TOL || di < -TOL) begin
            failures++;
            $display("FAIL frame %0d bin %0d lane %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                     of, k, l, out_re[l], out_im[l], er[of][k], ei[of][k]);
          end
        end
        ot++;
        if (ot == FL) begin
          for (int k = 0; k < N; k++) begin
            checks++;
            if (!seen[k]) begin
              failures++;
              $display("FAIL frame %0d: bin %0d missing", of, k);
            end
          end
          ot = 0;
          of++;
          if (of == NF) done = 1;
        end
      end
    end
  end
endmodule
