// mdc_fft: N-point radix-2^2 feed-forward FFT, a multi-path delay commutator
// (MDC) pipeline that takes P complex samples per clock cycle and delivers P
// frequency bins per clock cycle, continuously.
//
// The pipeline has log2 N stages (mdc_stage). Each is P/2 radix-2
// decimation-in-frequency butterflies followed by a rotator: a -j rotator
// after the odd stages, a general twiddle multiplier after the even ones, as
// in the radix-2^2 flow graph. While the butterfly bit is a lane bit the
// stages are joined by plain wires; once it is a time bit, a delay
// commutator brings it onto a lane first. With the defaults (N = 16,
// P = 4) stages 1 and 2 are wired directly and stages 3 and 4 are preceded
// by commutators with 2- and 1-cycle buffers.
//
// Interface: a frame is N/P consecutive cycles with in_valid high; in cycle
// t of the frame lane l carries x[l*N/P + t] (natural order). Idle cycles may
// separate frames, not split them. Each output cycle with out_valid high
// gives P bins; out_index[l] says which bin X[k] lane l carries. Bins leave
// in the bit-reversed order of the flow graph, P per cycle, not reordered.
// The first bins of a frame leave LATENCY cycles after its first samples
// entered (10 cycles for the defaults), then one cycle per cycle follows.
// Data grow without scaling: one bit per butterfly and one per general
// rotator, so the outputs are OW bits wide (21 for the defaults).
// Stages, rotations and parallelism follow the document; the sample order,
// widths, rounding, handshake and index output are this design's choices.
module mdc_fft
  import mdc_pkg::*;
#(
  parameter int N  = 16,        // FFT size, a power of 4 from 4 to 2^16
  parameter int P  = 4,         // samples per cycle, a power of 2 from 2 to N
  parameter int IW = 16,        // input width of each part
  parameter int TW = 16,        // twiddle coefficient width
  localparam int NB      = $clog2(N),
  localparam int PB      = $clog2(P),
  localparam int OW      = stage_w(IW, NB, NB + 1),
  localparam int LATENCY = pipe_latency(NB, PB)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re     [P],
  input  logic signed [IW-1:0] in_im     [P],
  output logic                 out_valid,
  output logic signed [OW-1:0] out_re    [P],
  output logic signed [OW-1:0] out_im    [P],
  output logic [NB-1:0]        out_index [P]
);
  localparam int TGW = (NB > PB) ? NB - PB : 1;
  localparam int FL  = N / P;                    // cycles per frame

  initial begin
    assert ((1 << NB) == N && NB % 2 == 0 && NB <= MAX_NB)
      else $error("N must be a power of 4 up to 2^16");
    assert ((1 << PB) == P && PB >= 1 && PB <= NB)
      else $error("P must be a power of 2 from 2 to N");
  end

  // time index of the input samples within their frame
  logic [TGW-1:0] in_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        in_cnt <= '0;
    else if (in_valid) in_cnt <= (FL <= 1 || int'(in_cnt) == FL - 1) ? '0 : in_cnt + 1'b1;
  end

  // the first bins of every frame, X[0] on lane 0 first, leave LATENCY
  // cycles after the frame's first samples
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_cnt == '0 |-> ##LATENCY (out_valid && out_index[0] == '0));

  // inter-stage buses, OW bits wide, each stage uses its low bits
  logic                 bus_vld [NB+1][P];
  logic [TGW-1:0]       bus_tag [NB+1][P];
  logic signed [OW-1:0] bus_re  [NB+1][P];
  logic signed [OW-1:0] bus_im  [NB+1][P];

  for (genvar l = 0; l < P; l++) begin : g_in
    assign bus_vld[0][l] = in_valid;
    assign bus_tag[0][l] = in_cnt;
    assign bus_re[0][l]  = OW'(in_re[l]);
    assign bus_im[0][l]  = OW'(in_im[l]);
  end

  for (genvar s = 1; s <= NB; s++) begin : g_stage
    localparam int WI = stage_w(IW, NB, s);
    localparam int WO = stage_w(IW, NB, s + 1);
    logic signed [WI-1:0] si_re [P];
    logic signed [WI-1:0] si_im [P];
    logic signed [WO-1:0] so_re [P];
    logic signed [WO-1:0] so_im [P];

    for (genvar l = 0; l < P; l++) begin : g_lane
      assign si_re[l] = bus_re[s-1][l][WI-1:0];
      assign si_im[l] = bus_im[s-1][l][WI-1:0];
      assign bus_re[s][l] = OW'(so_re[l]);
      assign bus_im[s][l] = OW'(so_im[l]);
    end

    mdc_stage #(.NB(NB), .PB(PB), .S(s), .WI(WI), .TW(TW), .TGW(TGW)) u_stage (
      .clk(clk), .rst_n(rst_n),
      .i_vld(bus_vld[s-1]), .i_tag(bus_tag[s-1]), .i_re(si_re), .i_im(si_im),
      .o_vld(bus_vld[s]),   .o_tag(bus_tag[s]),   .o_re(so_re), .o_im(so_im));
  end

  // output: bin number of each lane from its row in the flow graph
  localparam pos_arr_t POS = bit_pos(NB, PB, NB);

  assign out_valid = bus_vld[NB][0];
  for (genvar l = 0; l < P; l++) begin : g_out
    logic [NB-1:0] row;
    always_comb begin
      for (int b = 0; b < NB; b++) begin
        if (POS[b] >= 0) row[b] = bus_tag[NB][l][(POS[b] >= 0) ? POS[b] : 0];
        else             row[b] = ((l >> (-POS[b] - 1)) & 1) != 0;
      end
      for (int b = 0; b < NB; b++) out_index[l][b] = row[NB-1-b];
    end
    assign out_re[l] = bus_re[NB][l];
    assign out_im[l] = bus_im[NB][l];
  end
endmodule
