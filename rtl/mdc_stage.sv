// mdc_stage: stage S of the radix-2^2 feed-forward FFT: an optional delay
// commutator, P/2 radix-2 butterflies and the rotator that follows them.
//
// Stage S computes the butterflies on index bit NB-S. If that bit is a time
// bit (S > PB) a delay commutator per lane pair first brings it onto lane
// bit 0. The butterflies pair the lanes that differ in the lane bit holding
// it and are registered. Then each lane is rotated, as the radix-2^2 flow
// graph prescribes for the sample's row r (its index bits, rebuilt from the
// lane number and the sample's time tag):
//   odd S < NB : multiply by -j when r[NB-S] and r[NB-S-1] are both 1;
//   even S < NB: multiply by W_N^(e * 2^(S-2)) with
//                e = (r[NB-S+1] + 2 r[NB-S]) * (r mod 2^(NB-S));
//   S = NB     : no rotation.
// For N = 16 these are the exponents 4 (-j) after stages 1 and 3 and
// 0,2,4,6 / 0,1,2,3 / 0,3,6,9 after stage 2. The rotator output is
// registered too. Lanes whose twiddle is W^0 for every sample (found at
// elaboration) get no multiplier. A stage takes 2^(NB-S) (commutator, if any) + 1
// (butterfly) + 1 (rotator, if any) cycles.
module mdc_stage
  import mdc_pkg::*;
#(
  parameter int NB  = 4,        // log2 N
  parameter int PB  = 2,        // log2 P
  parameter int S   = 1,        // stage number, 1..NB
  parameter int WI  = 16,       // input width of each part
  parameter int TW  = 16,       // twiddle coefficient width
  parameter int TGW = 2,        // time tag width, max(1, NB-PB)
  localparam int P  = 1 << PB,
  localparam int WO = WI + 1 + (((S % 2) == 0 && S < NB) ? 1 : 0)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 i_vld [P],
  input  logic [TGW-1:0]       i_tag [P],
  input  logic signed [WI-1:0] i_re  [P],
  input  logic signed [WI-1:0] i_im  [P],
  output logic                 o_vld [P],
  output logic [TGW-1:0]       o_tag [P],
  output logic signed [WO-1:0] o_re  [P],
  output logic signed [WO-1:0] o_im  [P]
);
  localparam int       BL  = bf_lane_bit(PB, S);
  localparam pos_arr_t POS = bit_pos(NB, PB, S);
  localparam int       N   = 1 << NB;
  localparam int       WB  = WI + 1;            // butterfly output width

  // ---------------- shuffle ----------------
  logic                 s_vld [P];
  logic [TGW-1:0]       s_tag [P];
  logic signed [WI-1:0] s_re  [P];
  logic signed [WI-1:0] s_im  [P];

  if (S > PB) begin : g_shuffle
    for (genvar q = 0; q < P / 2; q++) begin : g_pair
      delay_commutator #(.W(WI), .TGW(TGW), .K(NB - S)) u_dc (
        .clk(clk), .rst_n(rst_n),
        .u_vld(i_vld[2*q]),   .v_vld(i_vld[2*q+1]),
        .u_tag(i_tag[2*q]),   .v_tag(i_tag[2*q+1]),
        .u_re(i_re[2*q]),     .u_im(i_im[2*q]),
        .v_re(i_re[2*q+1]),   .v_im(i_im[2*q+1]),
        .ou_vld(s_vld[2*q]),  .ov_vld(s_vld[2*q+1]),
        .ou_tag(s_tag[2*q]),  .ov_tag(s_tag[2*q+1]),
        .ou_re(s_re[2*q]),    .ou_im(s_im[2*q]),
        .ov_re(s_re[2*q+1]),  .ov_im(s_im[2*q+1]));
    end
  end else begin : g_noshuffle
    assign s_vld = i_vld;
    assign s_tag = i_tag;
    assign s_re  = i_re;
    assign s_im  = i_im;
  end

  // ---------------- butterflies ----------------
  logic                 b_vld [P];
  logic [TGW-1:0]       b_tag [P];
  logic signed [WB-1:0] b_re  [P];
  logic signed [WB-1:0] b_im  [P];

  for (genvar q = 0; q < P / 2; q++) begin : g_bf
    localparam int U = ((q >> BL) << (BL + 1)) | (q & ((1 << BL) - 1));
    localparam int V = U | (1 << BL);
    logic signed [WB-1:0] sr, si, dr, di;

    r2_butterfly #(.W(WI)) u_bf (
      .a_re(s_re[U]), .a_im(s_im[U]), .b_re(s_re[V]), .b_im(s_im[V]),
      .s_re(sr), .s_im(si), .d_re(dr), .d_im(di));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        b_vld[U] <= 1'b0;
        b_vld[V] <= 1'b0;
        b_tag[U] <= '0;
        b_tag[V] <= '0;
      end else begin
        b_vld[U] <= s_vld[U];
        b_vld[V] <= s_vld[V];
        b_tag[U] <= s_tag[U];
        b_tag[V] <= s_tag[V];
      end
    end
    always_ff @(posedge clk) begin
      b_re[U] <= sr;
      b_im[U] <= si;
      b_re[V] <= dr;
      b_im[V] <= di;
    end

    a_pair: assert property (@(posedge clk) disable iff (!rst_n)
      s_vld[U] == s_vld[V] && (!s_vld[U] || s_tag[U] == s_tag[V]));
  end

  // ---------------- rotators ----------------
  for (genvar l = 0; l < P; l++) begin : g_rot
    if (S == NB) begin : g_none
      assign o_vld[l] = b_vld[l];
      assign o_tag[l] = b_tag[l];
      assign o_re[l]  = b_re[l];
      assign o_im[l]  = b_im[l];
    end else begin : g_rotate
      logic signed [WO-1:0] r_re, r_im;
      logic [NB-1:0]        row;

      always_comb begin
        for (int b = 0; b < NB; b++) begin
          if (POS[b] >= 0) row[b] = b_tag[l][(POS[b] >= 0) ? POS[b] : 0];
          else             row[b] = ((l >> (-POS[b] - 1)) & 1) != 0;
        end
      end

      if ((S % 2) == 1) begin : g_trivial
        logic en;
        assign en = row[NB-S] & row[NB-S-1];
        rot_minus_j #(.W(WB)) u_rot (
          .en(en), .i_re(b_re[l]), .i_im(b_im[l]), .o_re(r_re), .o_im(r_im));
      end else if (twiddle_always_one(NB, PB, S, l)) begin : g_unity
        // every sample of this lane is multiplied by W^0: no multiplier
        assign r_re = WO'(b_re[l]);
        assign r_im = WO'(b_im[l]);
      end else begin : g_general
        logic [NB-1:0]        m;
        logic signed [TW-1:0] w_re, w_im;
        always_comb begin
          int e;
          e = (int'(row[NB-S+1]) + 2 * int'(row[NB-S])) *
              (int'(row) & ((1 << (NB - S)) - 1));
          m = NB'(e << (S - 2));
        end
        twiddle_rom #(.N(N), .TW(TW)) u_rom (.m(m), .w_re(w_re), .w_im(w_im));
        cmult #(.W(WB), .TW(TW)) u_mul (
          .z_re(b_re[l]), .z_im(b_im[l]), .w_re(w_re), .w_im(w_im),
          .p_re(r_re), .p_im(r_im));
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          o_vld[l] <= 1'b0;
          o_tag[l] <= '0;
        end else begin
          o_vld[l] <= b_vld[l];
          o_tag[l] <= b_tag[l];
        end
      end
      always_ff @(posedge clk) begin
        o_re[l] <= r_re;
        o_im[l] <= r_im;
      end
    end
  end
endmodule
