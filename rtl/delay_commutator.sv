// delay_commutator: the shuffling element of a multi-path delay commutator
// (MDC) pipeline. It exchanges, for one pair of lanes, a lane bit of the
// sample index with time bit K of the index.
//
// Lane u holds the samples whose lane bit is 0, lane v those whose lane bit
// is 1. Lane v is delayed by D = 2^K cycles and meets lane u at a 2x2 switch;
// the switch crosses when the sample on lane u is valid and has tag bit K
// set. The upper switch output is then delayed by D cycles. Afterwards lane u
// holds the samples whose old time bit K was 0, lane v those whose old time
// bit K was 1, and the new time bit K is the old lane bit; the tag of every
// sample is rewritten to say so. A sample waits 0, D or 2D cycles, depending
// on its path, so that output slot T of a frame leaves D cycles after input
// slot T: the frame as a whole is delayed by D. The tags of the two lanes are equal in every cycle at the
// output, which an assertion checks. Each sample carries a valid flag and its
// time tag, so idle cycles between frames pass through correctly; within a
// frame the N/P cycles must be contiguous.
// The buffer-switch-buffer structure is the classic MDC commutator; carrying
// tags and valid flags with the data is this design's choice.
module delay_commutator #(
  parameter int W   = 16,       // data width of each part
  parameter int TGW = 2,        // tag (time index) width
  parameter int K   = 0         // time bit exchanged, delay is 2^K
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                u_vld, v_vld,
  input  logic [TGW-1:0]      u_tag, v_tag,
  input  logic signed [W-1:0] u_re, u_im, v_re, v_im,
  output logic                ou_vld, ov_vld,
  output logic [TGW-1:0]      ou_tag, ov_tag,
  output logic signed [W-1:0] ou_re, ou_im, ov_re, ov_im
);
  localparam int D  = 1 << K;
  localparam int SW = 1 + TGW + 2 * W;

  typedef struct packed {
    logic                vld;
    logic [TGW-1:0]      tag;
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } smp_t;

  smp_t a, b, b_in, upper, lower, upper_d;
  logic swap;

  assign a    = '{vld: u_vld, tag: u_tag, re: u_re, im: u_im};
  assign b_in = '{vld: v_vld, tag: v_tag, re: v_re, im: v_im};

  delay_line #(.WIDTH(SW), .DEPTH(D)) u_dly_v (
    .clk(clk), .rst_n(rst_n), .d(b_in), .q(b));

  always_comb begin
    swap  = a.vld && a.tag[K];
    upper = swap ? b : a;
    lower = swap ? a : b;
    // new time bit K = lane bit the sample came from
    upper.tag[K] = swap;
    lower.tag[K] = !swap;
  end

  delay_line #(.WIDTH(SW), .DEPTH(D)) u_dly_u (
    .clk(clk), .rst_n(rst_n), .d(upper), .q(upper_d));

  assign ou_vld = upper_d.vld;
  assign ou_tag = upper_d.tag;
  assign ou_re  = upper_d.re;
  assign ou_im  = upper_d.im;
  assign ov_vld = lower.vld;
  assign ov_tag = lower.tag;
  assign ov_re  = lower.re;
  assign ov_im  = lower.im;

  // both outputs of a pair belong to the same output slot
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    ou_vld == ov_vld && (!ou_vld || ou_tag == ov_tag));
endmodule
