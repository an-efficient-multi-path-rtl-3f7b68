// tb_delay_commutator: test of one delay commutator exchanging the lane bit
// with time bit K = 1 (2-cycle buffers) of a 4-cycle frame.
//
// Every sample carries a unique number in its real part (frame, lane, time).
// At the output the test decodes it and checks that lane u holds samples
// whose old time bit K was 0 and lane v those whose old time bit K was 1,
// that the new tag bit K equals the sample's old lane and the other tag bit
// is unchanged, that output slot T of a frame (new tag T) leaves exactly
// 2 + T cycles after the frame's first input cycle, and that every sample
// leaves once. Frames are sent back to back and with
// idle cycles between them.
module tb_delay_commutator;
  localparam int W = 16, TGW = 2, K = 1, D = 2, FL = 4, NF = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n;
  logic                u_vld, v_vld, ou_vld, ov_vld;
  logic [TGW-1:0]      u_tag, v_tag, ou_tag, ov_tag;
  logic signed [W-1:0] u_re, u_im, v_re, v_im, ou_re, ou_im, ov_re, ov_im;
  int checks = 0, failures = 0, outs = 0;
  longint cyc = 0;
  longint t_in [NF];

  delay_commutator #(.W(W), .TGW(TGW), .K(K)) dut (.*);

  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic int id(int f, int lane, int t);
    return f * 8 + lane * 4 + t;
  endfunction

  initial begin
    rst_n = 1'b0;
    {u_vld, v_vld} = '0;
    u_tag = '0; v_tag = '0; u_re = '0; u_im = '0; v_re = '0; v_im = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      repeat ((f % 2 == 0) ? 0 : int'($urandom % 4)) begin
        u_vld <= 1'b0; v_vld <= 1'b0;
        u_re <= W'($urandom); v_re <= W'($urandom);
        @(posedge clk);
      end
      for (int t = 0; t < FL; t++) begin
        u_vld <= 1'b1; v_vld <= 1'b1;
        u_tag <= TGW'(t); v_tag <= TGW'(t);
        u_re <= W'(id(f, 0, t)); v_re <= W'(id(f, 1, t));
        u_im <= W'(-id(f, 0, t)); v_im <= W'(-id(f, 1, t));
        if (t == 0) t_in[f] = cyc + 1;
        @(posedge clk);
      end
    end
    u_vld <= 1'b0; v_vld <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (outs != NF * 2 * FL) begin
      failures++;
      $display("FAIL %0d samples left, %0d sent", outs, NF * 2 * FL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(bit lane_v, logic [TGW-1:0] tag,
                           logic signed [W-1:0] re, logic signed [W-1:0] im);
    int i, ol, ot;
    i  = int'(re);
    ol = (i / 4) % 2;
    ot = i % 4;
    outs++;
    checks++;
    if (int'(im) != -i || ((ot >> K) & 1) != int'(lane_v) ||
        int'(tag[K]) != ol || tag[0] != 1'(ot) || cyc - t_in[i / 8] != D + int'(tag)) begin
      failures++;
      $display("FAIL lane %0d: sample %0d (old lane %0d time %0d) tag %0d after %0d cycles",
               lane_v, i, ol, ot, tag, cyc - t_in[i / 8]);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (ou_vld) check_out(1'b0, ou_tag, ou_re, ou_im);
      if (ov_vld) check_out(1'b1, ov_tag, ov_re, ov_im);
      if (ou_vld != ov_vld) begin
        checks++;
        failures++;
        $display("FAIL output lanes not aligned");
      end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
