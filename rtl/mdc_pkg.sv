// mdc_pkg: shared constants, types and elaboration-time helpers of the
// radix-2^2 feed-forward (multi-path delay commutator) FFT.
//
// The FFT works on N = 2^NB points that arrive P = 2^PB per clock cycle.
// Every sample of a frame has an n-bit index b[NB-1:0]. At any point of the
// pipeline each index bit is held either by a lane bit (which of the P wires
// the sample is on) or by a time bit (in which of the N/P cycles of the frame
// it passes). Input order is natural: lane bit i holds b[NB-PB+i] and time
// bit k holds b[k], so lane l carries x[l*N/P + t] in cycle t of the frame.
// Stage s (1..NB) is the radix-2 butterfly on index bit b[NB-s]. For s <= PB
// that bit is already on a lane bit (p-s); for s > PB a delay commutator in
// front of the stage exchanges lane bit 0 with time bit NB-s.
// bit_pos() replays these exchanges at elaboration to find where a bit is.
package mdc_pkg;

  // Largest supported index width (N up to 2^16).
  localparam int MAX_NB = 16;

  typedef int pos_arr_t [MAX_NB];

  // Position of every index bit at stage s (after the shuffle in front of
  // stage s, if any). A value v >= 0 means time bit v; v < 0 means lane bit
  // (-v-1).
  function automatic pos_arr_t bit_pos(int nb, int pb, int s);
    pos_arr_t pos;
    int lane0_holds;
    for (int b = 0; b < MAX_NB; b++) pos[b] = 0;
    for (int b = 0; b < nb; b++) begin
      if (b >= nb - pb) pos[b] = -(b - (nb - pb)) - 1;
      else              pos[b] = b;
    end
    lane0_holds = nb - pb;            // lane bit 0 holds b[nb-pb] initially
    for (int st = pb + 1; st <= s; st++) begin
      // exchange lane bit 0 with time bit nb-st
      pos[lane0_holds] = nb - st;
      pos[nb - st]     = -1;
      lane0_holds      = nb - st;
    end
    return pos;
  endfunction

  // Lane bit on which the butterflies of stage s pair their two inputs.
  function automatic int bf_lane_bit(int pb, int s);
    return (s <= pb) ? pb - s : 0;
  endfunction

  // Width of the data entering stage s (s = NB+1 gives the output width).
  // Every butterfly adds one bit, every general rotator adds one bit; the
  // trivial -j rotator keeps the width.
  function automatic int stage_w(int iw, int nb, int s);
    int w;
    w = iw;
    for (int st = 1; st < s; st++) begin
      w = w + 1;
      if ((st % 2 == 0) && (st < nb)) w = w + 1;
    end
    return w;
  endfunction

  // Delay (in cycles) of the commutator in front of stage s, 0 if none.
  function automatic int shuffle_delay(int nb, int pb, int s);
    return (s > pb) ? (1 << (nb - s)) : 0;
  endfunction

  // Input-to-output latency of the whole pipeline in cycles: one register per
  // butterfly stage, one per rotator (stages 1..NB-1) and the commutators.
  function automatic int pipe_latency(int nb, int pb);
    int l;
    l = 0;
    for (int s = 1; s <= nb; s++) begin
      l = l + 1 + shuffle_delay(nb, pb, s);
      if (s < nb) l = l + 1;
    end
    return l;
  endfunction

  // Twiddle exponent (in units of W_N) applied after stage s to the sample in
  // row r; 0 after odd stages, where only -j rotations occur.
  function automatic int twiddle_exp(int nb, int s, int r);
    int e;
    if (s % 2 != 0 || s >= nb) return 0;
    e = (((r >> (nb - s + 1)) & 1) + 2 * ((r >> (nb - s)) & 1)) *
        (r & ((1 << (nb - s)) - 1));
    return (e << (s - 2)) % (1 << nb);
  endfunction

  // Row of the flow graph held by lane `lane` at time index `t` in stage s.
  function automatic int row_of(int nb, int pb, int s, int lane, int t);
    pos_arr_t pos;
    int r;
    pos = bit_pos(nb, pb, s);
    r = 0;
    for (int b = 0; b < nb; b++) begin
      if (pos[b] >= 0) r = r | (((t >> pos[b]) & 1) << b);
      else             r = r | (((lane >> (-pos[b] - 1)) & 1) << b);
    end
    return r;
  endfunction

  // True if the general rotator of lane `lane` after stage s only ever
  // multiplies by W^0 = 1, so it needs no multiplier.
  function automatic bit twiddle_always_one(int nb, int pb, int s, int lane);
    for (int t = 0; t < (1 << (nb - pb)); t++)
      if (twiddle_exp(nb, s, row_of(nb, pb, s, lane, t)) != 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int bitrev(int v, int nb);
    int r;
    r = 0;
    for (int b = 0; b < nb; b++) if (((v >> b) & 1) != 0) r = r | (1 << (nb - 1 - b));
    return r;
  endfunction

endpackage
