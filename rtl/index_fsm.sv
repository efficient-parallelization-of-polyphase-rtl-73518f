// Filter-index state machine of the two-lane resampler.
//
// Produces, for every datapath clock (half the output rate), the polyphase
// branch index of the even output lane (s1, DL1) and of the odd lane (s2, DL2),
// following s_i[k+1] = (s_i[k] + 2D) mod N with s1[0] = 0 and s2[0] = D. The
// sequence is exact: no accumulator and no rounding. Both indices are state
// registers whose next value comes from a constant lookup table built at
// elaboration, so the loop holds no adder or modulo operator.
//
// From s1 the same tables give the control of the shared delay line:
//   shift_amt  samples the delay line takes when this step completes
//              (floor((s1 + 2D)/N): 1 or 2 for the 500->600 MHz case),
//   shift_one  shift_amt == 1 (select of the shift-by-one-or-two register),
//   dl2_same   s1 + D < N: the odd lane uses the same input window as the
//              even lane (the case s[k+1] > s[k]).
//
// After reset the machine first performs one loading step (shift_amt = 2,
// win_valid = 0) that puts the first two input samples into the delay line;
// from the next step on, every step is a valid output pair. The machine only
// advances when `step` is high, so the datapath can stall on an empty input.
// The loading step, the stall input and the table form of the outputs are
// this design's choices; the index recurrence is the published one.
module index_fsm
  import resampler_pkg::*;
#(
  parameter int N = NPHASE,
  parameter int D = DECIM,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,       // advance to the next pair of output samples
  output logic [SW-1:0] s1,         // branch index of the even lane (DL1)
  output logic [SW-1:0] s2,         // branch index of the odd lane (DL2)
  output logic          win_valid,  // the delay line holds a valid window
  output logic          dl2_same,   // DL2 uses the DL1 window this step
  output logic [1:0]    shift_amt,  // samples consumed when this step completes
  output logic          shift_one   // shift_amt == 1
);

  typedef logic [SW-1:0] idx_t;
  typedef idx_t idx_tab_t [N];
  typedef logic [1:0] amt_tab_t [N];
  typedef logic bit_tab_t [N];

  function automatic idx_tab_t mk_next();
    idx_tab_t t;
    for (int s = 0; s < N; s++) t[s] = idx_t'(idx_next(s, N, D));
    return t;
  endfunction

  function automatic amt_tab_t mk_shift();
    amt_tab_t t;
    for (int s = 0; s < N; s++) t[s] = 2'(idx_shift(s, N, D));
    return t;
  endfunction

  function automatic bit_tab_t mk_same();
    bit_tab_t t;
    for (int s = 0; s < N; s++) t[s] = idx_same(s, N, D);
    return t;
  endfunction

  localparam idx_tab_t NEXT_TAB  = mk_next();
  localparam amt_tab_t SHIFT_TAB = mk_shift();
  localparam bit_tab_t SAME_TAB  = mk_same();

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1        <= '0;
      s2        <= idx_t'(D % N);
      win_valid <= 1'b0;
    end else if (step) begin
      win_valid <= 1'b1;
      if (win_valid) begin
        s1 <= NEXT_TAB[s1];
        s2 <= NEXT_TAB[s2];
      end
    end
  end

  always_comb begin
    dl2_same  = win_valid && SAME_TAB[s1];
    shift_amt = win_valid ? SHIFT_TAB[s1] : 2'd2;
    shift_one = (shift_amt == 2'd1);
  end

  // The shared delay line and the two-lane output ordering need D <= N
  // (up-sampling or unity ratio), so at most two new samples per step.
  initial begin
    assert (D >= 1 && D <= N) else $fatal(1, "index_fsm: need 1 <= D <= N");
  end

  // Both lanes always stay D apart (mod N).
  always_ff @(posedge clk) begin
    if (rst_n)
      assert (s2 == idx_t'((int'(s1) + D) % N))
        else $error("index_fsm: lanes lost their offset D");
  end

endmodule
