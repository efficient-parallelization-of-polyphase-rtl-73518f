// Polyphase coefficient lookup table.
//
// Holds the N*TAPS prototype filter coefficients arranged by branch: for
// branch index `idx` it returns coef[j] = h[idx + N*j], j = 0 .. TAPS-1, the
// coefficients of polyphase filter `idx` with coef[0] multiplying the newest
// sample. The read is combinational (a LUT-based ROM); the multiply-add block
// that follows registers the result. An index of N or more returns zeros.
//
// The prototype h is a root-raised-cosine pulse-shaping filter with roll-off
// 0.1, N samples per input symbol, quantised to COEF_W bits with COEF_FRAC
// fractional bits (see resampler_pkg::proto_coef). Using the pulse-shaping
// filter as the resampling filter, and storing the coefficients in LUTs,
// follow the published design; the particular filter, its centring and its
// quantisation are this design's choices.
module coef_rom
  import resampler_pkg::*;
#(
  parameter int N  = NPHASE,
  parameter int NT = TAPS,
  parameter int CW = COEF_W,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          [SW-1:0] idx,
  output logic signed   [CW-1:0] coef [NT]
);

  // Flat table, entry p*NT + j holds tap j of branch p.
  typedef logic signed [CW-1:0] tab_t [N*NT];

  function automatic tab_t mk_tab();
    tab_t t;
    for (int p = 0; p < N; p++)
      for (int j = 0; j < NT; j++)
        t[p*NT + j] = CW'(branch_coef(p, j, N, NT));
    return t;
  endfunction

  localparam tab_t TAB = mk_tab();

  always_comb begin
    for (int j = 0; j < NT; j++) coef[j] = '0;
    for (int p = 0; p < N; p++)
      if (idx == SW'(p))
        for (int j = 0; j < NT; j++) coef[j] = TAB[p*NT + j];
  end

endmodule
