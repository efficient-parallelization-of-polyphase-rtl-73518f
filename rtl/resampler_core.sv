// Two-lane polyphase arbitrary-resampling FIR datapath (single delay line).
//
// Resamples by f = N/D (6/5 by default). Output sample k is
//   y[k] = sum_j h[s_k + N*j] * x[n_k - j],  s_k = kD mod N, n_k = floor(kD/N),
// the output of polyphase branch s_k applied to the input window that ends at
// x[n_k]. The datapath runs at half the output rate and computes two outputs
// per clock: the even sample y[2c] in lane DL1 and the odd sample y[2c+1] in
// lane DL2.
//
// Both lanes read one physical delay line (pdl, TAPS+1 registers). DL1 uses
// taps 1..TAPS; DL2 uses taps 0..TAPS-1, one sample ahead, except when both
// outputs of the pair fall on the same input window (s1 + D < N), when a row of
// 2:1 multiplexers gives DL2 the DL1 window. After each pair the delay line
// takes floor((s1 + 2D)/N) new samples: two normally, one after a
// same-window pair, which puts DL2 one sample ahead again. index_fsm supplies
// s1, s2 and these controls from lookup tables, two coef_rom instances turn
// the indices into coefficient rows, and two mac instances do the
// multiply-adds.
//
// Input interface: the input buffer shows its two oldest samples (input2 the
// oldest, input1 the next) and how many it holds (avail); the core pops 0, 1
// or 2 of them per clock. It waits for PREFILL samples before its first step
// and afterwards stalls (no step, no output pair) whenever fewer samples are
// buffered than the step needs. Output: y1 (even) and y2 (odd) with y_valid,
// LATENCY = mac latency + 1 clocks after the step that formed them. Each
// accumulator is rounded (add half an LSB, shift right by COEF_FRAC) and
// saturated to OUT_W bits. The delay-line sharing, the multiplexers and the
// index recurrence follow the published architecture; prefill, stalling and
// the output rounding are this design's choices.
module resampler_core
  import resampler_pkg::*;
#(
  parameter int N     = NPHASE,
  parameter int D     = DECIM,
  parameter int NT    = TAPS,
  parameter int DW    = DATA_W,
  parameter int CW    = COEF_W,
  parameter int OW    = OUT_W,
  parameter int FRAC  = COEF_FRAC,
  parameter int CNTW  = FIFO_AW + 1,
  parameter int START = PREFILL,
  localparam int SW   = (N > 1) ? $clog2(N) : 1,
  localparam int AW   = DW + CW + ((NT > 1) ? $clog2(NT) : 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input buffer side
  input  logic [CNTW-1:0]      avail,
  input  logic signed [DW-1:0] input1,
  input  logic signed [DW-1:0] input2,
  output logic [1:0]           pop,
  // output pair
  output logic                 y_valid,
  output logic signed [OW-1:0] y1,
  output logic signed [OW-1:0] y2,
  // status
  output logic                 stall      // running, but input buffer too low
);

  logic [SW-1:0] s1, s2;
  logic          win_valid, dl2_same, shift_one, step, started, go;
  logic [1:0]    shift_amt;

  logic signed [DW-1:0] taps   [NT+1];
  logic signed [DW-1:0] win1   [NT];
  logic signed [DW-1:0] win2   [NT];
  logic signed [CW-1:0] coef1  [NT];
  logic signed [CW-1:0] coef2  [NT];
  logic signed [AW-1:0] acc1, acc2;
  logic                 v1, v2;

  // ---- control -------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n)    started <= 1'b0;
    else if (step) started <= 1'b1;
  end

  always_comb begin
    go    = started || (avail >= CNTW'(START));
    step  = go && (avail >= CNTW'(shift_amt));
    pop   = step ? shift_amt : 2'd0;
    stall = started && !step;
  end

  index_fsm #(.N(N), .D(D)) u_fsm (
    .clk, .rst_n, .step,
    .s1, .s2, .win_valid, .dl2_same, .shift_amt, .shift_one
  );

  // ---- shared delay line and the DL2 multiplexers --------------------------
  pdl #(.DW(DW), .LEN(NT + 1)) u_pdl (
    .clk, .rst_n,
    .shift_en (step && shift_amt != 2'd0),
    .shift_one(shift_one),
    .input1, .input2,
    .taps
  );

  always_comb begin
    for (int j = 0; j < NT; j++) begin
      win1[j] = taps[j+1];
      win2[j] = dl2_same ? taps[j+1] : taps[j];
    end
  end

  // ---- coefficients and multiply-adds --------------------------------------
  coef_rom #(.N(N), .NT(NT), .CW(CW)) u_rom1 (.idx(s1), .coef(coef1));
  coef_rom #(.N(N), .NT(NT), .CW(CW)) u_rom2 (.idx(s2), .coef(coef2));

  mac #(.NT(NT), .DW(DW), .CW(CW)) u_mac1 (
    .clk, .rst_n, .in_valid(step && win_valid),
    .data(win1), .coef(coef1), .out_valid(v1), .acc(acc1)
  );
  mac #(.NT(NT), .DW(DW), .CW(CW)) u_mac2 (
    .clk, .rst_n, .in_valid(step && win_valid),
    .data(win2), .coef(coef2), .out_valid(v2), .acc(acc2)
  );

  // ---- rounding and saturation ---------------------------------------------
  function automatic logic signed [OW-1:0] scale(logic signed [AW-1:0] a);
    logic signed [AW:0] r;
    r = (AW+1)'(a) + ((AW+1)'(1) <<< (FRAC - 1));
    r = r >>> FRAC;
    if (r > (AW+1)'((1 << (OW - 1)) - 1)) return {1'b0, {(OW-1){1'b1}}};
    if (r < -(AW+1)'(1 << (OW - 1)))      return {1'b1, {(OW-1){1'b0}}};
    return r[OW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y1      <= '0;
      y2      <= '0;
    end else begin
      y_valid <= v1;
      if (v1) begin
        y1 <= scale(acc1);
        y2 <= scale(acc2);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      // Both lanes run in lock step.
      assert (v1 == v2) else $error("resampler_core: lanes out of step");
      // The core never takes more samples than are buffered.
      assert (CNTW'(pop) <= avail) else $error("resampler_core: pop beyond buffer");
    end
  end

endmodule
