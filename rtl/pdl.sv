// Physical delay line (PDL): the shift-by-one-or-two shift register shared by
// both output lanes.
//
// The register holds LEN = TAPS + 1 input samples, taps[0] the newest. The even
// lane (DL1) reads taps[1..TAPS]; the odd lane (DL2) reads taps[0..TAPS-1], one
// sample ahead, or the DL1 window when both lanes need the same data. Two
// input samples are offered every clock: input2 is the oldest sample not yet
// taken and input1 the one after it.
//   shift_en & !shift_one : shift by two, taps[0] <= input1, taps[1] <= input2,
//                           taps[i] <= taps[i-2]
//   shift_en &  shift_one : shift by one, taps[0] <= input2, taps[i] <= taps[i-1]
//   !shift_en             : hold
// Each stage is a 2:1 multiplexer in front of a register, wired as in the
// published shift-by-one-or-two register: stage 0 chooses between input2 and
// input1, stage 1 between stage 0 and input2, stage i between stage i-1 and
// stage i-2. Which multiplexer input is taken for which level of shift_one is
// this design's reading. The register clears on reset, so the first output
// samples see zeros before the first input sample.
module pdl
  import resampler_pkg::*;
#(
  parameter int DW  = DATA_W,
  parameter int LEN = TAPS + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift_en,
  input  logic                 shift_one,
  input  logic signed [DW-1:0] input1,
  input  logic signed [DW-1:0] input2,
  output logic signed [DW-1:0] taps [LEN]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) taps[i] <= '0;
    end else if (shift_en) begin
      taps[0] <= shift_one ? input2 : input1;
      if (LEN > 1) taps[1] <= shift_one ? taps[0] : input2;
      for (int i = 2; i < LEN; i++) taps[i] <= shift_one ? taps[i-1] : taps[i-2];
    end
  end

  initial begin
    assert (LEN >= 2) else $fatal(1, "pdl: LEN must be at least 2");
  end

endmodule
