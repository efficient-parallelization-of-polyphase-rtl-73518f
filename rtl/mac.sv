// Multiply-add block of one output lane (DL1 or DL2).
//
// Computes acc = sum_j data[j] * coef[j] over TAPS taps, fully pipelined so
// that a new window is accepted every clock:
//   stage 1        registers the tap data and the coefficients,
//   stage 2        registers the TAPS products,
//   stages 3..     a binary adder tree with a register after every level
//                  (ceil(log2(TAPS)) levels, zero-padded to a power of two).
// Latency is LATENCY = 2 + ceil(log2(TAPS)) clocks from in_valid to out_valid
// (7 for 21 taps). The accumulator keeps full precision, DW + CW +
// ceil(log2(TAPS)) bits, so no overflow is possible. The published design
// pipelines its adders to reach the target clock; the stage split chosen here
// is this design's own.
module mac
  import resampler_pkg::*;
#(
  parameter int NT = TAPS,
  parameter int DW = DATA_W,
  parameter int CW = COEF_W,
  localparam int LV = (NT > 1) ? $clog2(NT) : 1,
  localparam int P2 = 1 << LV,
  localparam int AW = DW + CW + LV,
  localparam int LATENCY = 2 + LV
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] data [NT],
  input  logic signed [CW-1:0] coef [NT],
  output logic                 out_valid,
  output logic signed [AW-1:0] acc
);

  logic signed [DW-1:0] data_q [NT];
  logic signed [CW-1:0] coef_q [NT];
  logic [LATENCY-1:0]   vpipe;

  // stage 1: operand registers
  always_ff @(posedge clk) begin
    data_q <= data;
    coef_q <= coef;
  end

  // stage 2: products, zero-padded to P2 entries (level 0 of the tree);
  // level l+1 holds the registered pairwise sums of level l.
  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic signed [AW-1:0] sum [P2 >> l];
    if (l == 0) begin : g_prod
      always_ff @(posedge clk) begin
        for (int j = 0; j < P2; j++)
          sum[j] <= (j < NT) ? AW'(data_q[j] * coef_q[j]) : '0;
      end
    end else begin : g_add
      always_ff @(posedge clk) begin
        for (int i = 0; i < (P2 >> l); i++)
          sum[i] <= g_lvl[l-1].sum[2*i] + g_lvl[l-1].sum[2*i+1];
      end
    end
  end

  assign acc = g_lvl[LV].sum[0];

  // valid travels alongside the data
  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  assign out_valid = vpipe[LATENCY-1];

endmodule
