// Two-lane polyphase arbitrary-resampling FIR filter, 500 MHz -> 600 MHz.
//
// Resamples a stream by f = N/D (6/5 by default) with an exact polyphase
// filter whose intermediate rate is the least common multiple of the input
// and output rates, so it adds no resampling error. Three clock domains:
//   clk_in   input sample rate F_s (500 MHz): one sample per clock, valid/ready
//   clk_core datapath clock F_t/2 (300 MHz)
//   clk_out  output sample rate F_t (600 MHz): one sample per clock to a DAC
// clk_core must be clk_out divided by two with aligned rising edges.
//
//   in -> input_fifo -> resampler_core (index_fsm, pdl, DL2 multiplexers,
//                       2 x coef_rom, 2 x mac) -> ps_converter -> out
//
// The core starts once PREFILL samples are buffered and then computes one
// even and one odd output sample per clk_core cycle; at matched clock rates
// the output is a gap-free stream of valid samples. If the input runs dry the
// core stalls (core_stall high) and out_valid drops for the missing samples;
// if the output side is held in reset the buffer fills and in_ready drops.
// Each domain has its own synchronous active-low reset; release them together
// (or the input side first).
module resampler_top
  import resampler_pkg::*;
#(
  parameter int N     = NPHASE,
  parameter int D     = DECIM,
  parameter int NT    = TAPS,
  parameter int DW    = DATA_W,
  parameter int CW    = COEF_W,
  parameter int OW    = OUT_W,
  parameter int FRAC  = COEF_FRAC,
  parameter int FAW   = FIFO_AW,
  parameter int START = PREFILL
) (
  input  logic                 clk_in,
  input  logic                 rst_in_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  output logic                 in_ready,

  input  logic                 clk_core,
  input  logic                 rst_core_n,
  output logic                 core_stall,

  input  logic                 clk_out,
  input  logic                 rst_out_n,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data
);

  logic [FAW:0]         avail;
  logic signed [DW-1:0] input1, input2;
  logic [1:0]           pop;
  logic                 pair_valid;
  logic signed [OW-1:0] y1, y2;

  input_fifo #(.DW(DW), .AW(FAW)) u_fifo (
    .wr_clk  (clk_in),
    .wr_rst_n(rst_in_n),
    .wr_valid(in_valid),
    .wr_data (in_data),
    .wr_ready(in_ready),
    .rd_clk  (clk_core),
    .rd_rst_n(rst_core_n),
    .rd_count(avail),
    .rd_data2(input2),
    .rd_data1(input1),
    .rd_pop  (pop)
  );

  resampler_core #(
    .N(N), .D(D), .NT(NT), .DW(DW), .CW(CW), .OW(OW), .FRAC(FRAC),
    .CNTW(FAW + 1), .START(START)
  ) u_core (
    .clk    (clk_core),
    .rst_n  (rst_core_n),
    .avail, .input1, .input2, .pop,
    .y_valid(pair_valid),
    .y1, .y2,
    .stall  (core_stall)
  );

  ps_converter #(.OW(OW)) u_ps (
    .clk      (clk_out),
    .rst_n    (rst_out_n),
    .in_valid (pair_valid),
    .in_y1    (y1),
    .in_y2    (y2),
    .out_valid,
    .out_data
  );

endmodule
