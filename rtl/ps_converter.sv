// Parallel-to-serial converter from the half-rate datapath to the full
// output rate.
//
// The datapath delivers an output pair (in_y1 even, in_y2 odd, in_valid) once
// per datapath clock. This block runs on the output clock, which has exactly
// twice that frequency and is edge-aligned with it (both come from one clock
// source; the datapath clock is the output clock divided by two). A phase bit
// toggles every output clock: on phase 0 it takes the pair and puts in_y1 on
// the output, on phase 1 it puts the held in_y2 on the output. Since a pair is
// held for two output clocks and taken once every two, every pair is
// serialised exactly once, in order y1, y2, whatever the phase alignment after
// reset. out_valid follows the pair's valid. Latency: one to two output clocks
// from the datapath clock edge that presents the pair to out_data showing y1.
//
// The published design names a parallel-to-serial stage after the two lanes
// (even samples from DL1, odd from DL2); its clocking and ports here are this
// design's choice.
module ps_converter
  import resampler_pkg::*;
#(
  parameter int OW = OUT_W
) (
  input  logic                 clk,      // output clock (F_t)
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [OW-1:0] in_y1,
  input  logic signed [OW-1:0] in_y2,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data
);

  logic                 phase;
  logic                 hold_valid;
  logic signed [OW-1:0] hold;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase      <= 1'b0;
      hold_valid <= 1'b0;
      hold       <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else begin
      phase <= ~phase;
      if (!phase) begin
        out_data   <= in_y1;
        out_valid  <= in_valid;
        hold       <= in_y2;
        hold_valid <= in_valid;
      end else begin
        out_data   <= hold;
        out_valid  <= hold_valid;
      end
    end
  end

endmodule
