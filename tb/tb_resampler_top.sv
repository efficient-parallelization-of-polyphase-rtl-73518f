// End-to-end test of the 500 -> 600 MHz resampler at its default parameters.
//
// Three clocks with the exact rate ratios of the design (input : datapath :
// output = 5 : 3 : 6), here with periods 6 ns, 10 ns and 5 ns. The source
// sends 64-QAM-style amplitude levels (one rail: +-1, +-3, +-5, +-7 times 1900)
// whenever the buffer is ready. Every output sample is compared with a
// reference computed directly at the intermediate rate: zero-stuff the input
// by N, convolve with the N*TAPS-tap prototype, keep every D-th sample, round
// and saturate like the output stage.
//
// Scenario: the input side runs while the datapath is still in reset, so the
// buffer fills and in_ready drops; then steady state, where the output must
// be valid on every output clock (the full 600 MHz rate) and the buffer must
// deliver exactly 5 samples per 3 datapath clocks; then a pause in the input
// makes the datapath stall; then steady state again until the last output.
// The test counts the mechanisms it sees (shift by one, shift by two, DL2 on
// the DL1 window, stall, full buffer) and fails any that never happen.
`timescale 1ns/1ps
module tb_resampler_top;
  import resampler_pkg::*;

  localparam int N  = NPHASE;
  localparam int D  = DECIM;
  localparam int NT = TAPS;
  localparam int NOUT = 3000;           // output samples to check

  logic clk_in = 0, clk_core = 0, clk_out = 0;
  logic rst_in_n = 0, rst_core_n = 0, rst_out_n = 0;
  logic in_valid = 0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic in_ready, core_stall, out_valid;
  logic signed [OUT_W-1:0] out_data;

  always #3   clk_in   = ~clk_in;
  always #5   clk_core = ~clk_core;
  always #2.5 clk_out  = ~clk_out;

  resampler_top u_dut (.*);

  int checks = 0, failures = 0;
  int x [$];                        // every sample the buffer accepted
  int h [N*NT];
  int n_out = 0;

  // ---- reference -------------------------------------------------------------
  function automatic int ref_out(int k);
    longint acc = 0;
    longint r;
    int m = k * D;                  // index at the intermediate rate
    for (int l = 0; l < N*NT; l++) begin
      int u = m - l;                // zero-stuffed input index
      if (u >= 0 && u % N == 0 && u / N < x.size()) acc += longint'(h[l]) * x[u / N];
    end
    r = (acc + (64'sd1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r >  32767) r =  32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  // ---- source ------------------------------------------------------------------
  bit src_pause = 0;
  int n_in = 0;
  always @(posedge clk_in) begin
    if (in_valid && in_ready) begin
      x.push_back(int'(in_data));
      n_in++;
    end
    if (rst_in_n && !src_pause) begin
      int lvl;
      if (!(in_valid && !in_ready)) begin
        lvl = 2 * int'($urandom_range(7, 0)) - 7;
        in_data  <= DATA_W'(lvl * 1900);
        in_valid <= 1'b1;
      end
    end else if (in_valid && in_ready) begin
      in_valid <= 1'b0;
    end
  end

  // ---- sink and checker -------------------------------------------------------
  always @(posedge clk_out) begin
    if (rst_out_n && out_valid) begin
      int exp_y;
      // The sample needs input up to index floor(k*D/N); the buffer has it.
      exp_y = ref_out(n_out);
      checks++;
      if (int'(out_data) != exp_y) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH y[%0d] = %0d, expected %0d", n_out, out_data, exp_y);
      end
      n_out++;
    end
  end

  // ---- mechanism counters -------------------------------------------------------
  int n_shift1 = 0, n_shift2 = 0, n_same = 0, n_stall = 0, n_full = 0, n_steps = 0;
  always @(posedge clk_core) begin
    if (rst_core_n && u_dut.u_core.step && u_dut.u_core.win_valid) begin
      n_steps++;
      if (u_dut.u_core.shift_amt == 2'd1) n_shift1++;
      if (u_dut.u_core.shift_amt == 2'd2) n_shift2++;
      if (u_dut.u_core.dl2_same) n_same++;
    end
    if (rst_core_n && core_stall) n_stall++;
  end
  always @(posedge clk_in) if (rst_in_n && in_valid && !in_ready) n_full++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- rate window: output valid on every output clock, 5 inputs per 3 clocks
  int win_out_clks = 0, win_out_valid = 0, win_core_clks = 0, win_pops = 0;
  bit in_window = 0;
  always @(posedge clk_out) if (in_window) begin
    win_out_clks++;
    if (out_valid) win_out_valid++;
  end
  always @(posedge clk_core) if (in_window) begin
    win_core_clks++;
    win_pops += int'(u_dut.u_core.pop);
  end

  initial begin
    for (int l = 0; l < N*NT; l++) h[l] = proto_coef(l, N, NT);

    // input side first: the buffer fills while the datapath is held in reset
    repeat (3) @(posedge clk_in);
    rst_in_n = 1;
    repeat (40) @(posedge clk_in);
    @(posedge clk_out);
    #0.1;
    rst_core_n = 1;
    rst_out_n  = 1;

    // steady state; measure the rate over 300 datapath clocks
    repeat (60) @(posedge clk_core);
    @(posedge clk_core); #0.1;
    in_window = 1;
    repeat (300) @(posedge clk_core); #0.1;
    in_window = 0;
    check(win_out_valid == win_out_clks,
          $sformatf("output rate: %0d valid of %0d output clocks", win_out_valid, win_out_clks));
    check(win_pops * 3 == win_core_clks * 5,
          $sformatf("input rate: %0d samples in %0d datapath clocks", win_pops, win_core_clks));

    // input pause: the buffer runs dry and the datapath stalls
    @(posedge clk_in);
    src_pause = 1;
    repeat (30) @(posedge clk_in);
    src_pause = 0;

    wait (n_out >= NOUT);
    repeat (5) @(posedge clk_out);

    $display("steps=%0d shift_one=%0d shift_two=%0d dl2_same=%0d stall_clks=%0d full_clks=%0d inputs=%0d outputs=%0d",
             n_steps, n_shift1, n_shift2, n_same, n_stall, n_full, n_in, n_out);
    check(n_shift1 > 0, "shift by one never happened");
    check(n_shift2 > 0, "shift by two never happened");
    check(n_same > 0,   "DL2 never used the DL1 window");
    check(n_stall > 0,  "datapath never stalled");
    check(n_full > 0,   "input buffer never filled");
    // N = 6, D = 5: one in three pairs shares its window and shifts by one
    check(n_shift2 >= 2 * n_shift1 - 2 && n_shift2 <= 2 * n_shift1 + 2,
          "shift-by-one / shift-by-two pattern is not 1:2");
    check(n_same == n_shift1 || n_same == n_shift1 + 1, "same-window pairs do not match shift-by-one steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog: timeout after %0d outputs", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
