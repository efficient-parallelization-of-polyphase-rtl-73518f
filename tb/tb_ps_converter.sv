// Test of the parallel-to-serial converter.
//
// The pair side changes once per slow clock (period 10 ns) with a random valid
// pattern; the converter runs on the edge-aligned fast clock (period 5 ns).
// Every valid pair must come out as y1 then y2 on consecutive fast clocks, in
// order, with nothing lost or repeated, and a run of valid pairs must give an
// uninterrupted stream of valid samples.
`timescale 1ns/1ps
module tb_ps_converter;
  import resampler_pkg::*;
  logic clk_core = 0, clk = 0, rst_n = 0;
  always #5   clk_core = ~clk_core;
  always #2.5 clk      = ~clk;

  logic in_valid = 0, out_valid;
  logic signed [OUT_W-1:0] in_y1 = '0, in_y2 = '0, out_data;

  ps_converter u_dut (.*);

  int checks = 0, failures = 0;
  int expq [$];
  int n_pairs = 0, n_out = 0, run = 0, max_run = 0;

  always @(posedge clk_core) if (rst_n) begin
    logic v;
    logic signed [OUT_W-1:0] a, b;
    v = (n_pairs < 50) || ($urandom_range(3, 0) != 0);
    a = OUT_W'($urandom);
    b = OUT_W'($urandom);
    in_valid <= v;
    in_y1 <= a;
    in_y2 <= b;
    if (v) begin
      expq.push_back(int'(a));
      expq.push_back(int'(b));
      n_pairs++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      run++;
      if (run > max_run) max_run = run;
      if (expq.size() == 0 || int'(out_data) != expq[0]) begin
        failures++;
        if (failures < 10) $display("FAIL out %0d expected %0d", out_data, (expq.size() != 0) ? expq[0] : 0);
      end
      if (expq.size() != 0) void'(expq.pop_front());
      n_out++;
    end else run = 0;
  end

  initial begin
    repeat (3) @(posedge clk_core);
    rst_n <= 1;
    repeat (500) @(posedge clk_core);
    @(posedge clk_core);
    checks++;
    if (max_run < 90) begin failures++; $display("FAIL longest valid run %0d", max_run); end
    checks++;
    if (expq.size() > 4) begin failures++; $display("FAIL %0d samples not output", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
