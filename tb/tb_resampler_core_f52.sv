// Test of the two-lane resampling datapath at a larger ratio, f = 5/2
// (N = 5, D = 2, 21 taps). Here 2D < N, so some steps take no new sample and
// the delay line holds; the checks are otherwise those of tb_resampler_core.
//
// One clock. The test plays the input buffer: it holds a queue of input
// samples, shows the two oldest as input2/input1 and their number as avail,
// and removes what the core pops. New samples arrive two per clock, fast
// enough to keep up, with phases of random starvation so the core stalls. Every
// output pair is compared with the reference y[k] = sum_j h[kD mod N + N*j] *
// x[floor(kD/N) - j] (rounded and saturated like the output stage), worked
// out here from the prototype coefficients. Further checks: the first pair
// appears exactly 8 clocks after the first computing step, pairs come out on
// consecutive clocks while the core is not starved, and the core never waits
// for input while enough is buffered.
module tb_resampler_core_f52;
  import resampler_pkg::*;
  localparam int N = 5, D = 2, NT = TAPS, LAT = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [FIFO_AW:0] avail;
  logic signed [DATA_W-1:0] input1, input2;
  logic [1:0] pop;
  logic y_valid, stall;
  logic signed [OUT_W-1:0] y1, y2;

  resampler_core #(.N(N), .D(D)) u_dut (.*);

  int checks = 0, failures = 0;
  int h [N*NT];
  int xs [$];        // all samples ever offered, in order
  int rd = 0;        // samples consumed so far
  int k = 0;         // next output index
  int cyc = 0, first_step = -1, first_out = -1;
  int busy_run = 0, n_stall = 0, n_hold = 0;

  function automatic int ref_y(int kk);
    longint acc = 0, r;
    int s, n;
    s = (kk * D) % N;
    n = (kk * D) / N;
    for (int j = 0; j < NT; j++)
      if (n - j >= 0) acc += longint'(h[s + N * j]) * xs[n - j];
    r = (acc + 8192) >>> 14;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // buffer model: updated shortly after each clock edge
  task automatic show_buffer();
    int held;
    held   = xs.size() - rd;
    avail  = (held > 16) ? 5'd16 : 5'(held);
    input2 = (held >= 1) ? DATA_W'(xs[rd])     : '0;
    input1 = (held >= 2) ? DATA_W'(xs[rd + 1]) : '0;
  endtask

  bit starve = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (u_dut.step && u_dut.win_valid && first_step < 0) first_step = cyc;
      chk(!(stall && avail >= 2), "stalled with two samples buffered");
      if (stall) n_stall++;
      if (u_dut.step && u_dut.win_valid && u_dut.shift_amt == 2'd0) n_hold++;
      rd += int'(pop);
      if (y_valid) begin
        if (first_out < 0) begin
          first_out = cyc;
          chk(first_out - first_step == LAT, $sformatf("latency %0d", first_out - first_step));
        end
        chk(int'(y1) == ref_y(k),     $sformatf("y[%0d] = %0d, expected %0d", k, y1, ref_y(k)));
        chk(int'(y2) == ref_y(k + 1), $sformatf("y[%0d] = %0d, expected %0d", k + 1, y2, ref_y(k + 1)));
        k += 2;
      end
    end
    // source: up to two new samples per clock
    if (xs.size() - rd < 14) begin
      int nnew;
      nnew = starve ? (($urandom_range(3, 0) == 0) ? 1 : 0) : 2;
      repeat (nnew) xs.push_back(int'($urandom_range(14000, 0)) - 7000 + (($urandom_range(9, 0) == 0) ? 20000 : 0));
    end
    #1 show_buffer();
  end

  // pairs on consecutive clocks when never starved: checked in a window
  int win_clks = 0, win_pairs = 0;
  bit in_win = 0;
  always @(posedge clk) if (in_win) begin
    win_clks++;
    if (y_valid) win_pairs++;
  end

  initial begin
    for (int l = 0; l < N*NT; l++) h[l] = proto_coef(l, N, NT);
    show_buffer();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (60) @(posedge clk);
    in_win = 1;
    repeat (200) @(posedge clk);
    in_win = 0;
    chk(win_pairs == win_clks, $sformatf("%0d pairs in %0d clocks", win_pairs, win_clks));
    starve = 1;
    repeat (100) @(posedge clk);
    starve = 0;
    repeat (300) @(posedge clk);
    starve = 1;
    repeat (60) @(posedge clk);
    starve = 0;
    repeat (200) @(posedge clk);
    chk(n_stall > 20, "core never stalled");
    chk(n_hold > 50, "delay line never held");
    chk(k > 1000, "too few outputs");
    $display("outputs=%0d stall_clks=%0d", k, n_stall);
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
