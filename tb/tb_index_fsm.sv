// Test of the filter-index state machine.
//
// Two instances: the 500 -> 600 MHz configuration (N = 6, D = 5, even N,
// pattern length N/2 = 3) and an odd-N case (N = 7, D = 4, pattern length 7).
// `step` is driven at random. After the loading step, pair c must show
// s1 = 2cD mod N and s2 = (2c+1)D mod N, dl2_same when outputs 2c and 2c+1
// fall on the same input sample, and shift_amt equal to the number of input
// samples between outputs 2c and 2c+2 (all from floor(kD/N), worked out
// here). The loading step itself must show win_valid = 0 and shift_amt = 2.
module tb_index_fsm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic step_a, step_b;
  logic [2:0] s1a, s2a, s1b, s2b;
  logic wva, wvb, sma, smb, soa, sob;
  logic [1:0] saa, sab;

  index_fsm #(.N(6), .D(5)) u_a (.clk, .rst_n, .step(step_a), .s1(s1a), .s2(s2a),
    .win_valid(wva), .dl2_same(sma), .shift_amt(saa), .shift_one(soa));
  index_fsm #(.N(7), .D(4)) u_b (.clk, .rst_n, .step(step_b), .s1(s1b), .s2(s2b),
    .win_valid(wvb), .dl2_same(smb), .shift_amt(sab), .shift_one(sob));

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // expected outputs for pair c (c = -1: loading step)
  task automatic expect_pair(int n, int d, int c, logic [2:0] s1, logic [2:0] s2, logic wv,
                             logic same, logic [1:0] amt, logic one, string tag);
    if (c < 0) begin
      chk(!wv && amt == 2 && !one, $sformatf("%s loading step", tag));
    end else begin
      int k = 2 * c;
      chk(wv, $sformatf("%s win_valid", tag));
      chk(int'(s1) == (k * d) % n, $sformatf("%s c=%0d s1=%0d", tag, c, s1));
      chk(int'(s2) == ((k + 1) * d) % n, $sformatf("%s c=%0d s2=%0d", tag, c, s2));
      chk(same == (((k + 1) * d) / n == (k * d) / n), $sformatf("%s c=%0d same", tag, c));
      chk(int'(amt) == ((k + 2) * d) / n - (k * d) / n, $sformatf("%s c=%0d amt=%0d", tag, c, amt));
      chk(one == (amt == 1), $sformatf("%s c=%0d shift_one", tag, c));
    end
  endtask

  int ca = -1, cb = -1;
  int a_zero_seen = 0, a_first_return = -1;
  always @(posedge clk) if (rst_n) begin
    expect_pair(6, 5, ca, s1a, s2a, wva, sma, saa, soa, "A");
    expect_pair(7, 4, cb, s1b, s2b, wvb, smb, sab, sob, "B");
    if (step_a) ca++;
    if (step_b) cb++;
  end

  initial begin
    step_a = 0; step_b = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2000) begin
      @(posedge clk);
      step_a <= ($urandom_range(3, 0) != 0);
      step_b <= ($urandom_range(1, 0) != 0);
    end
    @(posedge clk);
    chk(ca > 500 && cb > 300, "too few steps");
    $display("pairs A=%0d B=%0d", ca, cb);
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
