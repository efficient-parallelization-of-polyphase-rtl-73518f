// Test of the polyphase coefficient table (N = 6, 21 taps per branch).
//
// For every branch index the 21 coefficients are compared with a root-raised
// cosine (roll-off 0.1, 6 samples per symbol, centred between samples)
// evaluated here in floating point and scaled by 2**14; the table may differ
// by at most one LSB. Further checks: the prototype is symmetric, so branch p
// tap j equals branch N-1-p tap TAPS-1-j; every branch has a DC gain near
// unity (sum within 3% of 2**14); indices 6 and 7 give zeros.
module tb_coef_rom;
  import resampler_pkg::*;
  localparam int N = NPHASE, NT = TAPS;
  localparam real MYPI = 3.14159265358979;

  logic [2:0] idx = '0;
  logic signed [COEF_W-1:0] coef [NT];
  coef_rom u_dut (.idx, .coef);

  int checks = 0, failures = 0;
  int tab [N][NT];

  function automatic real my_rrc(real t);
    real b = 0.1;
    if (t == 0.0) return 1.0 - b + 4.0 * b / MYPI;
    return ($sin(MYPI * t * (1.0 - b)) + 4.0 * b * t * $cos(MYPI * t * (1.0 + b)))
           / (MYPI * t * (1.0 - 16.0 * b * b * t * t));
  endfunction

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int p = 0; p < 8; p++) begin
      idx = 3'(p);
      #1;
      if (p < N) begin
        int sum;
        sum = 0;
        for (int j = 0; j < NT; j++) begin
          real e;
          e = my_rrc((real'(p + N * j) - (N * NT - 1) / 2.0) / N) * 16384.0;
          tab[p][j] = int'(coef[j]);
          sum += tab[p][j];
          chk((real'(coef[j]) - e) < 1.01 && (e - real'(coef[j])) < 1.01,
              $sformatf("branch %0d tap %0d = %0d, expected %f", p, j, coef[j], e));
        end
        chk(sum > 15892 && sum < 16876, $sformatf("branch %0d DC gain %0d", p, sum));
      end else begin
        for (int j = 0; j < NT; j++) chk(coef[j] == 0, $sformatf("index %0d tap %0d not zero", p, j));
      end
    end
    for (int p = 0; p < N; p++)
      for (int j = 0; j < NT; j++)
        chk(tab[p][j] == tab[N-1-p][NT-1-j], $sformatf("symmetry p=%0d j=%0d", p, j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
