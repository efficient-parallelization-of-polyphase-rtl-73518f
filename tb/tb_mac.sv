// Test of the pipelined multiply-add block (21 taps, 16 x 16 bits).
//
// Feeds random data and coefficients, including full-scale extremes, with a
// random valid pattern, and checks every result against a sum of products
// worked out here. Results must appear exactly 7 clocks (2 + ceil(log2 21))
// after the window was applied, one per clock when the input is busy.
module tb_mac;
  import resampler_pkg::*;
  localparam int NT = TAPS, LAT = 7;
  localparam int AW = DATA_W + COEF_W + 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [DATA_W-1:0] data [NT];
  logic signed [COEF_W-1:0] coef [NT];
  logic signed [AW-1:0] acc;

  mac u_dut (.*);

  int checks = 0, failures = 0;
  longint expq [$];
  int cyc = 0;
  int tin [$];

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      longint s;
      s = 0;
      for (int j = 0; j < NT; j++) s += longint'(data[j]) * longint'(coef[j]);
      expq.push_back(s);
      tin.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      checks += 2;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        longint e;
        int t0;
        e  = expq.pop_front();
        t0 = tin.pop_front();
        if (longint'(acc) != e) begin
          failures++;
          if (failures < 10) $display("FAIL acc = %0d, expected %0d", acc, e);
        end
        if (cyc - t0 != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d", cyc - t0);
        end
      end
    end
  end

  initial begin
    for (int j = 0; j < NT; j++) begin data[j] = '0; coef[j] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk);
      in_valid <= (i < 100) || ($urandom_range(2, 0) != 0);
      for (int j = 0; j < NT; j++) begin
        case ($urandom_range(5, 0))
          0: begin data[j] <= 16'sh8000; coef[j] <= 16'sh8000; end
          1: begin data[j] <= 16'sh7fff; coef[j] <= 16'sh8000; end
          default: begin data[j] <= DATA_W'($urandom); coef[j] <= COEF_W'($urandom); end
        endcase
      end
    end
    @(posedge clk) in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
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
