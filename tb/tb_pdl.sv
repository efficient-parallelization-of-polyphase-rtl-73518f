// Test of the shift-by-one-or-two delay line.
//
// Drives random shift_en / shift_one and random input pairs and compares every
// register with a queue model: shift by two appends input2 then input1 at the
// new end, shift by one appends input2, no shift keeps everything. LEN is the
// default 22 (21 taps plus the extra front register).
module tb_pdl;
  import resampler_pkg::*;
  localparam int LEN = TAPS + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic shift_en = 0, shift_one = 0;
  logic signed [DATA_W-1:0] input1 = '0, input2 = '0;
  logic signed [DATA_W-1:0] taps [LEN];

  pdl u_dut (.*);

  int checks = 0, failures = 0;
  int model [LEN];
  int n1 = 0, n2 = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) model[i] = 0;
    end else begin
      for (int i = 0; i < LEN; i++) begin
        checks++;
        if (int'(taps[i]) != model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL tap %0d = %0d, expected %0d", i, taps[i], model[i]);
        end
      end
      if (shift_en) begin
        if (shift_one) begin
          for (int i = LEN - 1; i > 0; i--) model[i] = model[i-1];
          model[0] = int'(input2);
          n1++;
        end else begin
          for (int i = LEN - 1; i > 1; i--) model[i] = model[i-2];
          model[1] = int'(input2);
          model[0] = int'(input1);
          n2++;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (1000) begin
      @(posedge clk);
      shift_en  <= ($urandom_range(4, 0) != 0);
      shift_one <= ($urandom_range(1, 0) != 0);
      input1    <= DATA_W'($urandom);
      input2    <= DATA_W'($urandom);
    end
    @(posedge clk);
    checks++;
    if (n1 < 100 || n2 < 100) failures++;
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
