// Test of the dual-clock input buffer (16 entries).
//
// Write clock period 6 ns, read clock period 10 ns (the design's 5 : 3 ratio),
// then an unrelated 7 ns / 10 ns pair. The writer offers a counting sequence
// with random gaps; the reader pops 0, 1 or 2 at random, never more than
// rd_count. Checks: rd_data2 and rd_data1 always show the two oldest unread
// samples (when rd_count covers them), no sample is lost or repeated,
// rd_count never exceeds the samples actually held, the writer never gets
// ready while 16 samples are held, and both a full buffer and an empty one
// are reached.
`timescale 1ns/1ps
module tb_input_fifo;
  import resampler_pkg::*;
  localparam int AW = FIFO_AW, DEPTH = 1 << AW;

  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  real wr_half = 3.0;
  always #(wr_half) wr_clk = ~wr_clk;
  always #5 rd_clk = ~rd_clk;

  logic wr_valid = 0, wr_ready;
  logic signed [DATA_W-1:0] wr_data = '0;
  logic [AW:0] rd_count;
  logic signed [DATA_W-1:0] rd_data2, rd_data1;
  logic [1:0] rd_pop = '0;

  input_fifo u_dut (.*);

  int checks = 0, failures = 0;
  int written = 0, readn = 0, n_full = 0, n_empty = 0, n_pop2 = 0;
  bit wr_fast = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge wr_clk) if (wr_rst_n) begin
    chk(!(wr_ready && (written - readn) >= DEPTH), "ready while full");
    if (wr_valid && wr_ready) written++;
    if (!wr_ready) n_full++;
    if (!(wr_valid && !wr_ready)) begin
      wr_valid <= wr_fast ? 1'b1 : ($urandom_range(3, 0) != 0);
      wr_data  <= DATA_W'(written);
    end
  end

  bit rd_slow = 0;
  always @(posedge rd_clk) if (rd_rst_n) begin
    int c, p;
    c = int'(rd_count);
    chk(c <= written - readn, $sformatf("count %0d above held %0d", c, written - readn));
    if (c >= 1) chk(rd_data2 == DATA_W'(readn), $sformatf("head %0d expected %0d", rd_data2, readn));
    if (c >= 2) chk(rd_data1 == DATA_W'(readn + 1), "second sample");
    if (c == 0) n_empty++;
    readn += int'(rd_pop);
    p = rd_slow ? (($urandom_range(3, 0) == 0) ? 1 : 0) : $urandom_range(2, 0);
    if (p > c) p = c;
    if (p == 2) n_pop2++;
    rd_pop <= 2'(p);
  end

  initial begin
    repeat (3) @(posedge rd_clk);
    wr_rst_n = 1; rd_rst_n = 1;
    repeat (400) @(posedge rd_clk);
    rd_slow = 1; wr_fast = 1;          // fill the buffer
    repeat (200) @(posedge rd_clk);
    rd_slow = 0; wr_fast = 0;
    wr_half = 3.5;
    repeat (600) @(posedge rd_clk);
    chk(n_full > 0, "buffer never full");
    chk(n_empty > 0, "buffer never empty");
    chk(n_pop2 > 50, "too few double pops");
    chk(readn > 1000, "too few samples passed");
    $display("written=%0d read=%0d full=%0d empty=%0d", written, readn, n_full, n_empty);
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
