// Input buffer between the input-rate clock and the datapath clock.
//
// A dual-clock FIFO of 2**AW samples. The write side takes one sample per
// wr_clk cycle (500 MHz in the reference configuration) with a valid/ready
// handshake. The read side, in the datapath clock domain (300 MHz), shows the
// two oldest samples at once, rd_data2 the oldest and rd_data1 the next, and
// pops 0, 1 or 2 of them per cycle; rd_count says how many are held. The
// samples are read from the storage array combinationally (distributed RAM).
//
// Pointers cross the clock boundary in Gray code through two-flop
// synchronisers. The write pointer moves by at most one per wr_clk cycle, so
// its Gray code changes one bit at a time. The read pointer may move by two,
// so what crosses to the write side is the read pointer divided by two, which
// moves by at most one per cycle; the write side thus sees the read pointer
// rounded down to an even value and may report full one entry early, never
// late. Both views are conservative: rd_count never exceeds the samples
// written, and the writer never overwrites an unread sample.
//
// The published design shows a buffer at the boundary between the input and
// output rates and says no more about it; everything about this one is this
// design's own choice.
module input_fifo
  import resampler_pkg::*;
#(
  parameter int DW = DATA_W,
  parameter int AW = FIFO_AW
) (
  // write side
  input  logic                 wr_clk,
  input  logic                 wr_rst_n,
  input  logic                 wr_valid,
  input  logic signed [DW-1:0] wr_data,
  output logic                 wr_ready,
  // read side
  input  logic                 rd_clk,
  input  logic                 rd_rst_n,
  output logic [AW:0]          rd_count,
  output logic signed [DW-1:0] rd_data2,
  output logic signed [DW-1:0] rd_data1,
  input  logic [1:0]           rd_pop
);

  localparam int DEPTH = 1 << AW;

  logic signed [DW-1:0] mem [DEPTH];

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---- write domain --------------------------------------------------------
  logic [AW:0] wr_ptr, wr_gray;
  logic [AW:0] rh_sync1, rh_sync2;        // Gray code of rd_ptr/2, AW bits used
  logic [AW:0] rd_ptr_seen;
  logic [AW-1:0] rd_half_seen;
  logic [AW:0] rd_ptr, rd_half_gray;      // read-domain registers, see below

  assign rd_half_seen = AW'(gray2bin(rh_sync2));
  assign rd_ptr_seen  = {rd_half_seen, 1'b0};
  assign wr_ready    = (wr_ptr - rd_ptr_seen) < (AW+1)'(DEPTH);

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wr_ptr   <= '0;
      wr_gray  <= '0;
      rh_sync1 <= '0;
      rh_sync2 <= '0;
    end else begin
      rh_sync1 <= rd_half_gray;
      rh_sync2 <= rh_sync1;
      if (wr_valid && wr_ready) begin
        wr_ptr  <= wr_ptr + 1'b1;
        wr_gray <= bin2gray(wr_ptr + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_valid && wr_ready) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  // ---- read domain ---------------------------------------------------------
  logic [AW:0] wg_sync1, wg_sync2;

  assign rd_count = gray2bin(wg_sync2) - rd_ptr;
  assign rd_data2 = mem[rd_ptr[AW-1:0]];
  assign rd_data1 = mem[AW'(rd_ptr[AW-1:0] + 1'b1)];

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rd_ptr       <= '0;
      rd_half_gray <= '0;
      wg_sync1     <= '0;
      wg_sync2     <= '0;
    end else begin
      wg_sync1 <= wr_gray;
      wg_sync2 <= wg_sync1;
      rd_ptr   <= rd_ptr + (AW+1)'(rd_pop);
      rd_half_gray <= bin2gray((AW+1)'((rd_ptr + (AW+1)'(rd_pop)) >> 1));
    end
  end

  // The reader may only pop what it has been told is there.
  always_ff @(posedge rd_clk) begin
    if (rd_rst_n)
      assert ((AW+1)'(rd_pop) <= rd_count) else $error("input_fifo: pop beyond count");
  end

  initial begin
    assert (AW >= 2) else $fatal(1, "input_fifo: AW must be at least 2");
  end

endmodule
