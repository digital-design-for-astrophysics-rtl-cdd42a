// Dual-clock FIFO with Gray-coded pointers.
//
// The write side and the read side each run on their own clock. Pointers
// carry one extra wrap bit, cross the clock boundary in Gray code through two
// flops, and give full (write side) and empty (read side); both flags are
// conservative, so a value just written may take a few read clocks to show.
// The read port is registered: rd_en with the FIFO not empty pops the oldest
// word, which appears on dout with dout_valid on the next rd_clk edge. A write
// while full is dropped and raises overflow for one wr_clk cycle;
// overflow_seen stays high until reset. A read while empty is ignored.
// Each side has its own active-high synchronous reset; both must be applied
// together, long enough for both clocks to see them.
//
// DEPTH must be a power of two, at least 4. The storage is a plain array so
// that it maps onto block RAM. The original firmware used generated vendor
// FIFOs and describes only their role and overflow; this implementation is
// this design's own.
module async_fifo #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic          wr_clk,
  input  logic          wr_rst,
  input  logic          wr_en,
  input  logic [DW-1:0] din,
  output logic          full,
  output logic          overflow,
  output logic          overflow_seen,

  input  logic          rd_clk,
  input  logic          rd_rst,
  input  logic          rd_en,
  output logic [DW-1:0] dout,
  output logic          dout_valid,
  output logic          empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_w1, rd_gray_w2;   // read pointer seen by the write side
  logic [AW:0] wr_gray_r1, wr_gray_r2;   // write pointer seen by the read side
  logic [AW:0] wr_bin_next, rd_bin_next;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  assign full = (wr_gray == {~rd_gray_w2[AW:AW-1], rd_gray_w2[AW-2:0]});
  assign wr_bin_next = wr_bin + 1'b1;

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full)
      mem[wr_bin[AW-1:0]] <= din;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wr_bin        <= '0;
      wr_gray       <= '0;
      rd_gray_w1    <= '0;
      rd_gray_w2    <= '0;
      overflow      <= 1'b0;
      overflow_seen <= 1'b0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
      overflow   <= wr_en && full;
      if (wr_en && full)
        overflow_seen <= 1'b1;
      if (wr_en && !full) begin
        wr_bin  <= wr_bin_next;
        wr_gray <= bin2gray(wr_bin_next);
      end
    end
  end

  // ---------------- read side ----------------
  assign empty = (rd_gray == wr_gray_r2);
  assign rd_bin_next = rd_bin + 1'b1;

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
      dout_valid <= 1'b0;
      dout       <= '0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
      dout_valid <= rd_en && !empty;
      if (rd_en && !empty) begin
        dout    <= mem[rd_bin[AW-1:0]];
        rd_bin  <= rd_bin_next;
        rd_gray <= bin2gray(rd_bin_next);
      end
    end
  end

  // Handshake rule: the sticky flag never falls outside reset.
  assert property (@(posedge wr_clk) disable iff (wr_rst) overflow_seen |=> overflow_seen);

endmodule
