// ADC FIFO: carries the samples of one DDR edge (rising or falling) from the
// 375 MHz ADC clock domain into the 100 MHz processing domain, widening them
// from 32 to 128 bits on the way.
//
// The write side takes one 32-bit ADC word (four samples) per wr_clk cycle
// with wr_en and packs RATIO consecutive words into one wide entry, the
// oldest word in the low bits; a full entry is written into an async_fifo of
// DEPTH entries. The read side pops one wide entry per rd_en (registered
// read: dout and dout_valid follow one rd_clk edge later). At the original system's
// rates the read side drains 100 MHz x 128 bit = 12.8 Gbit/s against
// 375 MHz x 32 bit = 12 Gbit/s written, so it never fills while read
// continuously. overflow pulses in the write domain when an entry is dropped.
//
// The original firmware uses a generated vendor FIFO here; its description gives only its role and
// the 32-bit input; the 4:1 width ratio follows from two such FIFOs feeding
// the 256-bit peak finder, and the depth is this design's choice.
module adc_fifo #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned RATIO = 4,
  parameter int unsigned DEPTH = 128
) (
  input  logic                  wr_clk,
  input  logic                  wr_rst,
  input  logic                  wr_en,
  input  logic [IN_W-1:0]       din,
  output logic                  overflow,
  output logic                  overflow_seen,

  input  logic                  rd_clk,
  input  logic                  rd_rst,
  input  logic                  rd_en,
  output logic [IN_W*RATIO-1:0] dout,
  output logic                  dout_valid,
  output logic                  empty
);

  localparam int unsigned CW = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [IN_W*(RATIO-1)-1:0] pack;   // words 0 .. RATIO-2 of the entry
  logic [CW-1:0]         fill;
  logic                  pack_wr;
  logic                  full_unused;

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      fill    <= '0;
      pack    <= '0;
      pack_wr <= 1'b0;
    end else begin
      pack_wr <= 1'b0;
      if (wr_en) begin
        if (fill != CW'(RATIO-1))
          pack[fill*IN_W +: IN_W] <= din;
        if (fill == CW'(RATIO-1)) begin
          fill    <= '0;
          pack_wr <= 1'b1;
        end else begin
          fill <= fill + 1'b1;
        end
      end
    end
  end

  // The completed entry is copied out together with its last word, so the
  // packing register is free for the next entry at once. RATIO must be >= 2.
  logic [IN_W*RATIO-1:0] entry;
  always_ff @(posedge wr_clk) begin
    if (wr_rst)
      entry <= '0;
    else if (wr_en && fill == CW'(RATIO-1))
      entry <= {din, pack};
  end

  async_fifo #(.DW(IN_W*RATIO), .DEPTH(DEPTH)) u_fifo (
    .wr_clk, .wr_rst, .wr_en(pack_wr), .din(entry),
    .full(full_unused), .overflow, .overflow_seen,
    .rd_clk, .rd_rst, .rd_en, .dout, .dout_valid, .empty
  );

endmodule
