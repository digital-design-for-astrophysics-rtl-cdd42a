// Self-checking testbench of async_fifo.
//
// Writes and reads on two unrelated clocks with random enables and checks
// every popped word against a queue of the accepted writes, the registered
// read timing (dout_valid one read clock after a pop), that a write while
// full is dropped with an overflow pulse and a sticky flag, that the FIFO
// holds exactly DEPTH words, and that reads while empty are ignored.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int DW = 16;
  localparam int DEPTH = 8;

  logic          wr_clk = 0, rd_clk = 0, rst = 1;
  logic          wr_en = 0, rd_en = 0;
  logic [DW-1:0] din = '0, dout;
  logic          full, overflow, overflow_seen, dout_valid, empty;

  async_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (
    .wr_clk, .wr_rst(rst), .wr_en, .din, .full, .overflow, .overflow_seen,
    .rd_clk, .rd_rst(rst), .rd_en, .dout, .dout_valid, .empty
  );

  always #3.1 wr_clk = ~wr_clk;
  always #5   rd_clk = ~rd_clk;

  int checks = 0, failures = 0;
  int n_ovf_pulse = 0, n_drop = 0, n_pop = 0, n_empty_rd = 0;
  logic [DW-1:0] q[$];
  bit   wr_phase_random = 1, rd_phase_random = 1, rd_stop = 0, wr_stop = 0;
  bit   pend_pop = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write side driver and model
  always @(posedge wr_clk) begin
    if (!rst) begin
      if (overflow) n_ovf_pulse++;
      if (wr_en && !full) q.push_back(din);
      if (wr_en && full) n_drop++;
    end
  end
  always @(negedge wr_clk) begin
    wr_en <= !rst && !wr_stop && (wr_phase_random ? ($urandom_range(0, 1) == 1) : 1'b1);
    din   <= DW'($urandom);
  end

  // read side: check the word of the previous pop
  always @(posedge rd_clk) begin
    if (!rst) begin
      check(dout_valid == pend_pop, "dout_valid one clock after pop");
      if (dout_valid) begin
        check(q.size() > 0, "pop only of written data");
        if (q.size() > 0) check(dout == q.pop_front(), "FIFO order");
        n_pop++;
      end
      pend_pop = rd_en && !empty;
      if (rd_en && empty) n_empty_rd++;
    end
  end
  always @(negedge rd_clk)
    rd_en <= !rst && !rd_stop && (rd_phase_random ? ($urandom_range(0, 2) != 0) : 1'b1);

  initial begin
    repeat (4) @(posedge rd_clk);
    rst = 0;
    // phase 1: random traffic on both sides
    repeat (3000) @(posedge rd_clk);
    check(!overflow_seen || n_drop > 0, "no false overflow");
    // phase 2: reader stops, writer fills the FIFO
    rd_stop = 1;
    repeat (20) @(posedge rd_clk);
    wr_phase_random = 0;
    repeat (40) @(posedge wr_clk);
    check(full, "full after a long burst");
    check(overflow_seen && n_ovf_pulse > 0, "overflow reported");
    wr_stop = 1;
    repeat (10) @(posedge rd_clk);
    check(n_ovf_pulse == n_drop, "one overflow pulse per dropped write");
    check(q.size() == DEPTH, "FIFO holds exactly DEPTH words");
    // phase 3: drain completely, keep reading while empty
    rd_stop = 0; rd_phase_random = 0;
    repeat (DEPTH + 20) @(posedge rd_clk);
    check(empty && q.size() == 0, "drained");
    check(n_empty_rd > 0, "reads while empty seen");
    check(overflow_seen, "overflow flag is sticky");
    // phase 4: random again, then reset clears the sticky flag
    wr_stop = 0; wr_phase_random = 1; rd_phase_random = 1;
    repeat (1000) @(posedge rd_clk);
    rst = 1; q.delete(); pend_pop = 0;
    repeat (4) @(posedge rd_clk);
    check(!overflow_seen && empty, "reset clears flags");
    $display("pops=%0d drops=%0d empty_reads=%0d", n_pop, n_drop, n_empty_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
