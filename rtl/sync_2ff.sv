// Two-flop synchronizer for a slowly changing level (a control register bit
// or a sticky status flag) that crosses into the clock domain of clk. The
// output follows the input two clk edges later. rst clears both flops.
// A helper of this design; the original description does not cover clock
// crossings.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
