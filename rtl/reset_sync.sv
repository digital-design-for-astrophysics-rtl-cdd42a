// Reset synchronizer: asserts rst_out as soon as rst_in rises and releases it
// on the second clk edge after rst_in falls, so every clock domain leaves
// reset cleanly on its own clock. Both are active high. A helper of this
// design; the original only shows an active-high reset.
module reset_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);
  logic stage;
  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) begin
      stage   <= 1'b1;
      rst_out <= 1'b1;
    end else begin
      stage   <= 1'b0;
      rst_out <= stage;
    end
  end
endmodule
