// sync2: two-flip-flop synchronizer for a single level signal entering the
// clock domain of clk. Output follows the input two to three clk edges later.
// Resets to 0 (active-low asynchronous reset). The CSAR approach requires
// signals to be synchronized where they enter a clock domain; the two-stage
// depth is this design's choice.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
