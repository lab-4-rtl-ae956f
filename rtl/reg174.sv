// reg174: D register with asynchronous active-low clear, in the role of a
// 74LS174 hex D flip-flop.
//
// On a rising clock edge with en high, q takes d; clr_n low clears q at
// once. The CPU uses it for the accumulator and for the byte-serial fetch
// (byte-0 latch and phase bit). The load enable is this design's addition:
// it stands for the gated clock that keeps ACC unchanged on a jump.
module reg174 #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
