// mux157: quad 2-to-1 data selector with the behaviour of the 74LS157.
//
// y = b when sel = 1, a when sel = 0; the active-low strobe g_n = 1 forces y
// to zero. In the CPU it chooses the ALU's B operand: the data RAM word
// (sel = 0) or the instruction's immediate DB field (sel = 1), under the
// MUX bit of the instruction. Which value of MUX selects DB is this design's
// reading of the lab's worked example. Combinational.
module mux157 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sel,
  input  logic         g_n,
  output logic [W-1:0] y
);

  always_comb begin
    if (g_n)      y = '0;
    else if (sel) y = b;
    else          y = a;
  end

endmodule
