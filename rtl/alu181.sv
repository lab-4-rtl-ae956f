// alu181: 4-bit ALU / function generator with the behaviour of the 74LS181,
// active-high operand convention.
//
// Each bit forms a propagate-like term P = A | (B & S0) | (~B & S1) and a
// generate-like term G = (A & ~B & S2) | (A & B & S3). In arithmetic mode
// (m = 0) the output is F = P plus G plus carry, the carry being the inverse
// of cn (active low, as on the 74181 with active-high data). In logic mode
// (m = 1) there is no carry and F = ~(P ^ G). These are the 74181's own gate
// equations; they give the 32 functions of its data sheet, e.g. S = 1001 is
// A plus B / A xnor B, S = 0110 is A minus B minus 1 / A xor B, S = 1100 is
// A plus A / logic 1, S = 1010 gives B in logic mode.
//
// Outputs: cn4 carry out (active low), aeqb high when F is all ones (used by
// the CPU for its jump conditions), p_n / g_n group propagate and generate
// (active low, for carry-lookahead). Purely combinational.
// The A=B output is a plain output here rather than open collector.
module alu181 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [3:0]   s,
  input  logic         m,
  input  logic         cn,
  output logic [W-1:0] f,
  output logic         cn4,
  output logic         aeqb,
  output logic         p_n,
  output logic         g_n
);

  logic [W-1:0] p, g;
  logic [W:0]   c;      // carry into each bit, arithmetic mode

  assign p    = a | (b & {W{s[0]}}) | (~b & {W{s[1]}});
  assign g    = (a & ~b & {W{s[2]}}) | (a & b & {W{s[3]}});
  assign c[0] = ~cn;

  for (genvar i = 0; i < W; i++) begin : g_carry
    assign c[i+1] = g[i] | (p[i] & c[i]);
  end

  assign f = m ? ~(p ^ g) : (p ^ g) ^ c[W-1:0];

  // Group signals are independent of the carry input and the mode, as on the
  // real part.
  logic gg;
  always_comb begin
    gg = 1'b0;
    for (int i = 0; i < W; i++) gg = g[i] | (p[i] & gg);
  end

  assign cn4  = ~c[W];
  assign aeqb = &f;
  assign p_n  = ~&p;
  assign g_n  = ~gg;

endmodule
