// ctr569: 4-bit synchronous up/down binary counter with the behaviour of
// the 74LS569; the CPU's program counter.
//
// Priority on the rising clock edge: sclr_n low clears, else load_n low loads
// d, else with both enables enp_n and ent_n low the count steps up (up = 1)
// or down. aclr_n low clears at once, without a clock. rco_n goes low when
// ent_n is low and the count is at its terminal value (all ones counting up,
// zero counting down), for cascading. The 3-state output control and the
// clocked carry output of the real part are not modelled.
module ctr569 #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         aclr_n,
  input  logic         sclr_n,
  input  logic         load_n,
  input  logic         enp_n,
  input  logic         ent_n,
  input  logic         up,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         rco_n
);

  always_ff @(posedge clk or negedge aclr_n) begin
    if (!aclr_n)              q <= '0;
    else if (!sclr_n)         q <= '0;
    else if (!load_n)         q <= d;
    else if (!enp_n && !ent_n) q <= up ? q + 1'b1 : q - 1'b1;
  end

  assign rco_n = ~(!ent_n && (up ? (&q) : (q == '0)));

endmodule
