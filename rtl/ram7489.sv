// ram7489: 16-word by 4-bit data RAM in the role of the 7489.
//
// Holds the CPU's data operands. A write of d to addr happens on the rising
// clock edge while we is high (STORE); the read port is asynchronous, so q
// follows addr within the same cycle (LOAD, ADD, SUB, AND, OR read it).
// Unlike the real 7489, writes are edge triggered rather than level
// sensitive, and q carries the true stored data (the 7489's outputs are
// complemented and would be followed by inverters). Contents are not reset.
module ram7489 #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 4
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= d;
  end

  assign q = mem[addr];

endmodule
