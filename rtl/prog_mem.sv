// prog_mem: byte-wide program RAM for the stored-program CPU.
//
// Instruction k occupies byte 2k (byte 0, control) and 2k+1 (byte 1, DB and
// RAM address), so the fetch address is {PC, phase}. A write port (we,
// waddr, wdata; rising clock edge) loads the program; the read port is
// asynchronous. Default 32 bytes = 16 instructions, the reach of a 4-bit PC.
// Size and loading method are this design's choice. Contents are not reset.
module prog_mem #(
  parameter int unsigned AW = 5
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);

  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
