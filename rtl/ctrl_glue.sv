// ctrl_glue: the CPU's small control decode, the job of its NAND gates.
//
// From byte 0's MUX and W bits and the ALU's A=B flag it forms the three
// strobes of an executing clock (exec high):
//   - MUX = 0, W = 1: STORE, ram_we high, ACC reloaded with F (the STORE
//     encoding makes F = ACC);
//   - MUX = 1, W = 1: a jump, neither RAM nor ACC written; jump goes high
//     when the ALU output is all ones (aeqb), which clears PC;
//   - otherwise: ACC loads the ALU output.
// Using the otherwise meaningless MUX = W = 1 combination for jumps, and the
// A=B output for their conditions, is this design's choice. Combinational.
module ctrl_glue (
  input  logic exec,
  input  logic mux,
  input  logic w,
  input  logic aeqb,
  output logic ram_we,
  output logic acc_load,
  output logic jump
);

  logic is_jump;

  always_comb begin
    is_jump  = mux & w;
    ram_we   = exec & w & ~mux;
    acc_load = exec & ~is_jump;
    jump     = exec & is_jump & aeqb;
  end

endmodule
