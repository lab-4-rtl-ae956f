// cpu4_pkg: types and constants shared by the 4-bit accumulator CPU.
//
// An instruction is two bytes. Byte 0 carries the raw control lines of the
// datapath, so the "opcode" is simply the setting of those lines:
//   bit 7 MUX  1 = ALU operand B is the immediate DB field, 0 = the RAM word
//   bit 6 W    1 = write ACC into RAM (together with MUX = 1: a jump)
//   bit 5 Cn   74181 carry input, active low (0 = add one)
//   bit 4 M    74181 mode, 1 = logic, 0 = arithmetic
//   bits 3..0  74181 function select S3..S0
// Byte 1 holds the 4-bit immediate DB (bits 7..4) and the RAM address (3..0).
//
// The mnemonic table below gives byte 0 for each instruction of the set. The
// control-bit layout and the instruction set follow the lab description; the
// particular S/M/Cn values are derived here from the 74181 function table with
// ALU input A wired to ACC and input B to the operand selector, and the
// jump encoding (MUX = W = 1, condition taken from the ALU's A=B output) is
// this design's own choice.
package cpu4_pkg;

  typedef struct packed {
    logic       mux;  // B operand: 1 = DB, 0 = RAM
    logic       w;    // RAM write
    logic       cn;   // carry in, active low
    logic       m;    // 1 = logic, 0 = arithmetic
    logic [3:0] s;    // function select
  } byte0_t;

  typedef struct packed {
    logic [3:0] db;   // immediate data
    logic [3:0] addr; // RAM address
  } byte1_t;

  // Byte 0 of each instruction of the set.
  typedef enum logic [7:0] {
    OP_NOP   = 8'b0011_1111,  // F = A               ACC -> ACC
    OP_INV   = 8'b0011_0000,  // F = not A           /ACC -> ACC
    OP_SHIFT = 8'b0010_1100,  // F = A plus A        ACC plus ACC -> ACC
    OP_LDI   = 8'b1011_1010,  // F = B (DB)          DB -> ACC
    OP_LOAD  = 8'b0011_1010,  // F = B (RAM)         RAM -> ACC
    OP_STORE = 8'b0111_1111,  // F = A, W = 1        ACC -> RAM
    OP_ADD   = 8'b0010_1001,  // F = A plus B        ACC plus RAM -> ACC
    OP_SUB   = 8'b0000_0110,  // F = A minus B       ACC minus RAM -> ACC
    OP_AND   = 8'b0011_1011,  // F = AB              ACC and RAM -> ACC
    OP_OR    = 8'b0011_1110,  // F = A + B           ACC or RAM -> ACC
    OP_ADDI  = 8'b1010_1001,  //                     ACC plus DB -> ACC
    OP_SUBI  = 8'b1000_0110,  //                     ACC minus DB -> ACC
    OP_ANDI  = 8'b1011_1011,  //                     ACC and DB -> ACC
    OP_ORI   = 8'b1011_1110,  //                     ACC or DB -> ACC
    OP_JMPZ  = 8'b1111_1100,  // F = 1111 always     0 -> PC
    OP_JIFZ  = 8'b1111_0000,  // F = not A           0 -> PC if ACC = 0000
    OP_JIFN  = 8'b1111_1111,  // F = A               0 -> PC if ACC = 1111
    OP_JIFP  = 8'b1110_0110   // F = A minus DB minus 1, with DB = 0001:
                              //                     0 -> PC if ACC = 0001
  } op_e;

  // DB value a JIFP instruction must carry.
  localparam logic [3:0] JIFP_DB = 4'b0001;

  function automatic logic [15:0] instr(op_e op, logic [3:0] db, logic [3:0] addr);
    return {op, db, addr};
  endfunction

endpackage
