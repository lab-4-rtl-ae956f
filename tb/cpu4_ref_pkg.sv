// cpu4_ref_pkg: instruction-level reference model of the 4-bit CPU, for the
// testbenches. It executes an instruction from its mnemonic's definition
// (DB -> ACC, ACC plus RAM -> ACC, 0 -> PC if ACC = 0, ...) rather than from
// the control bits, so it checks that each byte-0 encoding does what the
// instruction should. A RAM word the model has not seen written is
// "unknown"; a LOAD of it is reported so the testbench can adopt the value
// the design shows.
package cpu4_ref_pkg;
  import cpu4_pkg::*;

  class cpu4_model;
    logic [3:0] acc;
    logic [3:0] pc;
    logic [3:0] ram [16];
    bit         known [16];
    bit         jumped;
    bit         carry;     // ADD/ADDI/SHIFT wrapped past 15
    bit         borrow;    // SUB/SUBI went below 0
    bit         unknown_read;

    function void reset();
      acc = 0;
      pc  = 0;
      foreach (known[i]) known[i] = 0;
    endfunction

    // Execute one instruction; returns 0 for a byte 0 outside the set.
    function bit step(logic [7:0] b0, logic [7:0] b1);
      logic [3:0] db, a, r;
      logic [4:0] t;
      db = b1[7:4];
      a  = b1[3:0];
      r  = ram[a];
      jumped = 0; carry = 0; borrow = 0; unknown_read = 0;
      case (b0)
        OP_NOP:   ;
        OP_INV:   acc = ~acc;
        OP_SHIFT: begin t = {1'b0, acc} + {1'b0, acc}; carry = t[4]; acc = t[3:0]; end
        OP_LDI:   acc = db;
        OP_LOAD:  begin unknown_read = !known[a]; acc = r; end
        OP_STORE: begin ram[a] = acc; known[a] = 1; end
        OP_ADD:   begin t = {1'b0, acc} + {1'b0, r}; carry = t[4]; acc = t[3:0]; end
        OP_SUB:   begin borrow = acc < r; acc = acc - r; end
        OP_AND:   acc = acc & r;
        OP_OR:    acc = acc | r;
        OP_ADDI:  begin t = {1'b0, acc} + {1'b0, db}; carry = t[4]; acc = t[3:0]; end
        OP_SUBI:  begin borrow = acc < db; acc = acc - db; end
        OP_ANDI:  acc = acc & db;
        OP_ORI:   acc = acc | db;
        OP_JMPZ:  jumped = 1;
        OP_JIFZ:  jumped = (acc == 4'h0);
        OP_JIFN:  jumped = (acc == 4'hf);
        OP_JIFP:  jumped = (acc == 4'h1);
        default:  return 0;
      endcase
      if (b0 inside {OP_ADD, OP_SUB, OP_AND, OP_OR} && !known[a]) unknown_read = 1;
      pc = jumped ? 4'h0 : pc + 4'h1;
      return 1;
    endfunction

    // The design showed acc_seen after a LOAD of an unknown word: take it.
    function void adopt_load(logic [3:0] addr, logic [3:0] acc_seen);
      acc = acc_seen;
      ram[addr] = acc_seen;
      known[addr] = 1;
    endfunction
  endclass

  // The 18 instructions of the set, for random programs.
  localparam int N_OPS = 18;
  localparam op_e OPS [N_OPS] = '{OP_NOP, OP_INV, OP_SHIFT, OP_LDI, OP_LOAD,
    OP_STORE, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI,
    OP_JMPZ, OP_JIFZ, OP_JIFN, OP_JIFP};

  // Active-low segment pattern {g..a} expected for a displayed value, from
  // the lit segment letters of each glyph.
  function automatic logic [6:0] glyph_n(logic [3:0] v);
    string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "deg", "cdg",
                        "bfg", "adfg", "defg", ""};
    logic [6:0] s = 7'h7f;
    for (int i = 0; i < lit[v].len(); i++) s[3'(lit[v][i] - "a")] = 1'b0;
    return s;
  endfunction

endpackage
