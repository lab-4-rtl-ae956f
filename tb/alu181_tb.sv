// alu181_tb: exhaustive self-check of the 74181-style ALU.
//
// Every combination of A, B, S, M and Cn (8192 in all) is applied and F, the
// carry out, A=B and the group generate output are compared with a reference
// written from the 74181 function table (active-high data): each select code
// is a named logic function or a sum of two named terms plus the carry.
module alu181_tb;

  logic [3:0] a, b, s, f;
  logic       m, cn, cn4, aeqb, p_n, g_n;
  int checks = 0, failures = 0;

  alu181 #(.W(4)) dut (.*);

  // Reference: logic functions, M = H.
  function automatic logic [3:0] ref_logic(logic [3:0] s_, logic [3:0] x, logic [3:0] y);
    case (s_)
      4'h0: return ~x;        4'h1: return ~(x | y);
      4'h2: return ~x & y;    4'h3: return 4'h0;
      4'h4: return ~(x & y);  4'h5: return ~y;
      4'h6: return x ^ y;     4'h7: return x & ~y;
      4'h8: return ~x | y;    4'h9: return ~(x ^ y);
      4'ha: return y;         4'hb: return x & y;
      4'hc: return 4'hf;      4'hd: return x | ~y;
      4'he: return x | y;     default: return x;
    endcase
  endfunction

  // Reference: arithmetic, M = L: first term plus second term plus carry,
  // 5-bit result (bit 4 = carry out, active high).
  function automatic logic [4:0] ref_arith(logic [3:0] s_, logic [3:0] x, logic [3:0] y, logic cin);
    logic [3:0] t1, t2;
    case (s_)
      4'h0: begin t1 = x;        t2 = 4'h0;      end // A
      4'h1: begin t1 = x | y;    t2 = 4'h0;      end // A + B
      4'h2: begin t1 = x | ~y;   t2 = 4'h0;      end // A + /B
      4'h3: begin t1 = 4'h0;     t2 = 4'hf;      end // minus 1
      4'h4: begin t1 = x;        t2 = x & ~y;    end // A plus A/B
      4'h5: begin t1 = x | y;    t2 = x & ~y;    end // (A + B) plus A/B
      4'h6: begin t1 = x;        t2 = ~y;        end // A minus B minus 1
      4'h7: begin t1 = x & ~y;   t2 = 4'hf;      end // A/B minus 1
      4'h8: begin t1 = x;        t2 = x & y;     end // A plus AB
      4'h9: begin t1 = x;        t2 = y;         end // A plus B
      4'ha: begin t1 = x | ~y;   t2 = x & y;     end // (A + /B) plus AB
      4'hb: begin t1 = x & y;    t2 = 4'hf;      end // AB minus 1
      4'hc: begin t1 = x;        t2 = x;         end // A plus A
      4'hd: begin t1 = x | y;    t2 = x;         end // (A + B) plus A
      4'he: begin t1 = x | ~y;   t2 = x;         end // (A + /B) plus A
      default: begin t1 = x;     t2 = 4'hf;      end // A minus 1
    endcase
    return {1'b0, t1} + {1'b0, t2} + {4'b0, cin};
  endfunction

  task automatic check(string what, logic [4:0] got, logic [4:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h s=%h m=%b cn=%b: got %h expected %h", what, a, b, s, m, cn, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] r, r0;
    for (int i = 0; i < 8192; i++) begin
      {a, b, s, m, cn} = 14'(i);
      #1;
      if (m) begin
        r = {1'b0, ref_logic(s, a, b)};
        check("F logic", {1'b0, f}, r);
      end else begin
        r = ref_arith(s, a, b, ~cn);
        check("F arith", {1'b0, f}, {1'b0, r[3:0]});
        check("carry", {4'b0, cn4}, {4'b0, ~r[4]});
      end
      check("A=B", {4'b0, aeqb}, {4'b0, &r[3:0]});
      r0 = ref_arith(s, a, b, 1'b0);
      check("G", {4'b0, g_n}, {4'b0, ~r0[4]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
