// tb_alu181: exhaustive test of the 74LS181 slice against its data-sheet
// function table (active-high data), written out case by case.  Carry out
// is checked in the arithmetic mode for the functions that are plain sums
// or differences.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_alu181;
  logic [3:0] a, b, s, f;
  logic m, cn, cn4, aeqb;
  int checks = 0, failures = 0;

  alu181 dut (.*);

  function automatic logic [3:0] logic_f(logic [3:0] s, logic [3:0] a, logic [3:0] b);
    case (s)
      4'h0: return ~a;        4'h1: return ~(a | b);  4'h2: return ~a & b;
      4'h3: return 4'h0;      4'h4: return ~(a & b);  4'h5: return ~b;
      4'h6: return a ^ b;     4'h7: return a & ~b;    4'h8: return ~a | b;
      4'h9: return ~(a ^ b);  4'hA: return b;         4'hB: return a & b;
      4'hC: return 4'hF;      4'hD: return a | ~b;    4'hE: return a | b;
      default: return a;
    endcase
  endfunction

  function automatic logic [4:0] arith_f(logic [3:0] s, logic [3:0] a, logic [3:0] b, logic c);
    logic [4:0] A, B, C;
    A = {1'b0, a}; B = {1'b0, b}; C = {4'd0, c};
    case (s)
      4'h0: return A + C;
      4'h1: return {1'b0, a | b} + C;
      4'h2: return {1'b0, a | ~b} + C;
      4'h3: return 5'h0F + C;
      4'h4: return A + {1'b0, a & ~b} + C;
      4'h5: return {1'b0, a | b} + {1'b0, a & ~b} + C;
      4'h6: return A + {1'b0, ~b} + C;
      4'h7: return {1'b0, a & ~b} + 5'h0F + C;
      4'h8: return A + {1'b0, a & b} + C;
      4'h9: return A + B + C;
      4'hA: return {1'b0, a | ~b} + {1'b0, a & b} + C;
      4'hB: return {1'b0, a & b} + 5'h0F + C;
      4'hC: return A + A + C;
      4'hD: return {1'b0, a | b} + A + C;
      4'hE: return {1'b0, a | ~b} + A + C;
      default: return A + 5'h0F + C;
    endcase
  endfunction

  initial begin
    logic [4:0] r;
    for (int i = 0; i < 16384; i++) begin
      {m, cn, s, a, b} = 14'(i);
      #1;
      if (m) begin
        checks++;
        if (f !== logic_f(s, a, b)) begin
          failures++; $display("FAIL: logic s=%h a=%h b=%h f=%h", s, a, b, f);
        end
      end else begin
        r = arith_f(s, a, b, ~cn);
        checks++;
        if (f !== r[3:0]) begin
          failures++; $display("FAIL: arith s=%h a=%h b=%h cn=%b f=%h exp %h", s, a, b, cn, f, r[3:0]);
        end
        if (s == 4'h9 || s == 4'h6 || s == 4'h0 || s == 4'hC) begin
          checks++;
          if (cn4 !== ~r[4]) begin failures++; $display("FAIL: carry s=%h a=%h b=%h", s, a, b); end
        end
      end
      checks++; if (aeqb !== (f == 4'hF)) begin failures++; $display("FAIL: A=B"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
