// alucc: ALU condition codes, one GAL22V10.
//
// Holds the four flags C (carry, stored active low), N (negative, active
// high), Z (zero/equal, stored active low) and V (overflow, stored active
// low).  The microcode's two select bits S1,S0 choose what happens on each
// clock edge:
//   00  hold
//   01  shift left : V <- Z, Z <- N, N <- C, C <- 0 (stored level)
//   10  shift right: C <- N, N <- Z, Z <- V, V <- bit 3 of register X
//   11  load from the ALU: C from the carry out, N from F7, Z from F == 0,
//       V from the sign rule for addition (FUNC1 = 0) or subtraction
//       (FUNC1 = 1) using the operand sign bits A7, B7 and F7.
// The shifts let the microcode move any flag into the microcode address
// bits one at a time.  Equations follow the source design.
//
// Timing: flags update on the rising edge of Q0 (clk with ce high).
module alucc (
  input  logic       clk,
  input  logic       ce,
  input  logic [7:0] f,        // ALU result
  input  logic       func1,    // ALU function bit 1: 1 = subtraction
  input  logic       a7,
  input  logic       b7,
  input  logic       cin_n,    // ALU carry out (active low)
  input  logic       s0,
  input  logic       s1,
  input  logic       regx3,
  output logic       cc_c_n,
  output logic       cc_n,
  output logic       cc_z_n,
  output logic       cc_v_n
);
  logic ovf;

  always_comb begin
    if (!func1) ovf = (a7 == b7) && (f[7] != a7);
    else        ovf = (a7 != b7) && (f[7] != a7);
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      unique case ({s1, s0})
        2'b00: ;
        2'b01: begin
          cc_c_n <= 1'b0;
          cc_n   <= cc_c_n;
          cc_z_n <= cc_n;
          cc_v_n <= cc_z_n;
        end
        2'b10: begin
          cc_c_n <= cc_n;
          cc_n   <= cc_z_n;
          cc_z_n <= cc_v_n;
          cc_v_n <= regx3;
        end
        2'b11: begin
          cc_c_n <= cin_n;
          cc_n   <= f[7];
          cc_z_n <= |f;
          cc_v_n <= ~ovf;
        end
      endcase
    end
  end
endmodule
