// decoder_138: 74LS138 3-to-8 decoder.
//
// Enabled when G1 is high and /G2A and /G2B are low; output Y[sel] then goes
// low, the others stay high.  Purely combinational.
//
// A standard part used by the source design; the model is written from its
// data-sheet function.
module decoder_138 (
  input  logic       g1,
  input  logic       g2a_n,
  input  logic       g2b_n,
  input  logic [2:0] sel,     // {C, B, A}
  output logic [7:0] y_n
);
  always_comb begin
    y_n = 8'hFF;
    if (g1 && !g2a_n && !g2b_n) y_n[sel] = 1'b0;
  end
endmodule
