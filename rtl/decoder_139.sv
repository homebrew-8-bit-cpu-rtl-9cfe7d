// decoder_139: one half of a 74LS139 dual 2-to-4 decoder.
//
// With the enable G low, output Y[sel] is low and the others high; with G
// high all outputs are high.  Purely combinational.
//
// A standard part used by the source design; the model is written from its
// data-sheet function.
module decoder_139 (
  input  logic       g_n,
  input  logic [1:0] sel,     // {B, A}
  output logic [3:0] y_n
);
  always_comb begin
    y_n = 4'hF;
    if (!g_n) y_n[sel] = 1'b0;
  end
endmodule
