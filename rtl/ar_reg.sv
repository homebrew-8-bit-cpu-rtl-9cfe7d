// ar_reg: one byte of the 24-bit address register AR, one GAL22V10.
//
// Load from D when /LD is low, else count up when /CNT_IN is low, else hold.
// No reset.  /CNT_OUT is low when /CNT_IN is low and the byte is 0xFF,
// chaining the three bytes into one 24-bit counter.  Outputs drive the
// address bus while /OE (/ADRSEL_AR) is low.  Equations follow the source
// design.
//
// Timing: registers update on the rising edge of Q0 (clk with ce high).
module ar_reg (
  input  logic       clk,
  input  logic       ce,
  input  logic [7:0] d,
  input  logic       cnt_in_n,
  input  logic       ld_n,
  input  logic       oe_n,
  output logic [7:0] q,
  output logic       q_oe,
  output logic       cnt_out_n
);
  always_ff @(posedge clk) begin
    if (ce) begin
      if (!ld_n)          q <= d;
      else if (!cnt_in_n) q <= q + 8'd1;
    end
  end
  assign cnt_out_n = ~(~cnt_in_n & (&q));
  assign q_oe      = ~oe_n;
endmodule
