// pc_lohi: one low or middle byte of the 24-bit program counter, one GAL22V10.
//
// Priority: synchronous reset to 0, then load from D (/LD low), then count
// up by one when the carry input /CNT_IN is low, else hold.  /CNT_OUT goes
// low when /CNT_IN is low and the byte is 0xFF, so the next byte counts on
// the same edge; the three PC bytes therefore form one 24-bit synchronous
// counter.  The outputs drive the address bus while /OE is low (modelled as
// q plus active-high q_oe); /OE comes from the bank byte, which combines the
// PC address select with reset.  Equations follow the source design.
//
// Timing: registers update on the rising edge of Q0 (clk with ce high);
// /CNT_OUT is combinational.
module pc_lohi (
  input  logic       clk,
  input  logic       ce,
  input  logic [7:0] d,
  input  logic       reset_n,
  input  logic       cnt_in_n,
  input  logic       ld_n,
  input  logic       oe_n,
  output logic [7:0] q,
  output logic       q_oe,
  output logic       cnt_out_n
);
  always_ff @(posedge clk) begin
    if (ce) begin
      if (!reset_n)        q <= 8'h00;
      else if (!ld_n)      q <= d;
      else if (!cnt_in_n)  q <= q + 8'd1;
    end
  end
  assign cnt_out_n = ~(~cnt_in_n & (&q));
  assign q_oe      = ~oe_n;
endmodule
