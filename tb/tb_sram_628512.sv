// tb_sram_628512: random writes and reads against a reference array over a
// small address window, checking /CS, /OE, /WE behaviour of the read
// enable and that writes need both /CS and /WE low.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_sram_628512;
  logic clk = 0, cs_n, oe_n, we_n, dout_oe;
  logic [18:0] a;
  logic [7:0] din, dout;
  logic [7:0] ref_mem [256];
  logic [255:0] valid;
  int checks = 0, failures = 0, n_wr = 0;

  sram_628512 dut (.*);
  always #5 clk = ~clk;

  initial begin
    valid = '0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      a = {11'h5A5, 8'($urandom)}; din = 8'($urandom);
      cs_n = $urandom_range(0, 3) == 0; oe_n = $urandom_range(0, 1);
      we_n = $urandom_range(0, 2) != 0;
      #1;
      checks++;
      if (dout_oe !== (!cs_n && !oe_n && we_n)) begin failures++; $display("FAIL: oe"); end
      if (valid[a[7:0]]) begin
        checks++;
        if (dout !== ref_mem[a[7:0]]) begin
          failures++; $display("FAIL: read %h got %h exp %h", a, dout, ref_mem[a[7:0]]);
        end
      end
      @(posedge clk);
      if (!cs_n && !we_n) begin ref_mem[a[7:0]] = din; valid[a[7:0]] = 1; n_wr++; end
    end
    checks++; if (n_wr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
