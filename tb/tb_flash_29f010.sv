// tb_flash_29f010: fills the array through INIT-free direct writes and a
// pattern, then checks reads at random addresses and the output enable
// (both /CE and /OE low).  Unwritten words must read as erased (FF).
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_flash_29f010;
  logic [16:0] a;
  logic ce_n, oe_n, dq_oe;
  logic [7:0] dq;
  int checks = 0, failures = 0;

  flash_29f010 dut (.*);

  function automatic logic [7:0] pat(logic [16:0] x);
    return 8'(x[7:0] ^ x[15:8] ^ {7'd0, x[16]} ^ 8'h5A);
  endfunction

  initial begin
    #1;
    for (int i = 0; i < 65536; i++) dut.mem[i] = pat(17'(i));
    for (int i = 0; i < 2000; i++) begin
      a = 17'($urandom); ce_n = $urandom_range(0, 1); oe_n = $urandom_range(0, 1);
      #1; checks++;
      if (dq_oe !== (!ce_n && !oe_n)) begin failures++; $display("FAIL: oe"); end
      checks++;
      if (dq !== (a[16] ? 8'hFF : pat(a))) begin
        failures++; $display("FAIL: a=%h dq=%h", a, dq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
