// tb_addr_decode: checks the memory map at every 256-byte page of the
// low 2 MB, plus random pages above: exactly the right chip select (or
// none) must be active.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_addr_decode;
  logic [23:8] a;
  logic ram3_cs_n, ram2_cs_n, ram1_cs_n, ram0_cs_n, rom_cs_n, hw_cs_n;
  int checks = 0, failures = 0;

  addr_decode dut (.*);

  task automatic one(logic [23:0] adr);
    logic [5:0] exp;   // {ram3, ram2, ram1, ram0, rom, hw} active-high
    a = adr[23:8];
    #1;
    exp = '0;
    if (adr <= 24'h003EFF) exp[1] = 1;
    else if (adr <= 24'h003FFF) exp[0] = 1;
    else if (adr <= 24'h07FFFF) exp[2] = 1;
    else if (adr <= 24'h0FFFFF) exp[3] = 1;
    else if (adr <= 24'h17FFFF) exp[4] = 1;
    else if (adr <= 24'h1FFFFF) exp[5] = 1;
    checks++;
    if (~{ram3_cs_n, ram2_cs_n, ram1_cs_n, ram0_cs_n, rom_cs_n, hw_cs_n} !== exp) begin
      failures++; $display("FAIL: address %h", adr);
    end
  endtask

  initial begin
    for (int p = 0; p < 'h2000; p++) one({p[15:0], 8'h00});
    for (int i = 0; i < 2000; i++) one(24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
