// tb_memory_system: reads and writes across the memory map.  Boot ROM
// contents are preset; random stores go to RAM banks 0 and 1 (and attempts
// to the ROM, which must not change anything), random loads come back from
// a reference copy.  Device-page accesses must decode the LCD and USB
// slots and pass device data through; banks 2 and 3 only raise their
// selects.  Write strobes are applied, as on the CPU, in the last quarter.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_memory_system;
  logic clk = 0;
  logic [23:0] adrbus;
  logic [7:0] databus, dev_d, mem_bus, mem_rd;
  logic ld_mem_n, en_membuf_n, oe_mem_n, we_mem_n, dev_oe, mem_rd_oe;
  logic hwsel_usb_n, hwsel_lcd_n, ram2_cs_n, ram3_cs_n;
  logic [7:0] model [logic [23:0]];
  int checks = 0, failures = 0, n_rd = 0;

  memory_system dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [23:0] rand_adr();
    case ($urandom_range(0, 4))
      0: return {10'd0, 14'($urandom_range(0, 16'h3EFF))};          // ROM
      1: return 24'h004000 + 24'($urandom_range(0, 255));            // RAM0 low
      2: return 24'h07FF00 + 24'($urandom_range(0, 255));            // RAM0 top
      3: return 24'h080000 + 24'($urandom_range(0, 511));            // RAM1
      default: return 24'h003F00 + 24'($urandom_range(0, 255));      // devices
    endcase
  endfunction

  initial begin
    logic [23:0] a; logic wr;
    #1;
    for (int i = 0; i < 16'h3F00; i++) begin
      dut.u_bootrom.mem[i] = 8'(i * 7 + 3);
      model[24'(i)] = 8'(i * 7 + 3);
    end
    dev_d = 8'h00; dev_oe = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      a = rand_adr(); wr = $urandom_range(0, 1);
      adrbus = a; databus = 8'($urandom);
      ld_mem_n = !wr; en_membuf_n = 0; oe_mem_n = wr; we_mem_n = 1;
      dev_oe = (a[23:8] == 16'h003F) && !wr && $urandom_range(0, 1);
      dev_d = 8'($urandom);
      #1;
      check(hwsel_lcd_n == !(a[23:4] == 20'h003F0), "LCD slot");
      check(hwsel_usb_n == !(a[23:4] == 20'h003F1), "USB slot");
      check(ram2_cs_n && ram3_cs_n, "banks 2 and 3 idle");
      if (wr) begin
        check(mem_bus == databus && !mem_rd_oe, "store drives memory bus");
        we_mem_n = 0;
        @(posedge clk);
        if (a >= 24'h004000 && a < 24'h100000) model[a] = databus;
        @(negedge clk); we_mem_n = 1;
      end else begin
        check(mem_rd_oe, "load enables buffer to data bus");
        if (a[23:8] == 16'h003F) begin
          check(mem_rd == (dev_oe ? dev_d : 8'h00), "device data");
        end else if (model.exists(a)) begin
          check(mem_rd == model[a], $sformatf("read %h: %h expected %h", a, mem_rd, model[a]));
          check(mem_bus == mem_rd, "memory bus shows read data");
          n_rd++;
        end
      end
    end
    adrbus = 24'h100123; ld_mem_n = 1; oe_mem_n = 0; #1;
    check(!ram2_cs_n && ram3_cs_n, "bank 2 select");
    adrbus = 24'h1FFFFF; #1;
    check(ram2_cs_n && !ram3_cs_n, "bank 3 select");
    check(n_rd > 100, "reads checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
