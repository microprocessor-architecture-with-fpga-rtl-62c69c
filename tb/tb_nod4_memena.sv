// tb_nod4_memena - checks the address decoder for all 256 addresses against the memory map
// ROM $00..$BF, RAM $C0..$FB, Dev1..Dev4 $FC..$FF, and that exactly one enable is high.
module tb_nod4_memena;
  logic [7:0] ax;
  logic       rom_ena, ram_ena;
  logic [3:0] dev_ena;
  int checks = 0, failures = 0;

  nod4_memena dut (.*);

  initial begin
    for (int a = 0; a < 256; a++) begin
      logic       er, em;
      logic [3:0] ed;
      ax = 8'(a);
      #1;
      er = (a < 192);
      em = (a >= 192 && a < 252);
      ed = (a >= 252) ? 4'(1 << (a - 252)) : 4'b0000;
      checks++;
      if (rom_ena !== er || ram_ena !== em || dev_ena !== ed || $countones({rom_ena, ram_ena, dev_ena}) != 1) begin
        failures++;
        $display("FAIL ax=%02h: rom=%b ram=%b dev=%b", ax, rom_ena, ram_ena, dev_ena);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
