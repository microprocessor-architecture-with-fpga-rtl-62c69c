// tb_nod4_memsys - bus-level test of the memory system with its default ROM contents.
//
// Drives ax/dout/rd/wr as the processor does and checks: ROM reads of the first program
// bytes, 500 random RAM writes and reads against a reference array, LED register writes
// (and that it reads back as 0), device 2..4 enables and their read data, write strobes to
// ROM being ignored, and the clear input.
module tb_nod4_memsys;
  logic       clock = 1'b0, clear = 1'b0;
  logic [7:0] ax = 0, dout = 0, di, leds, dev_di = 0;
  logic       rd = 0, wr = 0;
  logic [2:0] dev_ena;
  logic [7:0] model [60];
  int checks = 0, failures = 0;

  nod4_memsys dut (.*);

  always #5 clock = ~clock;

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %02h expected %02h", what, got, exp); end
  endtask

  task automatic write(input logic [7:0] a, input logic [7:0] v);
    @(negedge clock); ax = a; dout = v; wr = 1; rd = 0;
    @(posedge clock); #1 wr = 0;
  endtask

  task automatic read(input logic [7:0] a, output logic [7:0] v);
    @(negedge clock); ax = a; rd = 1; wr = 0;
    #1 v = di;
    @(posedge clock); #1 rd = 0;
  endtask

  initial begin
    logic [7:0] v;
    foreach (model[i]) model[i] = 8'h00;
    read(8'h00, v); check("ROM $00", v, 8'h02);
    read(8'h02, v); check("ROM $02", v, 8'hCB);
    read(8'h14, v); check("ROM $14", v, 8'h37);
    write(8'h14, 8'h99);
    read(8'h14, v); check("ROM not writable", v, 8'h37);
    for (int n = 0; n < 500; n++) begin
      automatic int i = $urandom_range(0, 59);
      if ($urandom_range(0, 1) == 1) begin
        v = 8'($urandom); write(8'(8'hC0 + i), v); model[i] = v;
      end else begin
        read(8'(8'hC0 + i), v); check("RAM read", v, model[i]);
      end
    end
    write(8'hFC, 8'h3C); check("LEDs", leds, 8'h3C);
    read(8'hFC, v);      check("LED register reads as 0", v, 8'h00);
    for (int d = 1; d < 4; d++) begin
      dev_di = 8'($urandom);
      @(negedge clock); ax = 8'(8'hFC + d); rd = 1; #1;
      checks++;
      if (dev_ena !== 3'(1 << (d - 1))) begin failures++; $display("FAIL dev_ena=%b for %02h", dev_ena, ax); end
      check("device read", di, dev_di);
      @(posedge clock); #1 rd = 0;
    end
    @(negedge clock); ax = 8'hC5; #1;
    checks++; if (dev_ena !== 3'b000) begin failures++; $display("FAIL dev_ena for RAM address"); end
    check("LEDs kept", leds, 8'h3C);
    @(negedge clock) clear = 1;
    @(posedge clock) #1 clear = 0;
    check("LEDs cleared", leds, 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
