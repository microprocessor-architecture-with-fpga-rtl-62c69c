// tb_nod4_system_ex0 - the nod4.1 computer with every parameter at its default.
//
// The default ROM holds the demonstration program: set the stack to $FC, point X at a
// data byte ($37), call a subroutine that loads the byte through X, compares it with $80,
// negates it if it is negative, writes it to the LED register at $FC and returns; the main
// program then loops on a jump to itself. The bench checks the LED value, that the return
// address ($08) was pushed at $FB, that the stack pointer is back at $FC, that the program
// ends in its idle loop, and that the LED write happens in cycle 27 after reset
// (init 2 + lds 3 + ldx 3 + jsr 5 + indexed lda 5 + cmpa 3 + jlo 3, then fetch1, fetch2 and
// the write cycle of sta).
module tb_nod4_system_ex0;
  logic       clock = 1'b0, reset = 1'b1, clear = 1'b0;
  logic       irq = 1'b0, iack;
  logic [4:0] irq_id = '0;
  logic [7:0] leds, ax, dout, dev_di = 8'h00;
  logic       rd, wr;
  logic [2:0] dev_ena;

  int checks = 0, failures = 0, cyc = 0, led_cycle = -1;

  nod4_system dut (.*);

  always #5 clock = ~clock;

  task automatic check(input string what, input int got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  always @(posedge clock) if (!reset) begin
    cyc++;
    if (wr && ax == 8'hFC && led_cycle < 0) led_cycle = cyc;
  end

  initial begin
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    repeat (60) @(posedge clock);
    check("LEDs", int'(leds), 'h37);
    check("return address at $FB", int'(dut.u_mem.u_ram.mem[59]), 'h08);
    check("stack pointer", int'(dut.u_cpu.s_q), 'hFC);
    check("in the Done loop", (dut.u_cpu.pc_q >= 8'h08 && dut.u_cpu.pc_q <= 8'h0A) ? 1 : 0, 1);
    check("cycle of the LED write", led_cycle, 27);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
