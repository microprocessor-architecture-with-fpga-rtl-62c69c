// tb_nod4_system - end-to-end test of the nod4.1 computer running a program from ROM.
//
// The ROM holds tb/nod4_systest.hex. The program reads a byte from device 2 ($FD), passes
// it on the stack to a subroutine that replaces it with its absolute value (stack-relative
// addressing, conditional branch, nega), pops the result, shows it on the LEDs and echoes it
// to device 3 ($FE). It loops until its interrupt handler has counted three interrupts,
// then issues swi, writes $A5 to the LEDs and stops. The bench supplies random device bytes,
// checks every echo and LED value against the absolute value it computes itself, raises
// three hardware interrupts, checks the final RAM counter and the clear input, and counts
// how often each mechanism of the design happened (pre-fetch, pre-fetch undo, hardware
// interrupt, swi, ROM/RAM/device accesses); a mechanism never seen counts as a failure.
module tb_nod4_system;
  logic       clock = 1'b0, reset = 1'b1, clear = 1'b0;
  logic       irq = 1'b0, iack;
  logic [4:0] irq_id = '0;
  logic [7:0] leds, ax, dout, dev_di;
  logic       rd, wr;
  logic [2:0] dev_ena;

  int checks = 0, failures = 0;

  nod4_system #(.ROM_FILE("tb/nod4_systest.hex")) dut (.*);

  always #5 clock = ~clock;

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  function automatic logic [7:0] absval(input logic [7:0] v);
    return v[7] ? 8'(-v) : v;
  endfunction

  // device 2 supplies a new random byte after every read
  logic [7:0] last_in = 8'h00;
  int n_prefetch = 0, n_undo = 0, n_hwint = 0, n_swi = 0, n_rom = 0, n_ram_rd = 0,
      n_ram_wr = 0, n_led = 0, n_dev_rd = 0, n_dev_wr = 0, n_neg = 0, n_cycles = 0, n_instr = 0;

  always @(posedge clock) if (!reset) begin
    n_cycles++;
    if (dut.u_cpu.state_o == 3'd2) n_instr++;     // every instruction passes fetch2 once
    if (dut.u_cpu.ev_prefetch) n_prefetch++;
    if (dut.u_cpu.ev_undo)     n_undo++;
    if (dut.u_cpu.ev_int)      begin if (iack) n_hwint++; else n_swi++; end
    if (rd && ax <= 8'hBF)                 n_rom++;
    if (rd && ax >= 8'hC0 && ax <= 8'hFB)  n_ram_rd++;
    if (wr && ax >= 8'hC0 && ax <= 8'hFB)  n_ram_wr++;
    if (rd && dev_ena[0]) begin
      n_dev_rd++;
      last_in = dev_di;
      if (last_in[7]) n_neg++;
      dev_di <= 8'($urandom);
    end
    if (wr && dev_ena[1]) begin
      n_dev_wr++;
      check("echo to device 3", dout, absval(last_in));
    end
    if (wr && ax == 8'hFC) begin
      n_led++;
      if (n_swi == 0) check("LED value", dout, absval(last_in));
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    dev_di = 8'h9C;                              // first value negative
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    for (int k = 0; k < 3; k++) begin
      repeat (200 + 37 * k) @(posedge clock);
      irq_id <= 5'(k + 1);
      irq    <= 1'b1;
      @(posedge clock iff iack);
      irq    <= 1'b0;
    end
    wait (n_swi == 1);
    wait (leds == 8'hA5);
    check("LEDs after swi", leds, 8'hA5);
    check("interrupt counter in RAM ($C1)", dut.u_mem.u_ram.mem[1], 8'h04);
    check("stack pointer back at top", dut.u_cpu.s_q, 8'hFC);
    @(posedge clock) clear <= 1'b1;
    @(posedge clock) clear <= 1'b0;
    #1 check("LEDs after clear", leds, 8'h00);
    need("pre-fetch", n_prefetch);
    need("pre-fetch undo", n_undo);
    need("hardware interrupt", n_hwint);
    need("software interrupt", n_swi);
    need("ROM read", n_rom);
    need("RAM read", n_ram_rd);
    need("RAM write", n_ram_wr);
    need("LED register write", n_led);
    need("device read", n_dev_rd);
    need("device write", n_dev_wr);
    need("negative input (nega path)", n_neg);
    $display("prefetch=%0d undo=%0d hwint=%0d swi=%0d rom=%0d ramrd=%0d ramwr=%0d led=%0d devrd=%0d devwr=%0d neg=%0d",
             n_prefetch, n_undo, n_hwint, n_swi, n_rom, n_ram_rd, n_ram_wr, n_led, n_dev_rd, n_dev_wr, n_neg);
    $display("instructions=%0d cycles=%0d average CPI=%0.2f", n_instr, n_cycles, real'(n_cycles) / real'(n_instr));
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
