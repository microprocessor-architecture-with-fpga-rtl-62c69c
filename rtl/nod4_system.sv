// nod4_system - a complete nod4.1 computer: processor plus memory system.
//
// The processor and the memory system are joined by unidirectional busses: ax (address),
// dout (data from the processor) and di (data to the processor), with the rd and wr strobes.
// The memory map is ROM $00..$BF (program, with the program start address at $00 and the
// program interrupt address at $01), RAM $C0..$FB (variables and stack) and four device
// registers $FC..$FF. Device 1 ($FC) is the LED output register. Devices 2..4 are left to
// optional peripherals: their enables, the busses and the strobes are outputs and their
// read data enter on dev_di. After reset the processor reads the start address from $00 and
// runs the program in ROM_FILE (by default a small demonstration that writes the absolute
// value of a byte to the LEDs). Everything runs on the rising edge of clock; reset and
// clear are synchronous and active high. The structure follows the published system; the
// ports for the optional devices and the interrupt handshake are this design's own.
module nod4_system #(
  parameter string ROM_FILE = "rtl/nod4_ex0.hex"
) (
  input  logic       clock,
  input  logic       reset,
  input  logic       clear,
  input  logic       irq,
  input  logic [4:0] irq_id,
  output logic       iack,
  output logic [7:0] leds,
  output logic [7:0] ax,
  output logic [7:0] dout,
  output logic       rd,
  output logic       wr,
  output logic [2:0] dev_ena,
  input  logic [7:0] dev_di
);
  logic [7:0] di;
  logic [7:0] a_q, c_q, s_q, x_q, pc_q, ir_q;
  logic [2:0] state;
  logic       ev_prefetch, ev_undo, ev_int;

  nod4_cpu u_cpu (
    .clock, .reset, .di, .ax, .dout, .rd, .wr, .irq, .irq_id, .iack,
    .a_q, .c_q, .s_q, .x_q, .pc_q, .ir_q, .state_o(state), .ev_prefetch, .ev_undo, .ev_int
  );

  nod4_memsys #(.ROM_FILE(ROM_FILE)) u_mem (
    .clock, .clear(clear || reset), .ax, .dout, .rd, .wr, .di, .leds, .dev_ena, .dev_di
  );
endmodule
