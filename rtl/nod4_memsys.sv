// nod4_memsys - the nod4.1 memory system: address decode, ROM, RAM and LED register.
//
// The CPU drives the address bus ax, the write-data bus dout and the rd/wr strobes; the
// memory system returns read data on di. nod4_memena splits the address space into ROM
// ($00..$BF), RAM ($C0..$FB) and four device registers ($FC..$FF). Device 1 is the write-only
// LED register; devices 2..4 are left to optional peripherals outside this block, which see
// their enables on dev_ena and return read data on dev_di. Reads are asynchronous (data
// valid within the cycle in which rd is high, captured by the CPU at the rising edge);
// writes are committed at the rising edge at the end of the cycle in which wr is high.
// The structure follows the published memory system. The published design shares di with
// three-state drivers; here every source outputs 0 when not selected and the sources are
// ORed, which gives the same value with two-state logic.
module nod4_memsys #(
  parameter string ROM_FILE = "rtl/nod4_ex0.hex"
) (
  input  logic       clock,
  input  logic       clear,
  input  logic [7:0] ax,
  input  logic [7:0] dout,
  input  logic       rd,
  input  logic       wr,
  output logic [7:0] di,
  output logic [7:0] leds,
  output logic [2:0] dev_ena,   // Dev2Ena..Dev4Ena
  input  logic [7:0] dev_di
);
  logic       rom_ena, ram_ena;
  logic [3:0] dev_all;
  logic [7:0] rom_q, ram_q, ext_q;

  nod4_memena u_memena (.ax, .rom_ena, .ram_ena, .dev_ena(dev_all));

  nod4_rom192 #(.INIT_FILE(ROM_FILE)) u_rom (.ax, .rd, .ena(rom_ena), .qo(rom_q));

  nod4_ram60 u_ram (.clock, .ax(ax[5:0]), .dx(dout), .ena(ram_ena), .rd, .wr, .qo(ram_q));

  nod4_reg8x u_leds (.clock, .clear, .dx(dout), .ena(dev_all[0]), .wr, .qx(leds));

  assign dev_ena = dev_all[3:1];
  assign ext_q   = (rd && |dev_all[3:1]) ? dev_di : 8'h00;
  assign di      = rom_q | ram_q | ext_q;
endmodule
