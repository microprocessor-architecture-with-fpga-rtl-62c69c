// nod4_memena - address decoder of the nod4.1 memory system.
//
// Combinational. Maps the 8-bit address bus onto the three regions of the memory map:
// RomEna for $00..$BF (192-byte ROM), RamEna for $C0..$FB (60-byte RAM) and one enable
// for each of the four device registers at $FC..$FF (dev_ena[0] = Dev1 at $FC, which is
// the LED output register). Exactly one enable is high for every address. The regions
// follow the published memory map; the order of Dev2..Dev4 above $FC is this design's own.
module nod4_memena
  import nod4_pkg::*;
(
  input  logic [7:0] ax,
  output logic       rom_ena,
  output logic       ram_ena,
  output logic [3:0] dev_ena    // Dev1Ena..Dev4Ena
);
  always_comb begin
    rom_ena = (ax <= ROM_LAST);
    ram_ena = (ax >= RAM_BASE) && (ax <= RAM_LAST);
    dev_ena = '0;
    if (ax >= DEV_BASE) dev_ena[ax[1:0]] = 1'b1;
  end
endmodule
