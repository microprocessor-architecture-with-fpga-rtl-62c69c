// nod4_rom192 - program ROM of the nod4.1 memory system.
//
// DEPTH bytes (192 by default, addresses $00..$BF) of read-only memory with an asynchronous
// read: qo shows the byte at ax while both ena (RomEna) and rd are high, and 0 otherwise,
// so that the read data of all devices can be ORed onto the CPU's di bus. The contents are
// loaded from INIT_FILE (one hex byte per line, $readmemh format, path relative to the
// directory the simulator runs in); bytes the file does not give are 0. The default file
// holds a short demonstration program. Size and read behaviour follow the published memory
// system; the zero-when-idle output replaces the three-state output of the original.
module nod4_rom192 #(
  parameter int unsigned DEPTH     = 192,
  parameter string       INIT_FILE = "rtl/nod4_ex0.hex"
) (
  input  logic [7:0] ax,
  input  logic       rd,
  input  logic       ena,
  output logic [7:0] qo
);
  logic [7:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = 8'h00;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign qo = (ena && rd && (32'(ax) < DEPTH)) ? mem[ax] : 8'h00;
endmodule
