// nod4_ram60 - data RAM of the nod4.1 memory system.
//
// DEPTH bytes (60 by default, addresses $C0..$FB) of asynchronous-read, synchronous-write
// memory. ax is the low six address bits. A write happens at the rising clock edge when
// ena (RamEna) and wr are high; a read is combinational, qo showing the byte at ax while
// ena and rd are high and 0 otherwise (so that device outputs can be ORed onto di). The
// write and read timing follow the published memory cycles; the zero-when-idle output
// replaces a three-state output, and the contents start at 0 (a choice of this design).
module nod4_ram60 #(
  parameter int unsigned DEPTH = 60
) (
  input  logic       clock,
  input  logic [5:0] ax,
  input  logic [7:0] dx,
  input  logic       ena,
  input  logic       rd,
  input  logic       wr,
  output logic [7:0] qo
);
  logic [7:0] mem [DEPTH];

  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = 8'h00;

  always_ff @(posedge clock)
    if (ena && wr && (32'(ax) < DEPTH)) mem[ax] <= dx;

  assign qo = (ena && rd && (32'(ax) < DEPTH)) ? mem[ax] : 8'h00;
endmodule
