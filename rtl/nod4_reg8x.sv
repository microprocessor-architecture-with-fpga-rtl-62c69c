// nod4_reg8x - 8-bit output register (device 1 at $FC) that drives the board LEDs.
//
// qx loads dx at the rising clock edge when ena (Dev1Ena) and wr are high. clear sets it
// to 0 at the next rising edge and wins over a write. The register is write-only, as in the
// published memory system; the synchronous clear is this design's own choice.
module nod4_reg8x (
  input  logic       clock,
  input  logic       clear,
  input  logic [7:0] dx,
  input  logic       ena,
  input  logic       wr,
  output logic [7:0] qx
);
  always_ff @(posedge clock)
    if (clear)           qx <= 8'h00;
    else if (ena && wr)  qx <= dx;
endmodule
