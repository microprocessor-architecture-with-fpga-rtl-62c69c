// nod4_alu - the 8-bit arithmetic logic unit of the nod4.1 data path.
//
// Purely combinational. Y is the result that any register can load; F = {z, c} is the flag
// output that the C register can load bit by bit. z is set when Y is zero. c is the carry
// out of an addition or increment, and the borrow of a subtraction, decrement or negation
// (1 when the unsigned result wrapped below zero); for the logic and pass operations c is 0
// and the controller does not load it. The ALU with its D and B inputs and its Y and F
// outputs follows the published data path; the operation set is what the instruction set
// needs, and its encoding (alu_op_t) is this design's own.
module nod4_alu
  import nod4_pkg::*;
(
  input  logic [7:0] d,
  input  logic [7:0] b,
  input  alu_op_t    op,
  output logic [7:0] y,
  output logic [1:0] f     // {z, c}
);
  logic [8:0] r;   // bit 8 = carry / borrow

  always_comb begin
    unique case (op)
      ALU_PASSD: r = {1'b0, d};
      ALU_PASSB: r = {1'b0, b};
      ALU_ADD:   r = {1'b0, d} + {1'b0, b};
      ALU_SUB:   r = {1'b0, d} - {1'b0, b};
      ALU_RSUB:  r = {1'b0, b} - {1'b0, d};
      ALU_AND:   r = {1'b0, d & b};
      ALU_OR:    r = {1'b0, d | b};
      ALU_INCD:  r = {1'b0, d} + 9'd1;
      ALU_DECD:  r = {1'b0, d} - 9'd1;
      ALU_INCB:  r = {1'b0, b} + 9'd1;
      ALU_DECB:  r = {1'b0, b} - 9'd1;
      ALU_NOTD:  r = {1'b0, ~d};
      ALU_NEGD:  r = 9'd0 - {1'b0, d};
      default:   r = 9'd0;            // ALU_ZERO
    endcase
  end

  assign y = r[7:0];
  assign f = {(r[7:0] == 8'd0), r[8]};
endmodule
