// nod4_datapath - the nod4.1 data path.
//
// Holds the programmer-visible registers A, C, S, X and PC and the hidden registers DX (data
// bus register), ND (temporary, used for indexed effective addresses) and IR (instruction
// register), the ALU with a 2-input multiplexer on its D input and a 6-input multiplexer on
// its B input, and the multiplexers that drive the address bus ax and the write-data bus
// dout. Every register loads the ALU result Y when its enable in the control word is high;
// C can instead load single flags from the ALU flag output F, or the interrupt-entry value
// {Z, C, I=0, IID}. DX loads the read bus di whenever the controller reads, so that the
// rest of the data path and the controller only ever see data that has been registered.
// All registers change at the rising clock edge; the bus multiplexers are combinational.
// The status returned to the controller is DX, C and IR. The register set, the ALU inputs
// and the bus multiplexers follow the published data path; which register feeds which
// multiplexer input, and the synchronous reset to zero, are this design's own choices.
module nod4_datapath
  import nod4_pkg::*;
(
  input  logic       clock,
  input  logic       reset,
  input  ctrl_t      ctl,
  input  logic [4:0] iid,       // IID written into C on interrupt entry
  input  logic [7:0] di,
  output logic [7:0] ax,
  output logic [7:0] dout,
  // status
  output logic [7:0] dx_q,
  output logic [7:0] c_q,
  output logic [7:0] ir_q,
  // visible registers, for observation
  output logic [7:0] a_q,
  output logic [7:0] s_q,
  output logic [7:0] x_q,
  output logic [7:0] pc_q
);
  logic [7:0] nd_q;
  logic [7:0] d_in, b_in, y;
  logic [1:0] f;

  always_comb begin
    d_in = (ctl.dsel == DSEL_A) ? a_q : dx_q;
    unique case (ctl.bsel)
      BSEL_C:  b_in = c_q;
      BSEL_S:  b_in = s_q;
      BSEL_X:  b_in = x_q;
      BSEL_PC: b_in = pc_q;
      BSEL_ND: b_in = nd_q;
      default: b_in = dx_q;
    endcase
  end

  nod4_alu u_alu (.d(d_in), .b(b_in), .op(ctl.alu_op), .y, .f);

  always_ff @(posedge clock) begin
    if (reset) begin
      a_q <= '0; c_q <= '0; s_q <= '0; x_q <= '0; pc_q <= '0;
      nd_q <= '0; ir_q <= '0; dx_q <= '0;
    end else begin
      if (ctl.a_ld)  a_q  <= y;
      if (ctl.s_ld)  s_q  <= y;
      if (ctl.x_ld)  x_q  <= y;
      if (ctl.pc_ld) pc_q <= y;
      if (ctl.nd_ld) nd_q <= y;
      if (ctl.ir_ld) ir_q <= dx_q;
      if (ctl.dx_ld) dx_q <= di;
      if (ctl.c_ld)        c_q <= y;
      else if (ctl.int_ld) c_q <= {c_q[C_Z], c_q[C_C], 1'b0, iid};
      else begin
        if (ctl.z_ld)  c_q[C_Z] <= f[1];
        if (ctl.cy_ld) c_q[C_C] <= f[0];
      end
    end
  end

  always_comb begin
    unique case (ctl.axsel)
      AXSEL_PC: ax = pc_q;
      AXSEL_S:  ax = s_q;
      AXSEL_DX: ax = dx_q;
      default:  ax = nd_q;
    endcase
    unique case (ctl.dosel)
      DOSEL_A:  dout = a_q;
      DOSEL_C:  dout = c_q;
      DOSEL_S:  dout = s_q;
      DOSEL_X:  dout = x_q;
      default:  dout = pc_q;
    endcase
  end
endmodule
