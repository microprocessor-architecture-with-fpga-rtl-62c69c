// nod4_cpu - the nod4.1 processor: controller and data path.
//
// The controller drives a control word (enables and multiplexer selects) into the data path
// and reads back the status registers DX, C and IR. To the memory system the processor
// presents an 8-bit address bus ax, a write-data bus dout (the "do" bus), a read-data bus di
// and the strobes rd and wr; reads are asynchronous and captured in DX at the rising edge
// that ends the read cycle, writes are committed at the rising edge that ends the write
// cycle. irq is a level request, taken at the end of an instruction when C.I = 1, and
// irq_id is stored as the IID in C[4:0]; iack pulses for one cycle at that moment. The
// remaining outputs expose the visible registers and controller events for observation.
// The split into controller and data path with status and enables between them follows
// the published processor; the interrupt handshake is this design's own.
module nod4_cpu
  import nod4_pkg::*;
(
  input  logic       clock,
  input  logic       reset,
  input  logic [7:0] di,
  output logic [7:0] ax,
  output logic [7:0] dout,
  output logic       rd,
  output logic       wr,
  input  logic       irq,
  input  logic [4:0] irq_id,
  output logic       iack,
  // observation
  output logic [7:0] a_q,
  output logic [7:0] c_q,
  output logic [7:0] s_q,
  output logic [7:0] x_q,
  output logic [7:0] pc_q,
  output logic [7:0] ir_q,
  output logic [2:0] state_o,
  output logic       ev_prefetch,
  output logic       ev_undo,
  output logic       ev_int
);
  ctrl_t      ctl;
  logic [4:0] iid;
  logic [7:0] dx_q;

  nod4_controller u_ctrl (
    .clock, .reset, .dx_q, .c_q, .ir_q, .irq, .irq_id,
    .ctl, .iid, .iack, .state_o, .ev_prefetch, .ev_undo, .ev_int
  );

  nod4_datapath u_dp (
    .clock, .reset, .ctl, .iid, .di, .ax, .dout,
    .dx_q, .c_q, .ir_q, .a_q, .s_q, .x_q, .pc_q
  );

  assign rd = ctl.rd;
  assign wr = ctl.wr;
endmodule
