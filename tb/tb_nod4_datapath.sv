// tb_nod4_datapath - random control words applied to the data path, checked cycle by cycle
// against a register-level reference model written in the bench.
//
// Every cycle the bench picks random register enables, multiplexer selects, ALU operation
// and read data. It checks the ax and dout busses combinationally and all registers (A, C,
// S, X, PC, DX, IR) after the clock edge. ND is checked through the ax and B multiplexers.
module tb_nod4_datapath;
  import nod4_pkg::*;
  logic       clock = 1'b0, reset = 1'b1;
  ctrl_t      ctl;
  logic [4:0] iid;
  logic [7:0] di, ax, dout, dx_q, c_q, ir_q, a_q, s_q, x_q, pc_q;
  int checks = 0, failures = 0;

  nod4_datapath dut (.*);

  always #5 clock = ~clock;

  // reference state
  logic [7:0] ma, mc, ms, mx, mpc, mnd, mir, mdx;

  function automatic logic [8:0] alu(input alu_op_t o, input logic [7:0] dd, input logic [7:0] bb);
    case (o)
      ALU_PASSD: return {1'b0, dd};
      ALU_PASSB: return {1'b0, bb};
      ALU_ADD:   return 9'(dd) + 9'(bb);
      ALU_SUB:   return 9'(dd) - 9'(bb);
      ALU_RSUB:  return 9'(bb) - 9'(dd);
      ALU_AND:   return {1'b0, dd & bb};
      ALU_OR:    return {1'b0, dd | bb};
      ALU_INCD:  return 9'(dd) + 9'd1;
      ALU_DECD:  return 9'(dd) - 9'd1;
      ALU_INCB:  return 9'(bb) + 9'd1;
      ALU_DECB:  return 9'(bb) - 9'd1;
      ALU_NOTD:  return {1'b0, ~dd};
      ALU_NEGD:  return 9'd0 - 9'(dd);
      default:   return 9'd0;
    endcase
  endfunction

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %02h expected %02h", what, got, exp); end
  endtask

  initial begin
    ctl = '0; iid = '0; di = '0;
    repeat (2) @(posedge clock);
    #1 reset = 1'b0;
    {ma, mc, ms, mx, mpc, mnd, mir, mdx} = '0;
    check("A after reset", a_q, 8'h00);
    check("PC after reset", pc_q, 8'h00);
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] dd, bb, eax, edo;
      logic [8:0] r;
      @(negedge clock);
      ctl = ctrl_t'({$urandom, $urandom});
      ctl.dsel   = dsel_t'($urandom_range(0, 1));
      ctl.bsel   = bsel_t'($urandom_range(0, 5));
      ctl.alu_op = alu_op_t'($urandom_range(0, int'(ALU_ZERO)));
      ctl.axsel  = axsel_t'($urandom_range(0, 3));
      ctl.dosel  = dosel_t'($urandom_range(0, 4));
      iid = 5'($urandom);
      di  = 8'($urandom);
      dd = (ctl.dsel == DSEL_A) ? ma : mdx;
      case (ctl.bsel)
        BSEL_C: bb = mc;  BSEL_S: bb = ms;  BSEL_X: bb = mx;
        BSEL_PC: bb = mpc; BSEL_ND: bb = mnd; default: bb = mdx;
      endcase
      case (ctl.axsel)
        AXSEL_PC: eax = mpc; AXSEL_S: eax = ms; AXSEL_DX: eax = mdx; default: eax = mnd;
      endcase
      case (ctl.dosel)
        DOSEL_A: edo = ma; DOSEL_C: edo = mc; DOSEL_S: edo = ms; DOSEL_X: edo = mx; default: edo = mpc;
      endcase
      #1;
      check("ax", ax, eax);
      check("dout", dout, edo);
      r = alu(ctl.alu_op, dd, bb);
      @(posedge clock);
      if (ctl.a_ld)  ma  = r[7:0];
      if (ctl.s_ld)  ms  = r[7:0];
      if (ctl.x_ld)  mx  = r[7:0];
      if (ctl.pc_ld) mpc = r[7:0];
      if (ctl.nd_ld) mnd = r[7:0];
      if (ctl.ir_ld) mir = mdx;
      if (ctl.dx_ld) mdx = di;
      if (ctl.c_ld) mc = r[7:0];
      else if (ctl.int_ld) mc = {mc[7:6], 1'b0, iid};
      else begin
        if (ctl.z_ld)  mc[7] = (r[7:0] == 8'h00);
        if (ctl.cy_ld) mc[6] = r[8];
      end
      #1;
      check("A", a_q, ma);   check("C", c_q, mc);   check("S", s_q, ms);
      check("X", x_q, mx);   check("PC", pc_q, mpc); check("DX", dx_q, mdx);
      check("IR", ir_q, mir);
    end
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
