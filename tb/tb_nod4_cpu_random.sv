// tb_nod4_cpu_random - random programs run on the processor and on an instruction-level
// reference model, compared after every instruction.
//
// For each of 60 programs the bench fills addresses $02..$79 with random instructions
// (every opcode, jumps, jsr, rts, rti, swi and reserved ones included), puts an rti at the
// interrupt address $7C and resets the processor. Addresses $00..$7F behave as ROM (writes
// ignored), $80..$FF as RAM. Hardware interrupt requests with random IIDs arrive at random
// times. Each time the processor enters fetch2 the previous instruction has finished: the
// bench compares A, C, S and X with the model and then lets the model execute the next
// instruction. When the processor acknowledges a request, the model performs the same
// interrupt entry (so the saved PC checks the pre-fetch undo) and the bench checks that
// I was set; a request that stays pending across an instruction boundary with I = 1 before
// and after the instruction is reported as missed, except after an instruction that loads
// the whole C register (the processor defers the request by one instruction there). RAM is compared at the end of each program.
//
// A program stops early when psh writes the byte the processor has already pre-fetched as
// the next opcode (code running from RAM): there the hardware correctly runs the old byte
// and an instruction-level model cannot follow it.
//
// The model is written from the instruction-set description (encoding fields, flag rules,
// stack convention) and shares no code with the design.
module tb_nod4_cpu_random;
  logic       clock = 1'b0, reset = 1'b1;
  logic [7:0] di, ax, dout;
  logic       rd, wr, iack;
  logic       irq = 1'b0;
  logic [4:0] irq_id = 5'd0;
  logic [7:0] a_q, c_q, s_q, x_q, pc_q, ir_q;
  logic [2:0] state;
  logic       ev_prefetch, ev_undo, ev_int;
  logic [7:0] mem [256];

  int checks = 0, failures = 0;

  nod4_cpu dut (.clock, .reset, .di, .ax, .dout, .rd, .wr, .irq, .irq_id, .iack,
                .a_q, .c_q, .s_q, .x_q, .pc_q, .ir_q, .state_o(state), .ev_prefetch, .ev_undo, .ev_int);

  always #5 clock = ~clock;

  assign di = rd ? mem[ax] : 8'h00;
  always_ff @(posedge clock) if (wr && ax[7]) mem[ax] <= dout;

  // ---------------------------------------------------------------- reference model
  logic [7:0] ma, mc, ms, mx, mpc;
  logic [7:0] mm [256];
  logic       hazard;
  logic       c_written;                  // the last instruction loaded the whole C register

  function automatic logic [7:0] get_r(input logic [1:0] r);
    case (r) 2'd0: return ma; 2'd1: return mc; 2'd2: return ms; default: return mx; endcase
  endfunction

  task automatic set_r(input logic [1:0] r, input logic [7:0] v);
    case (r) 2'd0: ma = v; 2'd1: mc = v; 2'd2: ms = v; default: mx = v; endcase
  endtask

  task automatic wmem(input logic [7:0] a, input logic [7:0] v);
    if (a[7]) mm[a] = v;
  endtask

  task automatic push(input logic [7:0] v);
    ms = ms - 1; wmem(ms, v);
  endtask

  function automatic logic [7:0] pull();
    logic [7:0] v = mm[ms];
    ms = ms + 1;
    return v;
  endfunction

  task automatic set_zc(input logic [7:0] v, input logic c);
    mc[7] = (v == 8'h00); mc[6] = c;
  endtask

  task automatic model_int(input logic [4:0] id);
    push(mpc); push(ma); push(mx); push(mc);
    mc = {mc[7], mc[6], 1'b0, id};
    mpc = mm[1];
  endtask

  task automatic model_step;
    logic [7:0] op, b, ea, m, rv, res;
    logic [1:0] r, xx;
    logic [2:0] mode, sel;
    logic       g, noreg, z, cy;
    logic [8:0] w;
    op = mm[mpc]; b = mm[8'(mpc + 1)];
    g = op[7]; r = op[6:5]; mode = op[4:2]; sel = op[2:0]; xx = op[1:0];
    noreg = (!g && r == 2'b10) || (g && r == 2'b01);
    z = mc[7]; cy = mc[6];
    c_written = 1'b0;
    if (!g && r == 2'b10 && mode[2:1] == 2'b01) begin           // jumps
      mpc = mpc + 2;
      case (sel)
        3'd0: mpc = b;
        3'd1: if (z) mpc = b;
        3'd2: if (!z) mpc = b;
        3'd3: if (cy) mpc = b;
        3'd4: if (!cy) mpc = b;
        3'd5: if (cy || z) mpc = b;
        3'd6: if (!cy && !z) mpc = b;
        default: begin push(mpc); mpc = b; end
      endcase
      return;
    end
    if (noreg || mode[2:1] == 2'b00) begin
      if (mode[2:1] != 2'b00) begin mpc = mpc + 2; return; end   // reserved, two bytes
      mpc = mpc + 1;
      if (noreg) begin
        if (!g) case (sel)
          3'd0: begin ma = 8'h00; mc[7] = 1'b1; end
          3'd1: begin ma = ~ma; mc[7] = (ma == 0); end
          3'd2: begin mc[6] = (ma != 0); ma = 8'(0 - ma); mc[7] = (ma == 0); end
          3'd3: mpc = pull();
          3'd4: begin mc = pull(); mx = pull(); ma = pull(); mpc = pull(); end
          3'd5: model_int(5'd0);
          default: ;
        endcase
      end else if (!g) begin
        if (sel == 3'd0) begin
          push(get_r(r));
          if (ms == mpc && ms[7]) hazard = 1'b1;
        end else if (sel == 3'd1) begin
          rv = pull(); set_r(r, rv); c_written = (r == 2'b01);
        end
      end else if (sel == 3'd0 || sel == 3'd1) begin
        rv = (sel == 3'd1) ? get_r(r) + 1 : get_r(r) - 1;
        set_r(r, rv);
        if (r != 2'b10) mc[7] = (rv == 0);
      end
      return;
    end
    mpc = mpc + 2;
    case (mode)
      3'b100, 3'b101: ea = b;
      3'b110:         ea = ms + b;
      3'b111:         ea = mx + b;
      default:        ea = 8'h00;
    endcase
    m  = (mode[2:1] == 2'b01) ? b : mm[ea];
    rv = get_r(r);
    if (!g) begin
      case (xx)
        2'd0: begin res = rv & m; set_r(r, res); if (r != 2'b01) mc[7] = (res == 0); c_written = (r == 2'b01); end
        2'd2: begin res = rv | m; set_r(r, res); if (r != 2'b01) mc[7] = (res == 0); c_written = (r == 2'b01); end
        2'd1: begin w = 9'(rv) - 9'(m); set_zc(w[7:0], w[8]); end
        default: ;
      endcase
    end else begin
      case (xx)
        2'd0: begin w = 9'(rv) + 9'(m); set_r(r, w[7:0]); set_zc(w[7:0], w[8]); end
        2'd2: begin w = 9'(rv) - 9'(m); set_r(r, w[7:0]); set_zc(w[7:0], w[8]); end
        2'd3: begin set_r(r, m); mc[7] = (m == 0); end
        default: if (mode[2:1] != 2'b01) wmem(ea, rv);
      endcase
    end
  endtask

  // ---------------------------------------------------------------- program generator
  localparam logic [7:0] END_ADDR = 8'h7A, HANDLER = 8'h7C;
  localparam int         STEPS    = 250;

  task automatic make_program;
    int a = 2;
    foreach (mem[i]) mem[i] = 8'($urandom);
    mem[0] = 8'h02; mem[1] = HANDLER;
    while (a < int'(END_ADDR) - 1) begin
      logic [7:0] op = 8'($urandom);
      mem[a] = op;
      a += (op[4:3] == 2'b00) ? 1 : 2;              // the operand byte stays random
    end
    for (int i = a; i < int'(END_ADDR); i++) mem[i] = 8'h40;   // pad with clra
    mem[END_ADDR] = 8'h48; mem[END_ADDR + 1] = END_ADDR;      // jmp to itself
    mem[HANDLER] = 8'h44;                                      // rti
    foreach (mm[i]) mm[i] = mem[i];
    ma = 0; mc = 0; ms = 0; mx = 0; mpc = 8'h02; hazard = 1'b0;
  endtask

  task automatic cmp(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (failures < 20 && got !== exp)
      $display("FAIL %s: got %02h expected %02h (next opcode at %02h)", what, got, exp, mpc);
    if (got !== exp) failures++;
  endtask

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (next opcode at %02h)", what, mpc);
    end
  endtask

  logic running = 1'b0, done = 1'b0;
  int   n_instr = 0, steps = 0, n_hw = 0, n_swi = 0, n_hazard = 0, irq_age = 0;
  logic hw_pending = 1'b0, i_before = 1'b0;
  logic [4:0] hw_id;
  logic [7:0] last_op;

  initial forever begin
    @(posedge clock);
    irq_age = irq ? irq_age + 1 : 0;
    if (!reset && running && !done) begin
      if (iack) begin
        expect_true($sformatf("request acknowledged with I = 1 after opcode %02h", last_op), mc[5] === 1'b1);
        hw_pending = 1'b1; hw_id = irq_id; n_hw++;
      end
      if (state == 3'd2) begin                                            // fetch2
        if (hw_pending) begin
          model_int(hw_id); hw_pending = 1'b0;
        end else if (steps > 0)
          expect_true("pending request taken at the instruction boundary",
                      !(irq_age >= 4 && i_before && mc[5] && !c_written));
        cmp("A", a_q, ma); cmp("C", c_q, mc); cmp("S", s_q, ms); cmp("X", x_q, mx);
        if (steps == STEPS || hazard) begin
          for (int i = 128; i < 256; i++) cmp("RAM", mem[i], mm[i]);
          if (hazard) n_hazard++;
          done = 1'b1;
        end else begin
          i_before = mc[5];
          last_op = mm[mpc];
          if (mm[mpc] == 8'h45) n_swi++;
          model_step(); n_instr++; steps++;
        end
      end
    end
  end

  // random interrupt requests, held until acknowledged
  initial forever begin
    repeat ($urandom_range(0, 60)) @(negedge clock);
    if (running && !done) begin
      irq_id = 5'($urandom_range(1, 31));
      irq = 1'b1;
      while (!iack && running && !done) @(negedge clock);
      @(negedge clock);
      irq = 1'b0;
    end else @(negedge clock);
  end

  initial begin
    for (int p = 0; p < 60; p++) begin
      reset = 1'b1; running = 1'b0; done = 1'b0; steps = 0; hw_pending = 1'b0;
      make_program();
      repeat (2) @(posedge clock);
      #1 reset = 1'b0; running = 1'b1;
      wait (done);
    end
    $display("instructions compared=%0d hardware interrupts=%0d swi=%0d stopped early=%0d",
             n_instr, n_hw, n_swi, n_hazard);
    expect_true("hardware interrupts happened", n_hw > 20);
    expect_true("software interrupts happened", n_swi > 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
