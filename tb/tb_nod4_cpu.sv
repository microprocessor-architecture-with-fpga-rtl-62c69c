// tb_nod4_cpu - self-checking test of the nod4.1 processor on a flat 256-byte memory.
//
// The memory model reads asynchronously and writes at the rising edge, like the system's
// RAM. It is loaded with tb/nod4_cputest.hex, a program that exercises every instruction
// class (immediate, direct, indexed from X and S, implied, push/pop, all seven conditional
// and unconditional jumps, jsr/rts, swi/rti) and writes its results to RAM. The bench
// raises five hardware interrupts with different IIDs while the program loops on
// pre-fetching instructions, checks the IID each handler sees, and finally compares the
// result bytes with values worked out by hand. It also checks the number of clock cycles
// of every instruction from one FETCH2 to the next against the cycle budget of each
// instruction class.
module tb_nod4_cpu;
  import nod4_pkg::*;

  logic       clock = 1'b0, reset = 1'b1;
  logic [7:0] di, ax, dout;
  logic       rd, wr, irq = 1'b0, iack;
  logic [4:0] irq_id = '0;
  logic [7:0] a_q, c_q, s_q, x_q, pc_q, ir_q;
  logic [2:0] state;
  logic       ev_prefetch, ev_undo, ev_int;
  logic [7:0] mem [256];

  int checks = 0, failures = 0;
  int cyc = 0;

  nod4_cpu dut (.*, .state_o(state));

  always #5 clock = ~clock;

  assign di = rd ? mem[ax] : 8'h00;
  always_ff @(posedge clock) if (wr) mem[ax] <= dout;

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  // cycles from one FETCH2 to the next for the instruction in ir
  function automatic int budget(input logic [7:0] op);
    logic noreg = (op[7:5] == 3'b010) || (op[7:5] == 3'b101);
    logic [2:0] m = op[4:2];
    if (noreg && m[2:1] == 2'b00) begin
      case (op[2:0])
        3'd3: return 4;       // rts
        3'd4: return 10;      // rti
        3'd5: return -1;      // swi enters the interrupt code
        default: return 2;    // clra, inva, nega
      endcase
    end
    if (noreg) return (op[2:0] == 3'd7) ? 5 : 3;   // jsr, jumps
    if (m[2:1] == 2'b00) begin
      if (!op[7]) return (op[0] == 1'b0) ? 3 : 5;  // psh, pop
      return 2;                                      // inc, dec
    end
    if (m[2:1] == 2'b01) return 3;                  // immediate
    if (m[2:1] == 2'b10) return 4;                  // direct
    return 5;                                        // indexed
  endfunction

  int   n_f2 = 0;
  int   last_f2 = -1, n_timed = 0, n_prefetch = 0, n_undo = 0, n_int = 0;
  logic int_seen = 1'b0;
  logic [4:0] acked_iid = '0;      // IID of the interrupt entry in progress (0 for swi)
  logic       ee_written = 1'b0;
  logic [7:0] ee_first = '0;
  int n_iack = 0;
  always @(posedge clock) if (!reset) begin
    cyc++;
    if (ev_prefetch) n_prefetch++;
    if (ev_undo)     n_undo++;
    if (ev_int)      begin n_int++; int_seen = 1'b1; acked_iid = iack ? irq_id : 5'd0; end
    if (wr && ax == 8'hEE && !ee_written) begin ee_written = 1'b1; ee_first = dout; end
    if (state == 3'd2) begin                        // FETCH2
      n_f2++;
      if (last_f2 >= 0 && !int_seen && budget(ir_q) > 0) begin
        checks++; n_timed++;
        if (cyc - last_f2 != budget(ir_q)) begin
          failures++;
          $display("FAIL timing: opcode %02h took %0d cycles, expected %0d", ir_q, cyc - last_f2, budget(ir_q));
        end
      end
      last_f2  = cyc;
      int_seen = 1'b0;
    end
    // every interrupt handler records the C register it sees at $CB
    if (wr && ax == 8'hCB) begin
      checks++;
      if (dout[5:0] != {1'b0, acked_iid}) begin
        failures++;
        $display("FAIL handler saw C=%02h, expected IID %0d", dout, acked_iid);
      end
    end
    if (wr && ax == 8'hDF) begin
      failures++; $display("FAIL program reached its failure path");
    end
  end


  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 8'h00;
    $readmemh("tb/nod4_cputest.hex", mem);
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    // wait until the program has enabled interrupts and entered its loop
    wait (c_q[C_I] == 1'b1);
    for (int k = 0; k < 5; k++) begin
      repeat (7 + 3 * k) @(posedge clock);
      irq_id <= 5'(k + 3);
      irq    <= 1'b1;
      @(posedge clock iff iack);
      n_iack++;
      irq    <= 1'b0;
    end
    wait (mem[8'hCC] == 8'h05);
    wait (pc_q == 8'h88 || pc_q == 8'h89 || pc_q == 8'h8A);   // Done loop
    repeat (20) @(posedge clock);
    check("add  [C0]", mem[8'hC0], 8'h08);
    check("sub  [C1]", mem[8'hC1], 8'hFE);
    check("pshc/popx [C2]", mem[8'hC2], 8'h40);
    check("st [X+1]", mem[8'hC9], 8'h11);
    check("ld/add [X+1] [C3]", mem[8'hC3], 8'h22);
    check("and/or [C4]", mem[8'hC4], 8'h52);
    check("inc/dec [C5]", mem[8'hC5], 8'h53);
    check("inva [C6]", mem[8'hC6], 8'hAC);
    check("nega [C7]", mem[8'hC7], 8'h54);
    check("subx/addx [D1]", mem[8'hD1], 8'h28);
    check("stx [S+0] (first write of $EE)", ee_first, 8'h00);
    check("jsr return address [CA]", mem[8'hCA], 8'h6C);
    check("sta [S+1] in subroutine", mem[8'hF0], 8'h5A);
    check("interrupt count [CC]", mem[8'hCC], 8'h06);
    check("registers kept over interrupts", mem[8'hCD], mem[8'hCE]);
    check("return after swi [CF]", mem[8'hCF], 8'h77);
    check("stack balanced [D0]", mem[8'hD0], 8'hF0);
    check("handler C after swi [CB]", mem[8'hCB], 8'h80);
    check("no failure path [DF]", mem[8'hDF], 8'h00);
    check("iack count", 8'(n_iack), 8'd5);
    checks++; if (n_timed < 40)   begin failures++; $display("FAIL only %0d instructions timed", n_timed); end
    checks++; if (n_prefetch == 0) begin failures++; $display("FAIL no pre-fetch seen"); end
    checks++; if (n_undo < 2)      begin failures++; $display("FAIL pre-fetch undo seen %0d times", n_undo); end
    checks++; if (n_int != 6)      begin failures++; $display("FAIL %0d interrupt entries, expected 6", n_int); end
    $display("average CPI=%0.2f", real'(cyc) / real'(n_f2));
    $display("cycles=%0d timed=%0d prefetch=%0d undo=%0d interrupts=%0d", cyc, n_timed, n_prefetch, n_undo, n_int);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
