// tb_nod4_controller - drives the controller's status inputs (DX, C, IR) directly and checks
// the state sequence and the key fields of the control word for each block of the
// fetch-execute cycle: init, fetch1, fetch2, an implied instruction with pre-fetch, direct
// load and store, an indexed access, a taken and a not-taken jump, a hardware interrupt
// with pre-fetch undo and IID, and swi.
module tb_nod4_controller;
  import nod4_pkg::*;
  logic       clock = 1'b0, reset = 1'b1;
  logic [7:0] dx_q = 0, c_q = 0, ir_q = 0;
  logic       irq = 0;
  logic [4:0] irq_id = 0;
  ctrl_t      ctl;
  logic [4:0] iid;
  logic       iack, ev_prefetch, ev_undo, ev_int;
  logic [2:0] state_o;
  int checks = 0, failures = 0;

  localparam logic [2:0] INIT = 0, F1 = 1, F2 = 2, EA = 3, EX = 4, INT = 5;

  nod4_controller dut (.*);

  always #5 clock = ~clock;

  task automatic expect_state(input string what, input logic [2:0] s);
    checks++;
    if (state_o !== s) begin failures++; $display("FAIL %s: state %0d expected %0d", what, state_o, s); end
  endtask

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %b expected %b", what, got, exp); end
  endtask

  task automatic tick;
    @(posedge clock); #1;
  endtask

  // run fetch1 and fetch2 of opcode op
  task automatic fetch(input logic [7:0] op);
    expect_state("fetch1", F1);
    expect_bit("fetch1 reads", ctl.rd, 1'b1);
    expect_bit("fetch1 PC+1", ctl.pc_ld && ctl.alu_op == ALU_INCB && ctl.bsel == BSEL_PC, 1'b1);
    dx_q = op;                                   // opcode arrives in DX
    tick;
    expect_state("fetch2", F2);
    expect_bit("fetch2 loads IR", ctl.ir_ld, 1'b1);
    expect_bit("fetch2 reads", ctl.rd && ctl.dx_ld && ctl.axsel == AXSEL_PC, 1'b1);
    @(posedge clock); ir_q = op; #1;      // IR loads at the end of fetch2
  endtask

  initial begin
    tick; tick;
    reset = 0;
    expect_state("init", INIT);
    expect_bit("init reads $00 via PC", ctl.rd && ctl.axsel == AXSEL_PC, 1'b1);
    tick;
    expect_bit("init loads PC", ctl.pc_ld && ctl.alu_op == ALU_PASSD, 1'b1);
    tick;
    // clra (implied): one execute cycle, then straight to fetch2 (pre-fetch)
    fetch(8'h40);
    expect_state("clra execute", EX);
    expect_bit("clra loads A with 0", ctl.a_ld && ctl.alu_op == ALU_ZERO, 1'b1);
    expect_bit("pre-fetch event", ev_prefetch, 1'b1);
    expect_bit("no bus access in clra", ctl.rd || ctl.wr, 1'b0);
    dx_q = 8'h93;                                // the pre-fetched opcode: lda [dir]
    tick;
    expect_state("pre-fetch continues at fetch2", F2);
    @(posedge clock); ir_q = 8'h93; #1;
    expect_state("direct goes to access-EA", EA);
    expect_bit("direct read at DX", ctl.rd && ctl.dx_ld && ctl.axsel == AXSEL_DX, 1'b1);
    tick;
    expect_state("lda execute", EX);
    expect_bit("lda loads A from DX", ctl.a_ld && ctl.alu_op == ALU_PASSB && ctl.bsel == BSEL_DX, 1'b1);
    expect_bit("lda sets Z", ctl.z_ld, 1'b1);
    tick;
    // sta [dir]
    fetch(8'h91);
    expect_state("sta access-EA", EA);
    expect_bit("sta writes A", ctl.wr && ctl.dosel == DOSEL_A && ctl.axsel == AXSEL_DX && !ctl.rd, 1'b1);
    tick; expect_state("sta execute", EX); tick;
    // ldx [S+n]: EA = S + DX into ND, then read at ND
    fetch(8'hFB);
    expect_state("indexed access-EA", EA);
    expect_bit("ND <= S + offset", ctl.nd_ld && ctl.alu_op == ALU_ADD && ctl.bsel == BSEL_S, 1'b1);
    tick;
    expect_bit("read at ND", ctl.rd && ctl.axsel == AXSEL_ND, 1'b1);
    tick;
    expect_bit("ldx loads X", ctl.x_ld, 1'b1);
    tick;
    // jeq: not taken with Z=0, taken with Z=1
    c_q = 8'h00;
    fetch(8'h49);
    expect_state("jump execute", EX);
    expect_bit("jeq not taken", ctl.pc_ld, 1'b0);
    tick;
    c_q = 8'h80;
    fetch(8'h49);
    expect_bit("jeq taken", ctl.pc_ld && ctl.alu_op == ALU_PASSD, 1'b1);
    tick;
    // hardware interrupt after an implied instruction: undo, push 4 bytes, IID, vector
    c_q = 8'h20; irq = 1; irq_id = 5'd19;
    fetch(8'hA1);                                  // inca
    expect_state("inca execute", EX);
    tick;
    expect_state("interrupt taken", INT);
    expect_bit("undo pre-fetch", ctl.pc_ld && ctl.alu_op == ALU_DECB && ev_undo, 1'b1);
    begin
      automatic int writes = 0, n = 0;
      automatic bit seen_iack = 0;
      while (state_o == INT && n < 20) begin
        if (ctl.wr) writes++;
        if (iack) begin
          seen_iack = 1;
          expect_bit("IID written to C", ctl.int_ld, 1'b1);
          checks++; if (iid !== 5'd19) begin failures++; $display("FAIL iid=%0d", iid); end
          irq = 0;
        end
        tick; n++;
      end
      checks++; if (writes != 4) begin failures++; $display("FAIL interrupt pushed %0d bytes", writes); end
      expect_bit("iack seen", seen_iack, 1'b1);
      checks++; if (n != 14) begin failures++; $display("FAIL interrupt entry took %0d cycles", n); end
    end
    expect_state("back to fetch1", F1);
    // swi: IID 0, no iack
    c_q = 8'h00;
    fetch(8'h45);
    expect_state("swi execute", EX);
    expect_bit("swi undoes pre-fetch", ctl.pc_ld && ctl.alu_op == ALU_DECB, 1'b1);
    tick;
    expect_state("swi enters interrupt code", INT);
    while (state_o == INT && !ctl.int_ld) tick;
    expect_bit("swi without iack", iack, 1'b0);
    checks++; if (iid !== 5'd0) begin failures++; $display("FAIL swi iid=%0d", iid); end
    while (state_o == INT) tick;
    // an instruction that loads the whole C register defers a pending request by one
    // instruction, so that its new I decides
    c_q = 8'h20; irq = 1; irq_id = 5'd7;
    fetch(8'h28);                                  // and C,#n
    expect_state("and C execute", EX);
    expect_bit("and C loads C", ctl.c_ld, 1'b1);
    tick;
    expect_state("request deferred after a C load", F1);
    fetch(8'h40);                                  // clra
    tick;
    expect_state("deferred request taken at the next boundary", INT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
