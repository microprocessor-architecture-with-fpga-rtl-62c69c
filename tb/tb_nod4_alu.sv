// tb_nod4_alu - exhaustive-by-sampling test of the nod4 ALU.
//
// Applies every operation to the corner operands 00, 01, 7F, 80, FF and to 2000 random
// operand pairs, and compares Y and the flags {z, c} with a reference worked out in the
// bench from 9-bit integer arithmetic.
module tb_nod4_alu;
  import nod4_pkg::*;
  logic [7:0] d, b, y;
  logic [1:0] f;
  alu_op_t    op;
  int checks = 0, failures = 0;

  nod4_alu dut (.*);

  function automatic logic [8:0] ref9(input alu_op_t o, input int unsigned dd, input int unsigned bb);
    int r;
    case (o)
      ALU_PASSD: r = dd;
      ALU_PASSB: r = bb;
      ALU_ADD:   r = dd + bb;
      ALU_SUB:   r = dd - bb;
      ALU_RSUB:  r = bb - dd;
      ALU_AND:   r = dd & bb;
      ALU_OR:    r = dd | bb;
      ALU_INCD:  r = dd + 1;
      ALU_DECD:  r = dd - 1;
      ALU_INCB:  r = bb + 1;
      ALU_DECB:  r = bb - 1;
      ALU_NOTD:  r = 255 - dd;
      ALU_NEGD:  r = 0 - dd;
      default:   r = 0;
    endcase
    return {(r < 0 || r > 255), 8'(r)};
  endfunction

  task automatic try(input alu_op_t o, input logic [7:0] dd, input logic [7:0] bb);
    logic [8:0] e;
    op = o; d = dd; b = bb;
    #1;
    e = ref9(o, 32'(dd), 32'(bb));
    checks++;
    if (y !== e[7:0] || f[1] !== (e[7:0] == 0) ||
        ((o inside {ALU_ADD, ALU_SUB, ALU_RSUB, ALU_INCD, ALU_DECD, ALU_INCB, ALU_DECB, ALU_NEGD}) && f[0] !== e[8])) begin
      failures++;
      $display("FAIL op=%s d=%02h b=%02h: y=%02h f=%b expected y=%02h c=%b", o.name(), dd, bb, y, f, e[7:0], e[8]);
    end
  endtask

  initial begin
    automatic logic [7:0] corner [5] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFF};
    for (int o = 0; o <= int'(ALU_ZERO); o++)
      foreach (corner[i]) foreach (corner[j]) try(alu_op_t'(o), corner[i], corner[j]);
    for (int n = 0; n < 2000; n++) try(alu_op_t'($urandom_range(0, int'(ALU_ZERO))), 8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
