// tb_nod4_rom192 - checks the program ROM with its default contents (the demonstration
// program): the first 21 bytes against the hand-encoded program, the zero fill above it,
// and that qo is 0 whenever rd or ena is low.
module tb_nod4_rom192;
  logic [7:0] ax, qo;
  logic       rd, ena;
  int checks = 0, failures = 0;
  logic [7:0] prog [21] = '{8'h02, 8'h02, 8'hCB, 8'hFC, 8'hEB, 8'h14, 8'h4F, 8'h0A, 8'h48, 8'h08,
                            8'h9F, 8'h00, 8'h09, 8'h80, 8'h4B, 8'h11, 8'h42, 8'h91, 8'hFC, 8'h43,
                            8'h37};

  nod4_rom192 dut (.*);

  initial begin
    for (int a = 0; a < 192; a++) begin
      logic [7:0] e;
      e = (a < 21) ? prog[a] : 8'h00;
      ax = 8'(a); rd = 1'b1; ena = 1'b1; #1;
      checks++;
      if (qo !== e) begin failures++; $display("FAIL [%02h] = %02h expected %02h", a, qo, e); end
      rd = 1'b0; #1;
      checks++;
      if (qo !== 8'h00) begin failures++; $display("FAIL [%02h] drives %02h without rd", a, qo); end
      rd = 1'b1; ena = 1'b0; #1;
      checks++;
      if (qo !== 8'h00) begin failures++; $display("FAIL [%02h] drives %02h without ena", a, qo); end
    end
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
