// tb_nod4_reg8x - random writes, non-writes and clears of the LED register against a
// one-byte reference model, checked after every rising edge.
module tb_nod4_reg8x;
  logic       clock = 1'b0, clear, ena, wr;
  logic [7:0] dx, qx, model;
  int checks = 0, failures = 0;

  nod4_reg8x dut (.*);

  always #5 clock = ~clock;

  initial begin
    clear = 1; ena = 0; wr = 0; dx = 0; model = 8'h00;
    @(posedge clock);
    for (int n = 0; n < 1000; n++) begin
      @(negedge clock);
      dx    = 8'($urandom);
      ena   = $urandom_range(0, 1) == 1;
      wr    = $urandom_range(0, 1) == 1;
      clear = $urandom_range(0, 9) == 0;
      @(posedge clock);
      if (clear) model = 8'h00; else if (ena && wr) model = dx;
      #1;
      checks++;
      if (qx !== model) begin failures++; $display("FAIL qx=%02h expected %02h", qx, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
