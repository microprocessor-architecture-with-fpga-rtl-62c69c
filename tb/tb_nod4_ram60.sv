// tb_nod4_ram60 - random writes and reads of the 60-byte RAM against a reference array.
// Writes with ena or wr low must not change the memory; the read is checked in the same
// cycle as the address (asynchronous read) and 0 is expected when rd or ena is low.
module tb_nod4_ram60;
  logic       clock = 1'b0;
  logic [5:0] ax;
  logic [7:0] dx, qo;
  logic       ena, rd, wr;
  logic [7:0] model [60];
  int checks = 0, failures = 0;

  nod4_ram60 dut (.*);

  always #5 clock = ~clock;

  initial begin
    foreach (model[i]) model[i] = 8'h00;
    ena = 0; rd = 0; wr = 0; ax = 0; dx = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clock);
      ax  = 6'($urandom_range(0, 59));
      dx  = 8'($urandom);
      ena = ($urandom_range(0, 3) != 0);
      wr  = $urandom_range(0, 1) == 1;
      rd  = !wr;
      #1;
      if (rd) begin
        checks++;
        if (qo !== (ena ? model[ax] : 8'h00)) begin
          failures++; $display("FAIL read [%0d] ena=%b: %02h expected %02h", ax, ena, qo, model[ax]);
        end
      end else begin
        checks++;
        if (qo !== 8'h00) begin failures++; $display("FAIL qo=%02h while not reading", qo); end
      end
      @(posedge clock);
      if (wr && ena) model[ax] = dx;
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
