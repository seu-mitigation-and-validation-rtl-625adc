// Testbench of status_if: pio must follow the status word, and a JTAG
// capture followed by STATUS_BITS shifts must return the status word least
// significant bit first while the bits shifted in on TDI come out after it.
module status_if_tb;
  import leon3_tmr_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  status_t status;
  logic [STATUS_BITS-1:0] pio;
  logic tck = 0, sel = 0, capture = 0, shift = 0, tdi = 0, tdo;
  int checks = 0, failures = 0;

  status_if dut (.*);

  always #50 tck = ~tck;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [STATUS_BITS-1:0] got, pat;
    for (int n = 0; n < 20; n++) begin
      status = status_t'($urandom);
      pat = STATUS_BITS'($urandom);
      #1;
      checks++;
      if (pio !== status) begin failures++; $display("pio %h status %h", pio, status); end
      repeat (3) @(negedge tck);              // synchroniser settles
      sel = 1; capture = 1;
      @(negedge tck);
      capture = 0; shift = 1;
      for (int i = 0; i < STATUS_BITS; i++) begin
        got[i] = tdo; tdi = pat[i];
        @(negedge tck);
      end
      for (int i = 0; i < STATUS_BITS; i++) begin
        checks++;
        if (tdo !== pat[i]) failures++;
        @(negedge tck);
      end
      shift = 0; sel = 0;
      checks++;
      if (got !== STATUS_BITS'(status)) begin failures++; $display("jtag %h status %h", got, status); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
