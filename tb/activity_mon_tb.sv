// Testbench of activity_mon (ACT_WIN = 8). Checks that a changing bus keeps
// act high, that act falls exactly ACT_WIN clocks after the last change, and
// that changes seen in only one copy of the bus do not count as activity.
module activity_mon_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 104, WIN = 8;
  logic clk = 0, rst_n = 0;
  logic [2:0][W-1:0] bus;
  logic [2:0] act;
  int checks = 0, failures = 0;

  activity_mon #(.W(W), .ACT_WIN(WIN)) dut (.clk({3{clk}}), .rst_n({3{rst_n}}), .bus(bus), .act(act));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    int n;
    bus = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (act !== 3'b000) begin failures++; $display("active without changes"); end
    for (int i = 0; i < 30; i++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      bus = {3{v}};
      @(negedge clk);
      checks++;
      if (act !== 3'b111) begin failures++; $display("not active while changing"); end
    end
    n = 0;
    while (act !== 3'b000 && n < 100) begin @(negedge clk); n++; end
    checks++;
    if (n != WIN) begin failures++; $display("act fell after %0d clocks", n); end
    for (int i = 0; i < 30; i++) begin
      bus[1] = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      checks++;
      if (act !== 3'b000) begin failures++; $display("single-copy change counted"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
