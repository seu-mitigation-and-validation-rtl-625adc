// Testbench of bus_vote_reduce. Checks that a mismatch present in only one
// copy is ignored, that a mismatch in two copies raises disagree one clock
// later and the sticky failure flag one clock after that, that the failure
// flag stays set when the cores agree again, that an upset of one failure
// register copy is repaired by the vote, and that reset clears it.
module bus_vote_reduce_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 104;
  logic clk = 0, rst_n = 0;
  logic [2:0][W-1:0] mis;
  logic [2:0] disagree, fail;
  int checks = 0, failures = 0;

  bus_vote_reduce #(.W(W)) dut (.clk({3{clk}}), .rst_n({3{rst_n}}), .*);

  always #5 clk = ~clk;

  task automatic expect_flags(logic [2:0] ed, logic [2:0] ef, string what);
    checks++;
    if (disagree !== ed || fail !== ef) begin
      failures++; $display("%s: disagree %b fail %b, expected %b %b", what, disagree, fail, ed, ef);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bitpos;
    mis = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_flags(3'b000, 3'b000, "idle");
    // one copy only: outvoted
    for (int k = 0; k < 3; k++) begin
      mis = '0; mis[k][$urandom % W] = 1'b1;
      @(negedge clk); @(negedge clk);
      expect_flags(3'b000, 3'b000, "single copy");
    end
    // two copies agree on a mismatch bit, for one cycle
    bitpos = $urandom % W;
    mis = '0; mis[0][bitpos] = 1'b1; mis[2][bitpos] = 1'b1;
    @(negedge clk);
    mis = '0;
    expect_flags(3'b111, 3'b000, "disagree");
    @(negedge clk);
    expect_flags(3'b000, 3'b111, "caught");
    repeat (20) @(negedge clk);
    expect_flags(3'b000, 3'b111, "sticky");
    // upset one copy of the failure register
    force dut.g_dom[1].fail_q = 1'b0;
    @(negedge clk);
    release dut.g_dom[1].fail_q;
    @(negedge clk);
    expect_flags(3'b000, 3'b111, "fail upset repaired");
    // a wrong disagree in one copy cannot set the failure flag
    rst_n = 0; @(negedge clk); rst_n = 1;
    expect_flags(3'b000, 3'b000, "reset");
    force dut.g_dom[2].dis_q = 1'b1;
    @(negedge clk); @(negedge clk);
    release dut.g_dom[2].dis_q;
    @(negedge clk);
    expect_flags(3'b000, 3'b000, "single disagree copy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
