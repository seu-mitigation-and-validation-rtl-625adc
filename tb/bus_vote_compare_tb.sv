// Testbench of bus_vote_compare: random 104-bit buses for both cores with
// random differences between the cores and a random upset in one copy of
// each core's bus. Every domain's mismatch vector must equal the difference
// of the uncorrupted buses, one clock later.
module bus_vote_compare_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 104;
  logic clk = 0, rst_n = 0;
  logic [2:0][W-1:0] core1_bus, core2_bus, mis;
  logic [W-1:0] b1, b2, exp_mis;
  int checks = 0, failures = 0;

  bus_vote_compare #(.W(W)) dut (.clk({3{clk}}), .rst_n({3{rst_n}}), .*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    core1_bus = '0; core2_bus = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (mis !== '0) begin failures++; $display("mis not cleared by reset"); end
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      b1 = rnd();
      b2 = (n % 4 == 0) ? b1 : b1 ^ (rnd() & rnd() & rnd());
      core1_bus = {3{b1}};
      core2_bus = {3{b2}};
      core1_bus[$urandom % 3] ^= rnd();
      core2_bus[$urandom % 3] ^= rnd();
      exp_mis = b1 ^ b2;
      @(negedge clk);
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (mis[d] !== exp_mis) begin failures++; $display("dom %0d mis %h exp %h", d, mis[d], exp_mis); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
