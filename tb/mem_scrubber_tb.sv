// Testbench of mem_scrubber. Three scrubbers are connected as in the
// triplicated memory, with their state voted in the feedback path. Checks:
// read/write alternation through every address in order, a pass of
// 2*DEPTH cycles, pass_done once per pass, pause holding or redoing the
// address without writing, and recovery of a scrubber whose state is upset.
module mem_scrubber_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int DEPTH = 16, AW = 4;
  logic clk = 0, rst_n = 0;
  logic [2:0] pause;
  logic [2:0][AW-1:0] addr_q, addr_v, mem_addr;
  logic [2:0] wr_q, wr_v, mem_we, pass_done;
  int checks = 0, failures = 0;

  for (genvar d = 0; d < 3; d++) begin : g
    tmr_voter #(.W(AW + 1)) u_v (
      .a({addr_q[0], wr_q[0]}), .b({addr_q[1], wr_q[1]}), .c({addr_q[2], wr_q[2]}),
      .y({addr_v[d], wr_v[d]}));
    mem_scrubber #(.DEPTH(DEPTH)) dut (
      .clk(clk), .rst_n(rst_n), .pause(pause[d]), .addr_v(addr_v[d]), .wr_v(wr_v[d]),
      .addr_q(addr_q[d]), .wr_q(wr_q[d]), .mem_addr(mem_addr[d]), .mem_we(mem_we[d]),
      .pass_done(pass_done[d]));
  end

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check the current cycle, then move to the next one
  task automatic expect_cycle(logic [AW-1:0] ea, bit ewe, bit epass);
    #1;
    for (int d = 0; d < 3; d++) begin
      checks++;
      if (mem_addr[d] !== ea || mem_we[d] !== ewe || pass_done[d] !== epass) begin
        failures++;
        $display("dom %0d: addr %0d we %0b pass %0b, expected %0d %0b %0b",
                 d, mem_addr[d], mem_we[d], pass_done[d], ea, ewe, epass);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    int passes;
    pause = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // two full passes: read then write for every address
    for (int p = 0; p < 2; p++)
      for (int a = 0; a < DEPTH; a++) begin
        expect_cycle(AW'(a), 0, 0);
        expect_cycle(AW'(a), 1, a == DEPTH - 1);
      end
    // pause during a read: same address is read again
    pause = 3'b111;
    expect_cycle(AW'(0), 0, 0);     // read slot, paused
    pause = '0;
    expect_cycle(AW'(0), 0, 0);     // read repeated
    // pause during the write: write dropped, address re-read
    pause = 3'b111;
    #1; checks++;
    if (mem_we !== 3'b000 || mem_addr[0] !== AW'(0)) begin failures++; $display("paused write not dropped"); end
    @(negedge clk);
    pause = '0;
    expect_cycle(AW'(0), 0, 0);
    expect_cycle(AW'(0), 1, 0);
    expect_cycle(AW'(1), 0, 0);
    // upset one scrubber's state: the vote restores it on the next clock
    force addr_q[1] = AW'(9);       // now in the write slot of address 1
    @(negedge clk); #1;
    release addr_q[1];
    checks++;
    if (mem_addr[1] !== AW'(2)) begin failures++; $display("upset not masked"); end
    @(negedge clk); #1;
    checks++;
    if (addr_q[1] !== addr_q[0] || wr_q[1] !== wr_q[0]) begin failures++; $display("upset not repaired"); end
    // pass length: count cycles between pass_done pulses
    passes = 0;
    while (!pass_done[0]) @(negedge clk);
    for (int n = 1; n <= 2 * DEPTH; n++) begin
      @(negedge clk);
      if (pass_done[0]) begin
        passes++;
        checks++;
        if (n != 2 * DEPTH) begin failures++; $display("pass took %0d cycles", n); end
      end
    end
    checks++;
    if (passes != 1) begin failures++; $display("pass_done count %0d", passes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
