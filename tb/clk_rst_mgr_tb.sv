// Testbench of clk_rst_mgr with a 200 MHz input clock. Checks that every
// domain clock has a 20 ns period (divide by four), that the three domain
// clocks rise together, that a divider upset in one domain is voted out,
// that the domain resets follow the input reset after two domain clocks and
// that all heartbeats toggle every 2**(HB_BITS-1) system clocks.
module clk_rst_mgr_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int HB_BITS = 5;
  logic clk_in = 0, rst_in_n = 0;
  logic [2:0] clk_dom, rst_n_dom, hb_dom;
  logic hb_global;
  int checks = 0, failures = 0;
  realtime t_last [3];
  int rises [3];
  int bad_period [3] = '{0, 0, 0};
  int skew = 0;

  clk_rst_mgr #(.CLK_DIV(4), .HB_BITS(HB_BITS)) dut (.*);

  always #2.5 clk_in = ~clk_in;

  for (genvar d = 0; d < 3; d++) begin : g_mon
    always @(posedge clk_dom[d]) begin
      if (rises[d] > 2 && $realtime - t_last[d] != 20.0) bad_period[d]++;
      t_last[d] = $realtime;
      rises[d]++;
    end
  end
  always @(clk_dom) if (clk_dom != 3'b000 && clk_dom != 3'b111) skew++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    int n;
    rises = '{0, 0, 0};
    #200;
    checks++;
    if (rst_n_dom !== 3'b000) begin failures++; $display("reset not asserted"); end
    // reset release: two domain clock edges
    @(posedge clk_dom[0]); #1 rst_in_n = 1;
    n = 0;
    while (rst_n_dom !== 3'b111) begin @(posedge clk_dom[0]); #1 n++; end
    checks++;
    if (n != 2) begin failures++; $display("reset released after %0d edges", n); end
    // heartbeat period
    @(posedge hb_dom[0]); t0 = $realtime;
    @(negedge hb_dom[0]); t1 = $realtime;
    checks++;
    if (t1 - t0 != 20.0 * (2 ** (HB_BITS - 1))) begin failures++; $display("hb_dom half period %0t", t1 - t0); end
    @(posedge hb_global); t0 = $realtime;
    @(negedge hb_global); t1 = $realtime;
    checks++;
    if (t1 - t0 != 20.0 * (2 ** (HB_BITS - 1))) begin failures++; $display("hb_global half period %0t", t1 - t0); end
    checks++;
    if (hb_dom[1] !== hb_dom[0] || hb_dom[2] !== hb_dom[0]) begin failures++; $display("domain heartbeats differ"); end
    // upset one divider: outvoted on the next input clock
    @(negedge clk_in);
    dut.div_q[1] = dut.div_q[1] + 2'd2;
    @(negedge clk_in);
    checks++;
    if (dut.div_q[1] !== dut.div_q[0]) begin failures++; $display("divider not resynchronised"); end
    skew = 0;
    repeat (50) @(posedge clk_in);
    checks += 2;
    if (skew != 0) begin failures++; $display("domain clocks skewed %0d times", skew); end
    // only the upset domain may see one disturbed period
    if (bad_period[0] != 0 || bad_period[2] != 0 || bad_period[1] > 2) begin
      failures++; $display("bad clock periods %0d %0d %0d", bad_period[0], bad_period[1], bad_period[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
