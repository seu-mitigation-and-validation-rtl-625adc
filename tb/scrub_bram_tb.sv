// Testbench of scrub_bram: random traffic on both ports against a reference
// array. Checks read-first behaviour, byte enables on port 1, whole-word
// writes on port 0, one-cycle read latency and port 1 priority on a
// same-address write collision.
module scrub_bram_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int DEPTH = 32, AW = 5;
  logic clk = 0;
  logic [AW-1:0] a0_addr, a1_addr;
  logic a0_we, a1_we;
  logic [3:0] a1_be;
  logic [31:0] a0_wdata, a1_wdata, a0_rdata, a1_rdata;
  logic [31:0] refm [DEPTH];
  logic [31:0] exp0, exp1;
  int checks = 0, failures = 0;

  scrub_bram #(.DEPTH(DEPTH), .DW(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) refm[i] = '0;
    a0_we = 0; a1_we = 0; a0_addr = 0; a1_addr = 0; a1_be = 0;
    a0_wdata = 0; a1_wdata = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a0_addr  = AW'($urandom); a1_addr = (n % 7 == 0) ? a0_addr : AW'($urandom);
      a0_we    = ($urandom % 3) == 0;
      a1_we    = ($urandom % 3) == 0;
      a1_be    = 4'($urandom);
      a0_wdata = $urandom; a1_wdata = $urandom;
      exp0 = refm[a0_addr]; exp1 = refm[a1_addr];   // read-first values
      if (a0_we && !(a1_we && a1_addr == a0_addr)) refm[a0_addr] = a0_wdata;
      if (a1_we)
        for (int b = 0; b < 4; b++) if (a1_be[b]) refm[a1_addr][8*b +: 8] = a1_wdata[8*b +: 8];
      @(posedge clk); #1;
      checks += 2;
      if (a0_rdata !== exp0) begin failures++; $display("p0 rd %0d got %h exp %h", a0_addr, a0_rdata, exp0); end
      if (a1_rdata !== exp1) begin failures++; $display("p1 rd %0d got %h exp %h", a1_addr, a1_rdata, exp1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
