// Testbench of ahb_mem_slave against a plain synchronous memory model.
// A master model issues pipelined word, halfword and byte reads and writes
// and checks every read against its own reference memory. The cycle count is
// checked too: zero wait states, except exactly one for each read whose
// address phase overlaps a write's data phase.
module ahb_mem_slave_tb;
  import leon3_tmr_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0;
  ahb_slv_in_t  ram_i, rom_i;
  ahb_slv_out_t ram_o, rom_o;
  cmp_bus_t     bus;
  logic [AW-1:0] m_addr;
  logic m_we;
  logic [3:0] m_be;
  logic [31:0] m_wdata, m_rdata;
  logic [31:0] mem [2**AW];
  int checks = 0, failures = 0;

  ahb_master_bfm u_bfm (.clk(clk), .rom_i(rom_i), .rom_o(rom_o), .ram_i(ram_i), .ram_o(ram_o), .bus(bus));

  ahb_mem_slave #(.AW(AW), .WRITABLE(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .slv_i(ram_i), .slv_o(ram_o),
    .m_addr(m_addr), .m_we(m_we), .m_be(m_be), .m_wdata(m_wdata), .m_rdata(m_rdata));

  assign rom_o = '{hrdata: 32'h0, hready: 1'b1, hresp: 2'b00};

  always_ff @(posedge clk) begin
    m_rdata <= mem[m_addr];
    if (m_we) for (int b = 0; b < 4; b++) if (m_be[b]) mem[m_addr][8*b +: 8] <= m_wdata[8*b +: 8];
  end

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_stalls, n, prev_w;
    for (int a = 0; a < 2**AW; a++) mem[a] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill, then read back: no read directly after a write except one
    for (int a = 0; a < 2**AW; a++) u_bfm.push(1, 32'h4000_0000 + 4*a, 3'd2, $urandom);
    for (int a = 0; a < 2**AW; a++) u_bfm.push(0, 32'h4000_0000 + 4*a, 3'd2, 0);
    u_bfm.run();
    checks++;
    if (u_bfm.stalls != 1 || u_bfm.cycles != 2 * 2**AW + 1 + 1) begin
      failures++; $display("fill/read: %0d cycles, %0d stalls", u_bfm.cycles, u_bfm.stalls);
    end
    // random mix of sizes and directions
    u_bfm.stalls = 0; u_bfm.cycles = 0;
    exp_stalls = 0; prev_w = 0; n = 600;
    for (int i = 0; i < n; i++) begin
      int w = $urandom % 2;
      int sz = $urandom % 3;
      logic [31:0] ad = 32'h4000_0000 + (($urandom % (2**AW)) << 2);
      if (sz == 0) ad[1:0] = 2'($urandom);
      if (sz == 1) ad[1]   = 1'($urandom);
      if (prev_w && !w) exp_stalls++;
      u_bfm.push(w[0], ad, 3'(sz), $urandom);
      prev_w = w;
    end
    u_bfm.run();
    checks++;
    if (u_bfm.stalls != exp_stalls || u_bfm.cycles != n + 1 + exp_stalls) begin
      failures++; $display("mix: %0d cycles, %0d stalls, expected %0d stalls", u_bfm.cycles, u_bfm.stalls, exp_stalls);
    end
    checks += u_bfm.checks;
    failures += u_bfm.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
