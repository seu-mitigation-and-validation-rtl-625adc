// Testbench of ahbrom_tmr, loaded from a 64-word test image whose word a is
// ((a+1) * 32'h9E3779B9) ^ a. Checks word, halfword and byte reads against
// that formula, that writes leave the ROM unchanged, that an upset in one
// copy is masked and that one scrub pass repairs it.
module ahbrom_tmr_tb;
  import leon3_tmr_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  ahb_slv_in_t  ram_i, rom_i;
  ahb_slv_out_t ram_o, rom_o;
  cmp_bus_t     bus;
  ahb_slv_out_t [2:0] slv_o;
  logic [2:0] scrub_pass;
  int checks = 0, failures = 0;

  ahb_master_bfm u_bfm (.clk(clk), .rom_i(rom_i), .rom_o(rom_o), .ram_i(ram_i), .ram_o(ram_o), .bus(bus));

  ahbrom_tmr #(.DEPTH(DEPTH), .INIT_FILE("tb/rom_test.hex")) dut (
    .clk({3{clk}}), .rst_n({3{rst_n}}), .slv_i({3{rom_i}}), .slv_o(slv_o), .scrub_pass(scrub_pass));

  assign rom_o = slv_o[1];
  assign ram_o = '{hrdata: 32'h0, hready: 1'b1, hresp: 2'b00};

  always #5 clk = ~clk;

  function automatic logic [31:0] img(int a);
    return ((a + 1) * 32'h9E37_79B9) ^ a;
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) u_bfm.preload(4*a, img(a));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) u_bfm.push(0, 4*a, 3'd2, 0);
    for (int i = 0; i < 50; i++) u_bfm.push(1, 4*($urandom % DEPTH), 3'd2, $urandom);
    for (int i = 0; i < 100; i++) u_bfm.push(0, $urandom % (4*DEPTH), 3'd0, 0);
    for (int i = 0; i < 100; i++) u_bfm.push(0, ($urandom % (4*DEPTH)) & ~1, 3'd1, 0);
    u_bfm.run();
    checks++;
    if (u_bfm.stalls != 0) begin failures++; $display("ROM inserted %0d wait states", u_bfm.stalls); end
    dut.u_mem.g_dom[1].u_bram.mem[5] = 32'h0;
    for (int a = 0; a < DEPTH; a++) u_bfm.push(0, 4*a, 3'd2, 0);
    u_bfm.run();
    @(negedge clk); while (!scrub_pass[2]) @(negedge clk);
    @(negedge clk); while (!scrub_pass[2]) @(negedge clk);
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      checks += 3;
      if (dut.u_mem.g_dom[0].u_bram.mem[a] !== img(a)) failures++;
      if (dut.u_mem.g_dom[1].u_bram.mem[a] !== img(a)) failures++;
      if (dut.u_mem.g_dom[2].u_bram.mem[a] !== img(a)) failures++;
    end
    checks += u_bfm.checks;
    failures += u_bfm.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
